// sb_monitor: per-subbank miss-rate monitor and subbank shut-off controller.
//
// For every completed cache access it counts, per subbank, the accesses and
// the misses. After INTERVAL accesses in total (one million by default) it
// spends one cycle (busy=1) evaluating the interval: among the subbanks that
// are still fully enabled and whose miss rate is below the threshold
// (misses * THR_DEN < THR_NUM * accesses, 1.5 % by default), the least
// accessed one is disabled. Its index is reported with a one-cycle dis_pulse
// so the cache can drop the contents of the gated part. All counters then
// restart for the next interval.
//
// Follows the method: the interval length, the 1.5 % threshold, per-subbank
// access and miss counting and the choice of the least accessed subbank.
// This design's own choices: at most one subbank is disabled per interval;
// a subbank that saw no access in the interval counts as below threshold;
// at least one subbank always stays fully enabled (so 8 subbanks of a 64 KB
// cache give the sizes 64K, 57K, ... 15K); ties go to the lowest index;
// disabled subbanks are not re-enabled (only reset restores the full size).
module sb_monitor #(
  parameter int unsigned NUM_SUBBANKS = 8,
  parameter int unsigned INTERVAL     = 1_000_000,
  parameter int unsigned THR_NUM      = 15,
  parameter int unsigned THR_DEN      = 1000,
  localparam int unsigned SB_W  = $clog2(NUM_SUBBANKS),
  localparam int unsigned CNT_W = $clog2(INTERVAL + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    acc_valid,    // one completed access
  input  logic [SB_W-1:0]         acc_subbank,  // its subbank
  input  logic                    acc_miss,     // it missed
  output logic [NUM_SUBBANKS-1:0] disabled,     // current shut-off state
  output logic                    busy,         // evaluating: hold new accesses
  output logic                    dis_pulse,    // a subbank was disabled this cycle
  output logic [SB_W-1:0]         dis_id,       // which one
  output logic [SB_W:0]           num_disabled  // number of disabled subbanks
);
  logic [CNT_W-1:0] acc_cnt  [NUM_SUBBANKS];
  logic [CNT_W-1:0] miss_cnt [NUM_SUBBANKS];
  logic [CNT_W-1:0] total;
  logic             eval_q;

  // Decision logic, evaluated on the registered counters.
  logic             found;
  logic [SB_W-1:0]  pick;
  logic [CNT_W-1:0] pick_acc;
  logic [SB_W:0]    n_en;

  always_comb begin
    found    = 1'b0;
    pick     = '0;
    pick_acc = '0;
    n_en     = '0;
    for (int unsigned i = 0; i < NUM_SUBBANKS; i++)
      if (!disabled[i]) n_en = n_en + 1'b1;
    for (int unsigned i = 0; i < NUM_SUBBANKS; i++) begin
      logic below;
      below = (acc_cnt[i] == '0) ||
              (64'(miss_cnt[i]) * 64'(THR_DEN) < 64'(acc_cnt[i]) * 64'(THR_NUM));
      if (!disabled[i] && below && (!found || acc_cnt[i] < pick_acc)) begin
        found    = 1'b1;
        pick     = SB_W'(i);
        pick_acc = acc_cnt[i];
      end
    end
    if (n_en <= 1) found = 1'b0;
  end

  assign busy = eval_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_SUBBANKS; i++) begin
        acc_cnt[i]  <= '0;
        miss_cnt[i] <= '0;
      end
      total     <= '0;
      eval_q    <= 1'b0;
      disabled  <= '0;
      dis_pulse <= 1'b0;
      dis_id    <= '0;
    end else begin
      dis_pulse <= 1'b0;
      if (eval_q) begin
        if (found) begin
          disabled[pick] <= 1'b1;
          dis_pulse      <= 1'b1;
          dis_id         <= pick;
        end
        for (int unsigned i = 0; i < NUM_SUBBANKS; i++) begin
          acc_cnt[i]  <= '0;
          miss_cnt[i] <= '0;
        end
        total  <= '0;
        eval_q <= 1'b0;
      end else if (acc_valid) begin
        acc_cnt[acc_subbank] <= acc_cnt[acc_subbank] + 1'b1;
        if (acc_miss) miss_cnt[acc_subbank] <= miss_cnt[acc_subbank] + 1'b1;
        total <= total + 1'b1;
        if (total == CNT_W'(INTERVAL - 1)) eval_q <= 1'b1;
      end
    end
  end

  always_comb begin
    num_disabled = '0;
    for (int unsigned i = 0; i < NUM_SUBBANKS; i++)
      num_disabled = num_disabled + (SB_W+1)'(disabled[i]);
  end

  // The cache must not report accesses while the interval is being evaluated.
  assert property (@(posedge clk) disable iff (!rst_n) eval_q |-> !acc_valid)
    else $error("sb_monitor: access reported during evaluation");
endmodule
