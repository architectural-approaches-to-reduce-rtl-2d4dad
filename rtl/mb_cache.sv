// mb_cache: dynamically resizable direct-mapped cache driven by macroblock
// access patterns (the "macroblock method").
//
// Every access looks up its macroblock in the Memory Address Table (mat) in
// parallel with the cache lookup. A hit only bumps the macroblock's spatial
// counter. On a miss the MAT compares the missing macroblock's counter with
// the (decremented) counter of the victim line's macroblock; if the victim's
// region is the more heavily used one, the refilled line is passed to the CPU
// but not written into the cache (bypass).
//
// Resizing: after INTERVAL completed accesses, mb_resize_ctrl sums all MAT
// counters into sum_MATcnt and halves the cache when the sum is below the
// threshold, doubles it otherwise, between 2**MIN_IDX and 2**IDX_W lines.
// The line index is masked to the active size, and the tag keeps the
// index bits that masking may drop ("resizing tag bits"): the tag is wide
// enough for the smallest size, so it is compared in full at every size.
// Lines that lose power on a downsize are invalidated.
//
// Loads: interface and timing match sb_icache: valid/ready CPU request, hit
// answered in the cycle after acceptance, miss answered when the refill line
// arrives (cpu_resp_bypass tells that it was not kept).
// Stores (cpu_req_we, full 32-bit words, for data-cache use): write-through,
// no write-allocate. A store hit updates the line; every store goes out on
// the l2_wr_* channel and is answered in the cycle that channel takes it.
// A store also drops the copies the same line may have left at the smaller
// sizes' indices (idx masked to MIN_IDX .. size_log-1 bits), so that no
// stale copy can come back into reach after a later downsize.
// Stores count as accesses in the MAT but never replace a line, so they make
// no bypass decision.
// The cache accepts no request from the end of an interval until the resize
// decision is made (1 + ENTRIES + 1 cycles).
//
// Follows the method: MAT lookup on each access, the bypass rule, sum_MATcnt
// against a threshold, the index mask and resizing tag bits. This design's
// own: the interval length (taken as one million accesses, the figure used
// for the subbank method), the smallest size (4 KB), the handshakes, and the
// whole store path (no write policy is specified for the data cache).
module mb_cache
  import leak_pkg::*;
#(
  parameter int unsigned INTERVAL    = 1_000_000,
  parameter int unsigned THRESHOLD   = 138,
  parameter int unsigned MIN_IDX     = IDX_W - 4,
  parameter int unsigned MAT_ENTRIES = 1024,
  parameter int unsigned MAT_TAG_W   = 12,
  parameter int unsigned CTR_W       = 8,
  parameter int unsigned F_NUM       = 8,
  parameter int unsigned F_SHIFT     = 4,
  localparam int unsigned TAG_W = ADDR_W - OFF_W - MIN_IDX,
  localparam int unsigned SW    = $clog2(IDX_W + 1),
  localparam int unsigned CNT_W = $clog2(INTERVAL + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpu_req_valid,
  input  addr_t       cpu_req_addr,
  input  logic        cpu_req_we,      // store
  input  word_t       cpu_req_wdata,   // store data (whole word)
  output logic        cpu_req_ready,
  output logic        cpu_resp_valid,
  output word_t       cpu_resp_data,
  output logic        cpu_resp_hit,
  output logic        cpu_resp_bypass,
  output logic        l2_req_valid,
  output addr_t       l2_req_addr,
  input  logic        l2_req_ready,
  input  logic        l2_resp_valid,
  input  line_t       l2_resp_data,
  output logic        l2_wr_valid,     // write-through of a store
  output addr_t       l2_wr_addr,
  output word_t       l2_wr_data,
  input  logic        l2_wr_ready,
  output logic [SW-1:0]   size_log,      // active index bits
  output logic [IDX_W:0]  active_lines,
  output logic [15:0]     sum_matcnt,
  output logic            resizing
);
  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_MISS, S_WAIT, S_WRITE} state_e;
  state_e state;

  line_t            data_mem [NUM_LINES];
  logic [TAG_W-1:0] tag_mem  [NUM_LINES];
  logic [NUM_LINES-1:0] valid;

  addr_t            addr_q;
  line_t            data_q;
  logic [TAG_W-1:0] tag_q;
  logic             valid_q, bypass_q, we_q, hit_q;
  word_t            wdata_q;
  logic [IDX_W-1:0] pidx_in, pidx_q;
  logic [IDX_W-1:0] index_mask;

  logic [CNT_W-1:0] acc_cnt;
  logic             interval_done;
  logic             rs_busy, down_pulse, up_pulse;
  logic             done;

  localparam int unsigned MAT_IW = $clog2(MAT_ENTRIES);
  logic [MAT_IW-1:0] sum_idx;
  logic              sum_valid;
  logic [CTR_W-1:0]  sum_ctr;
  logic              mat_bypass, mat_vfound;
  logic [CTR_W-1:0]  mat_ctr1, mat_ctr2;
  addr_t             victim_addr;

  assign pidx_in = cpu_req_addr[OFF_W +: IDX_W] & index_mask;
  wire [TAG_W-1:0] stag_q = addr_q[ADDR_W-1 -: TAG_W];
  wire hit = valid_q && (tag_q == stag_q);
  assign victim_addr = {tag_q, pidx_q[MIN_IDX-1:0], {OFF_W{1'b0}}};

  mat #(.ENTRIES(MAT_ENTRIES), .TAG_W(MAT_TAG_W), .CTR_W(CTR_W),
        .F_NUM(F_NUM), .F_SHIFT(F_SHIFT)) u_mat (
    .clk, .rst_n,
    .op_valid(state == S_LOOKUP), .acc_addr(addr_q), .miss(!hit && !we_q),
    .victim_valid(valid_q), .victim_addr,
    .bypass(mat_bypass), .ctr1(mat_ctr1), .ctr2(mat_ctr2), .victim_found(mat_vfound),
    .sum_idx, .sum_valid, .sum_ctr
  );

  mb_resize_ctrl #(.ENTRIES(MAT_ENTRIES), .CTR_W(CTR_W), .SUM_W(16),
                   .THRESHOLD(THRESHOLD), .MAX_IDX(IDX_W), .MIN_IDX(MIN_IDX)) u_rs (
    .clk, .rst_n, .start(interval_done), .busy(rs_busy),
    .sum_idx, .sum_valid, .sum_ctr, .sum_matcnt, .size_log, .index_mask,
    .down_pulse, .up_pulse
  );

  assign resizing      = interval_done || rs_busy;
  assign cpu_req_ready = (state == S_IDLE) && !resizing;
  assign l2_req_valid  = (state == S_MISS);
  assign l2_req_addr   = {addr_q[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  assign l2_wr_valid   = (state == S_WRITE);
  assign l2_wr_addr    = {addr_q[ADDR_W-1:2], 2'b00};
  assign l2_wr_data    = wdata_q;
  assign active_lines  = (IDX_W+1)'(1) << size_log;

  always_comb begin
    cpu_resp_valid  = 1'b0;
    cpu_resp_hit    = 1'b0;
    cpu_resp_bypass = 1'b0;
    cpu_resp_data   = line_word(data_q, addr_q[OFF_W-1:2]);
    done            = 1'b0;
    if (state == S_WRITE && l2_wr_ready) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_hit   = hit_q;
      cpu_resp_data  = wdata_q;
      done           = 1'b1;
    end else if (state == S_LOOKUP && hit && !we_q) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_hit   = 1'b1;
      done           = 1'b1;
    end else if (state == S_WAIT && l2_resp_valid) begin
      cpu_resp_valid  = 1'b1;
      cpu_resp_bypass = bypass_q;
      cpu_resp_data   = line_word(l2_resp_data, addr_q[OFF_W-1:2]);
      done            = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (cpu_req_valid && cpu_req_ready) begin
      data_q <= data_mem[pidx_in];
      tag_q  <= tag_mem[pidx_in];
    end
    if (state == S_WAIT && l2_resp_valid && !bypass_q) begin
      data_mem[pidx_q] <= l2_resp_data;
      tag_mem[pidx_q]  <= stag_q;
    end
    if (state == S_LOOKUP && we_q && hit)
      data_mem[pidx_q] <= line_put(data_q, addr_q[OFF_W-1:2], wdata_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      valid         <= '0;
      valid_q       <= 1'b0;
      bypass_q      <= 1'b0;
      we_q          <= 1'b0;
      hit_q         <= 1'b0;
      wdata_q       <= '0;
      addr_q        <= '0;
      pidx_q        <= '0;
      acc_cnt       <= '0;
      interval_done <= 1'b0;
    end else begin
      interval_done <= 1'b0;
      if (done) begin
        if (acc_cnt == CNT_W'(INTERVAL - 1)) begin
          acc_cnt       <= '0;
          interval_done <= 1'b1;
        end else acc_cnt <= acc_cnt + 1'b1;
      end
      unique case (state)
        S_IDLE: if (cpu_req_valid && cpu_req_ready) begin
          addr_q  <= cpu_req_addr;
          we_q    <= cpu_req_we;
          wdata_q <= cpu_req_wdata;
          pidx_q  <= pidx_in;
          valid_q <= valid[pidx_in];
          state   <= S_LOOKUP;
        end
        S_LOOKUP: begin
          bypass_q <= mat_bypass;
          hit_q    <= hit;
          if (we_q) begin
            // drop copies left at the indices of smaller sizes
            for (int unsigned k = MIN_IDX; k < IDX_W; k++)
              if (k < 32'(size_log) && (pidx_q & IDX_W'((1 << k) - 1)) != pidx_q)
                valid[pidx_q & IDX_W'((1 << k) - 1)] <= 1'b0;
            state <= S_WRITE;
          end else state <= hit ? S_IDLE : S_MISS;
        end
        S_WRITE: if (l2_wr_ready) state <= S_IDLE;
        S_MISS: if (l2_req_ready) state <= S_WAIT;
        S_WAIT: if (l2_resp_valid) begin
          if (!bypass_q) valid[pidx_q] <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // Downsize: lines beyond the new size are gated off.
      if (down_pulse)
        for (int unsigned i = 0; i < NUM_LINES; i++)
          if ((i >> size_log) != 0) valid[i] <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    l2_req_valid && !l2_req_ready |=> l2_req_valid && $stable(l2_req_addr))
    else $error("mb_cache: L2 request dropped");
  assert property (@(posedge clk) disable iff (!rst_n) !(down_pulse && up_pulse))
    else $error("mb_cache: up and down at once");
endmodule
