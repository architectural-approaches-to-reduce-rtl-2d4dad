// sb_monitor_tb: drives the subbank monitor with random intervals of
// accesses (interval shortened to 500 accesses) and checks after each one
// which subbank it shuts off, against a model in this testbench: candidates
// are enabled subbanks with miss/access below 1.5 % (written as
// 200*misses < 3*accesses) or with no access; the one with fewest accesses
// (lowest index on a tie) is shut off, unless it would be the last enabled
// subbank. Also checks that the evaluation takes exactly one busy cycle.
module sb_monitor_tb;
  localparam int N = 8;
  localparam int IV = 500;
  int checks = 0, failures = 0;
  int n_disable = 0, n_none = 0;

  logic clk = 0, rst_n = 0;
  logic acc_valid = 0, acc_miss = 0;
  logic [2:0] acc_subbank = 0;
  logic [N-1:0] disabled;
  logic busy, dis_pulse;
  logic [2:0] dis_id;
  logic [3:0] num_disabled;

  sb_monitor #(.NUM_SUBBANKS(N), .INTERVAL(IV)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] ref_dis;
  int acc[N], mis[N];

  initial begin
    ref_dis = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int iv = 0; iv < 14; iv++) begin
      int hot, pick, best, n_en, busy_cycles;
      int missp[N];
      for (int i = 0; i < N; i++) begin
        acc[i] = 0; mis[i] = 0;
        missp[i] = $urandom_range(0, 40);   // miss probability in 1/1000
      end
      hot = $urandom_range(0, N - 1);
      for (int k = 0; k < IV; k++) begin
        int s;
        // skewed subbank choice: half go to a hot subbank, some never touched
        if ($urandom_range(0, 1)) s = hot;
        else s = $urandom_range(0, N - 1 - (iv % 3));
        @(negedge clk);
        acc_valid   = 1;
        acc_subbank = 3'(s);
        acc_miss    = ($urandom_range(0, 999) < missp[s]);
        acc[s]++;
        if (acc_miss) mis[s]++;
        check("busy during interval", busy, 0);
      end
      @(negedge clk);
      acc_valid = 0;
      // reference decision
      pick = -1; best = 0; n_en = 0;
      for (int i = 0; i < N; i++) if (!ref_dis[i]) n_en++;
      for (int i = 0; i < N; i++)
        if (!ref_dis[i] && (acc[i] == 0 || 200 * mis[i] < 3 * acc[i]))
          if (pick < 0 || acc[i] < best) begin pick = i; best = acc[i]; end
      if (n_en <= 1) pick = -1;
      check("busy after interval", busy, 1);
      busy_cycles = 0;
      while (busy) begin @(negedge clk); busy_cycles++; end
      check("evaluation cycles", busy_cycles, 1);
      check("dis_pulse", dis_pulse, pick >= 0);
      if (pick >= 0) begin
        ref_dis[pick] = 1'b1;
        check("dis_id", dis_id, pick);
        n_disable++;
      end else n_none++;
      check("disabled mask", disabled, ref_dis);
      check("num_disabled", num_disabled, $countones(ref_dis));
    end
    $display("shut-offs=%0d intervals without=%0d", n_disable, n_none);
    if (n_disable == 0 || n_none == 0) begin
      failures++;
      $display("FAIL coverage: both outcomes must occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
