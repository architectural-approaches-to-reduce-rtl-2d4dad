// mb_resize_ctrl_tb: the resize controller walks a table of counters held in
// this testbench. Each round fills the table with a chosen pattern, starts an
// interval evaluation and checks the busy time (1024 + 1 cycles), the 16-bit
// saturating sum, and the size step: below 138 halves (down to 2**7 lines),
// 138 or more doubles (up to 2**11 lines), with the index mask following.
// Rounds cover the threshold boundary, both size limits and saturation.
module mb_resize_ctrl_tb;
  int checks = 0, failures = 0;
  int n_down = 0, n_up = 0, n_hold = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, down_pulse, up_pulse;
  logic [9:0] sum_idx;
  logic sum_valid;
  logic [7:0] sum_ctr;
  logic [15:0] sum_matcnt;
  logic [3:0] size_log;
  logic [10:0] index_mask;

  mb_resize_ctrl dut (.*);

  bit tv[1024];
  int tc[1024];
  assign sum_valid = tv[sum_idx];
  assign sum_ctr   = 8'(tc[sum_idx]);

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

  int size = 11;

  // pattern: target sum spread over random entries; invalid entries carry junk
  task automatic round(int target, bit all_full);
    int s, cyc, exp_sum, exp_size;
    foreach (tv[i]) begin tv[i] = 0; tc[i] = $urandom_range(0, 255); end
    if (all_full) foreach (tv[i]) begin tv[i] = 1; tc[i] = 255; end
    else begin
      s = target;
      while (s > 0) begin
        int i, c;
        i = $urandom_range(0, 1023);
        if (!tv[i]) begin
          c = s > 255 ? $urandom_range(1, 255) : s;
          tv[i] = 1; tc[i] = c; s -= c;
        end
      end
    end
    exp_sum = 0;
    foreach (tv[i]) if (tv[i]) exp_sum += tc[i];
    if (exp_sum > 65535) exp_sum = 65535;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (busy) begin
      check("no pulse while summing", down_pulse | up_pulse, 0);
      @(negedge clk); cyc++;
    end
    check("busy cycles", cyc, 1025);
    check("sum_MATcnt", sum_matcnt, exp_sum);
    exp_size = size;
    if (exp_sum < 138) begin if (size > 7) exp_size = size - 1; end
    else if (size < 11) exp_size = size + 1;
    check("down pulse", down_pulse, exp_size < size);
    check("up pulse", up_pulse, exp_size > size);
    if (exp_size < size) n_down++; else if (exp_size > size) n_up++; else n_hold++;
    size = exp_size;
    check("size_log", size_log, size);
    check("index mask", index_mask, (1 << size) - 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset size", size_log, 11);
    round(0, 0);       // 11 -> 10
    round(137, 0);     // -> 9
    round(138, 0);     // -> 10
    round(5, 0);       // -> 9
    round(100, 0);     // -> 8
    round(60, 0);      // -> 7
    round(0, 0);       // stays 7
    round(5000, 0);    // -> 8
    round(0, 1);       // saturating sum, -> 9
    round(139, 0);     // -> 10
    round(30000, 0);   // -> 11
    round(200, 0);     // stays 11
    for (int k = 0; k < 10; k++) round($urandom_range(0, 300), 0);
    if (n_down == 0 || n_up == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
