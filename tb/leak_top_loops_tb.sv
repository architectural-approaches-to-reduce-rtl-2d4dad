// leak_top_loops_tb: a synthetic instruction-fetch workload run through both
// caches at their default parameters (64 KB, 8 subbanks, one-million-fetch
// intervals, MAT threshold 138). The same stream goes to both caches: four
// program phases, each a loop executed sequentially word by word:
//   A  1.2 M fetches of a  4 KB loop at 0x0_0000
//   B  1.2 M fetches of a 20 KB loop at 0x1_0000
//   C  1.2 M fetches of a 40 KB loop at 0x2_0000
//   D  0.6 M fetches of an 8 KB loop at 0x4_0000
// Every word is checked against memory, refills must equal misses, and the
// reported active sizes must match the resizing state at every cycle. The
// run prints, per cache, the miss rate, the number of resizing steps and the
// fetch-weighted average active fraction, the figure of merit of both
// methods. It is a stand-in for real program traces, not a benchmark.
module leak_top_loops_tb;
  import tb_mem_pkg::*;
  int checks = 0, failures = 0;
  longint sb_act = 0, mb_act = 0;
  int sb_miss = 0, mb_miss = 0, sb_steps = 0, mb_steps = 0, fetches = 0;
  bit sb_done = 0, mb_done = 0;

  logic clk = 0, rst_n = 0;
  logic sb_cpu_req_valid = 0, mb_cpu_req_valid = 0;
  logic [31:0] sb_cpu_req_addr = 0, mb_cpu_req_addr = 0;
  logic sb_cpu_req_ready, sb_cpu_resp_valid, sb_cpu_resp_hit;
  logic mb_cpu_req_ready, mb_cpu_resp_valid, mb_cpu_resp_hit, mb_cpu_resp_bypass;
  logic [31:0] sb_cpu_resp_data, mb_cpu_resp_data;
  logic sb_l2_req_valid, sb_l2_req_ready, sb_l2_resp_valid;
  logic mb_l2_req_valid, mb_l2_req_ready, mb_l2_resp_valid;
  logic [31:0] sb_l2_req_addr, mb_l2_req_addr;
  logic [255:0] sb_l2_resp_data, mb_l2_resp_data;
  logic [7:0] sb_disabled;
  logic [3:0] sb_num_disabled, mb_size_log;
  logic [11:0] sb_active_lines, mb_active_lines;
  logic [15:0] mb_sum_matcnt;
  logic mb_resizing;
  logic mb_cpu_req_we = 0;
  logic [31:0] mb_cpu_req_wdata = 0;
  logic mb_l2_wr_valid, mb_l2_wr_ready;
  logic [31:0] mb_l2_wr_addr, mb_l2_wr_data;
  int unsigned sb_nreq, mb_nreq;

  leak_top dut (.*);

  l2_model #(.LAT(10)) sb_l2 (.clk, .rst_n, .req_valid(sb_l2_req_valid), .req_addr(sb_l2_req_addr),
    .req_ready(sb_l2_req_ready), .resp_valid(sb_l2_resp_valid), .resp_data(sb_l2_resp_data),
    .n_req(sb_nreq), .wr_valid(1'b0), .wr_addr('0), .wr_data('0), .wr_ready());
  l2_model #(.LAT(10)) mb_l2 (.clk, .rst_n, .req_valid(mb_l2_req_valid), .req_addr(mb_l2_req_addr),
    .req_ready(mb_l2_req_ready), .resp_valid(mb_l2_resp_valid), .resp_data(mb_l2_resp_data),
    .n_req(mb_nreq), .wr_valid(mb_l2_wr_valid), .wr_addr(mb_l2_wr_addr),
    .wr_data(mb_l2_wr_data), .wr_ready(mb_l2_wr_ready));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] sb_seen = '0;
  logic [3:0] mb_seen = 4'd11;
  always @(negedge clk) if (rst_n) begin
    if (sb_disabled != sb_seen) begin sb_steps++; sb_seen = sb_disabled; end
    if (mb_size_log != mb_seen) begin mb_steps++; mb_seen = mb_size_log; end
    check("sb active lines", sb_active_lines,
          (8 - $countones(sb_disabled)) * 256 + $countones(sb_disabled) * 32);
    check("mb active lines", mb_active_lines, 1 << mb_size_log);
  end

  // n-th fetch of the workload
  function automatic logic [31:0] fetch_addr(int n);
    if (n < 1_200_000) return 32'h0_0000 + 32'(n % 1024) * 4;
    if (n < 2_400_000) return 32'h1_0000 + 32'(n % 5120) * 4;
    if (n < 3_600_000) return 32'h2_0000 + 32'(n % 10240) * 4;
    return 32'h4_0000 + 32'(n % 2048) * 4;
  endfunction
  localparam int TOTAL = 4_200_000;

  initial begin : sb_driver
    wait (rst_n);
    for (int n = 0; n < TOTAL; n++) begin
      logic [31:0] a;
      a = fetch_addr(n);
      @(negedge clk);
      while (!sb_cpu_req_ready) @(negedge clk);
      sb_act += sb_active_lines;
      sb_cpu_req_valid = 1; sb_cpu_req_addr = a;
      @(negedge clk);
      sb_cpu_req_valid = 0;
      while (!sb_cpu_resp_valid) @(negedge clk);
      check("sb data", sb_cpu_resp_data, mem_word(a));
      if (!sb_cpu_resp_hit) sb_miss++;
    end
    sb_done = 1;
  end

  initial begin : mb_driver
    wait (rst_n);
    for (int n = 0; n < TOTAL; n++) begin
      logic [31:0] a;
      a = fetch_addr(n);
      @(negedge clk);
      while (!mb_cpu_req_ready) @(negedge clk);
      mb_act += mb_active_lines;
      mb_cpu_req_valid = 1; mb_cpu_req_addr = a;
      @(negedge clk);
      mb_cpu_req_valid = 0;
      while (!mb_cpu_resp_valid) @(negedge clk);
      check("mb data", mb_cpu_resp_data, mem_word(a));
      if (!mb_cpu_resp_hit) mb_miss++;
    end
    mb_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sb_done && mb_done);
    repeat (2) @(negedge clk);
    check("sb refills = misses", sb_nreq, sb_miss);
    check("mb refills = misses", mb_nreq, mb_miss);
    $display("subbank   : misses=%0d (%0.4f%%) shut-offs=%0d average active=%0.3f",
             sb_miss, 100.0 * sb_miss / TOTAL, sb_steps, real'(sb_act) / TOTAL / 2048.0);
    $display("macroblock: misses=%0d (%0.4f%%) size steps=%0d average active=%0.3f last sum_MATcnt=%0d",
             mb_miss, 100.0 * mb_miss / TOTAL, mb_steps, real'(mb_act) / TOTAL / 2048.0, mb_sum_matcnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
