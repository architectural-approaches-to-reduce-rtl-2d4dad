// leak_top_full_tb: the top at its default parameters (64 KB caches, 8
// subbanks, one-million-access intervals, MAT threshold 138), taken through
// one complete resizing interval on each design.
//  * Subbank cache: one million fetches from a 6 KB loop, all in subbank 0.
//    The seven untouched subbanks have no misses; the least accessed one,
//    subbank 1, must be shut off, the active size must fall from 2048 to
//    1824 lines (57 KB), and later fetches to subbank 1 must be served from
//    its ADS.
//  * Macroblock cache: one million fetches that walk 15 macroblocks 1 MB
//    apart; all share MAT slot 0 with a new tag each time, so the table ends
//    the interval with one entry of count 1: sum_MATcnt = 1 < 138 and the
//    cache must halve to 1024 lines after a 1026-cycle resize stall.
// Every word returned is checked against memory.
module leak_top_full_tb;
  import tb_mem_pkg::*;
  localparam int N = 1_000_000;
  int checks = 0, failures = 0;
  int sb_fold_hits = 0, mb_stall = 0;
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

  l2_model #(.LAT(4)) sb_l2 (.clk, .rst_n, .req_valid(sb_l2_req_valid), .req_addr(sb_l2_req_addr),
    .req_ready(sb_l2_req_ready), .resp_valid(sb_l2_resp_valid), .resp_data(sb_l2_resp_data),
    .n_req(sb_nreq), .wr_valid(1'b0), .wr_addr('0), .wr_data('0), .wr_ready());
  l2_model #(.LAT(4)) mb_l2 (.clk, .rst_n, .req_valid(mb_l2_req_valid), .req_addr(mb_l2_req_addr),
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
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (mb_resizing) mb_stall++;

  task automatic sb_fetch(logic [31:0] a, output bit hit);
    @(negedge clk);
    while (!sb_cpu_req_ready) @(negedge clk);
    sb_cpu_req_valid = 1; sb_cpu_req_addr = a;
    @(negedge clk);
    sb_cpu_req_valid = 0;
    while (!sb_cpu_resp_valid) @(negedge clk);
    check("sb data", sb_cpu_resp_data, mem_word(a));
    hit = sb_cpu_resp_hit;
  endtask

  task automatic mb_fetch(logic [31:0] a);
    @(negedge clk);
    while (!mb_cpu_req_ready) @(negedge clk);
    mb_cpu_req_valid = 1; mb_cpu_req_addr = a;
    @(negedge clk);
    mb_cpu_req_valid = 0;
    while (!mb_cpu_resp_valid) @(negedge clk);
    check("mb data", mb_cpu_resp_data, mem_word(a));
  endtask

  initial begin : sb_driver
    bit h;
    wait (rst_n);
    for (int n = 0; n < N; n++) sb_fetch(32'(n % 1536) * 4, h);
    repeat (3) @(negedge clk);
    check("sb shut-off of subbank 1", sb_disabled, 8'b0000_0010);
    check("sb active lines (57 KB)", sb_active_lines, 1824);
    // subbank 1 starts at 8 KB; two addresses 1 KB apart share its ADS line
    sb_fetch(32'h0000_2040, h);
    check("sb ADS first fetch misses", h, 0);
    sb_fetch(32'h0000_2044, h);
    check("sb ADS refetch hits", h, 1);
    sb_fetch(32'h0000_2440, h);
    check("sb folded conflict misses", h, 0);
    sb_fetch(32'h0000_2444, h);
    check("sb folded line hits", h, 1);
    sb_done = 1;
  end

  initial begin : mb_driver
    wait (rst_n);
    for (int n = 0; n < N; n++)
      mb_fetch(32'(n % 15 + 1) * 32'h10_0000 + 32'(n % 256) * 4);
    @(negedge clk);
    while (!mb_cpu_req_ready) @(negedge clk);
    check("mb sum_MATcnt", mb_sum_matcnt, 1);
    check("mb halved", mb_size_log, 10);
    check("mb active lines", mb_active_lines, 1024);
    check("mb resize stall", mb_stall, 1026);
    mb_fetch(32'h0000_0000);
    mb_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sb_done && mb_done);
    $display("subbank: L2 refills=%0d  macroblock: L2 refills=%0d", sb_nreq, mb_nreq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
