// leak_top_tb: end-to-end run of both cache organisations at once, each
// with its own CPU driver and its own behavioural L2, at shortened
// intervals (subbank method 2000 accesses, macroblock method 400 accesses,
// threshold 1200). Every returned word is checked against memory, every hit
// must answer one cycle after acceptance, the reported active sizes must
// match the resizing state, and L2 traffic must equal the misses. The run
// counts each mechanism of the two designs and fails if one never happened:
// subbank shut-off, fetches folded into an ADS, macroblock bypass,
// downsizing, upsizing and write-through stores (from the third interval on,
// one macroblock-cache access in six is a store; later loads must see it).
module leak_top_tb;
  import tb_mem_pkg::*;
  int checks = 0, failures = 0;
  int sb_hits = 0, sb_misses = 0, sb_fold = 0, sb_shutoff = 0;
  int mb_hits = 0, mb_misses = 0, mb_byp = 0, mb_down = 0, mb_up = 0, mb_stores = 0;
  logic [31:0] wmem [int unsigned];
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

  leak_top #(.SB_INTERVAL(2000), .MB_INTERVAL(400), .MB_THRESHOLD(1200)) dut (.*);

  l2_model #(.LAT(4)) sb_l2 (.clk, .rst_n, .req_valid(sb_l2_req_valid), .req_addr(sb_l2_req_addr),
    .req_ready(sb_l2_req_ready), .resp_valid(sb_l2_resp_valid), .resp_data(sb_l2_resp_data),
    .n_req(sb_nreq), .wr_valid(1'b0), .wr_addr('0), .wr_data('0), .wr_ready());
  l2_model #(.LAT(6)) mb_l2 (.clk, .rst_n, .req_valid(mb_l2_req_valid), .req_addr(mb_l2_req_addr),
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // size bookkeeping, observed on the ports
  logic [7:0] sb_dis_seen = '0;
  logic [3:0] mb_size_seen = 4'd11;
  always @(negedge clk) if (rst_n) begin
    if (sb_disabled != sb_dis_seen) begin
      check("one subbank per shut-off", $countones(sb_disabled ^ sb_dis_seen), 1);
      sb_shutoff++;
      sb_dis_seen = sb_disabled;
    end
    check("sb active lines", sb_active_lines,
          (8 - $countones(sb_disabled)) * 256 + $countones(sb_disabled) * 32);
    if (mb_size_log != mb_size_seen) begin
      if (mb_size_log == mb_size_seen - 1) mb_down++;
      else if (mb_size_log == mb_size_seen + 1) mb_up++;
      else check("size step of one", 0, 1);
      mb_size_seen = mb_size_log;
    end
    check("mb active lines", mb_active_lines, 1 << mb_size_log);
  end

  initial begin : sb_driver
    wait (rst_n);
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] a;
      int cyc;
      if (n < 8000 || $urandom_range(0, 1)) a = 32'($urandom_range(0, 1535)) * 4;
      else a = 32'($urandom_range(0, 32767)) * 4;
      @(negedge clk);
      while (!sb_cpu_req_ready) @(negedge clk);
      if (sb_disabled[a[15:13]]) sb_fold++;
      sb_cpu_req_valid = 1; sb_cpu_req_addr = a;
      @(negedge clk);
      sb_cpu_req_valid = 0;
      cyc = 1;
      while (!sb_cpu_resp_valid) begin @(negedge clk); cyc++; end
      check("sb data", sb_cpu_resp_data, mem_word(a));
      if (sb_cpu_resp_hit) begin check("sb hit latency", cyc, 1); sb_hits++; end
      else sb_misses++;
    end
    sb_done = 1;
  end

  initial begin : mb_driver
    wait (rst_n);
    for (int n = 0; n < 7200; n++) begin
      logic [31:0] a;
      int cyc, iv;
      bit st;
      logic [31:0] wd;
      iv = n / 400;
      if (iv == 0) a = 32'($urandom_range(0, 4095)) * 4096;
      else if (iv < 10 || $urandom_range(0, 1)) a = 32'($urandom_range(0, 4095)) * 4;
      else a = 32'($urandom_range(1, 15)) * 32'h10_0000 + 32'($urandom_range(0, 4095)) * 4;
      st = iv >= 2 && $urandom_range(0, 5) == 0;
      wd = $urandom;
      @(negedge clk);
      while (!mb_cpu_req_ready) @(negedge clk);
      mb_cpu_req_valid = 1; mb_cpu_req_addr = a; mb_cpu_req_we = st; mb_cpu_req_wdata = wd;
      @(negedge clk);
      mb_cpu_req_valid = 0; mb_cpu_req_we = 0;
      cyc = 1;
      while (!mb_cpu_resp_valid) begin @(negedge clk); cyc++; end
      if (st) begin
        check("mb store latency", cyc, 2);
        check("mb write-through data", mb_l2_wr_data, wd);
        wmem[{a[31:2], 2'b00}] = wd;
        mb_stores++;
        continue;
      end
      check("mb data", mb_cpu_resp_data,
            wmem.exists({a[31:2], 2'b00}) ? wmem[{a[31:2], 2'b00}] : mem_word(a));
      if (mb_cpu_resp_hit) begin check("mb hit latency", cyc, 1); mb_hits++; end
      else begin
        mb_misses++;  // load misses only: stores do not refill
        if (mb_cpu_resp_bypass) mb_byp++;
      end
    end
    mb_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sb_done && mb_done);
    repeat (2) @(negedge clk);
    check("sb L2 requests", sb_nreq, sb_misses);
    check("mb L2 requests", mb_nreq, mb_misses);
    $display("subbank: hits=%0d misses=%0d shut-offs=%0d ADS-folded fetches=%0d",
             sb_hits, sb_misses, sb_shutoff, sb_fold);
    $display("macroblock: hits=%0d misses=%0d bypasses=%0d downsizes=%0d upsizes=%0d stores=%0d",
             mb_hits, mb_misses, mb_byp, mb_down, mb_up, mb_stores);
    if (sb_shutoff == 0) begin failures++; $display("FAIL: no subbank shut-off"); end
    if (sb_fold == 0)    begin failures++; $display("FAIL: no ADS folding"); end
    if (mb_byp == 0)     begin failures++; $display("FAIL: no bypass"); end
    if (mb_down == 0)    begin failures++; $display("FAIL: no downsize"); end
    if (mb_up == 0)      begin failures++; $display("FAIL: no upsize"); end
    if (mb_stores == 0)  begin failures++; $display("FAIL: no store"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
