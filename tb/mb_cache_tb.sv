// mb_cache_tb: runs the macroblock-method cache (interval shortened to 400
// accesses, threshold raised to 1200 so that both resize directions occur in
// a short run) against the behavioural L2 model, with a complete reference
// model kept here: cache contents per physical line, the 1024-entry MAT with
// its counters, the bypass rule (2*ctr1 < ctr2 for f = 1/2), the interval
// sum and the size steps. Every fetch is checked for data, hit or miss,
// bypass and hit latency; after every interval the new size, sum_MATcnt and
// the length of the resize stall (1 + 1024 + 1 cycles) are checked.
// Workload: a sparse first interval (the cache halves), a hot 16 KB loop
// (counters climb until the cache doubles again), then a stream of blocks
// that share MAT slots and cache lines with the loop (bypasses, and the
// sum falls again). From the third interval on, one access in six is a
// store: it must write through, update a hit line, answer two cycles after
// acceptance and drop the copies of its line at smaller sizes' indices;
// later loads must return the stored data.
module mb_cache_tb;
  import tb_mem_pkg::*;
  localparam int IV = 400;
  localparam int TH = 1200;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_byp = 0, n_down = 0, n_up = 0;
  int n_st_hit = 0, n_st_miss = 0, n_drop = 0, n_wr = 0;

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0;
  logic [31:0] cpu_req_addr = 0;
  logic cpu_req_we = 0;
  logic [31:0] cpu_req_wdata = 0;
  logic l2_wr_valid, l2_wr_ready;
  logic [31:0] l2_wr_addr, l2_wr_data;
  logic cpu_req_ready, cpu_resp_valid, cpu_resp_hit, cpu_resp_bypass;
  logic [31:0] cpu_resp_data;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [31:0] l2_req_addr;
  logic [255:0] l2_resp_data;
  logic [3:0] size_log;
  logic [11:0] active_lines;
  logic [15:0] sum_matcnt;
  logic resizing;
  int unsigned n_req;

  mb_cache #(.INTERVAL(IV), .THRESHOLD(TH)) dut (.*);
  l2_model #(.LAT(4)) l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_addr(l2_req_addr),
    .req_ready(l2_req_ready), .resp_valid(l2_resp_valid), .resp_data(l2_resp_data), .n_req,
    .wr_valid(l2_wr_valid), .wr_addr(l2_wr_addr), .wr_data(l2_wr_data), .wr_ready(l2_wr_ready));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit rvalid[2048];
  int rline[2048];
  bit mv[1024];
  int mt[1024], mc[1024];
  int size = 11;
  logic [31:0] wmem [int unsigned];

  function automatic logic [31:0] expect_word(logic [31:0] a);
    int unsigned w;
    w = {a[31:2], 2'b00};
    return wmem.exists(w) ? wmem[w] : mem_word(a);
  endfunction

  always @(negedge clk) if (l2_wr_valid && l2_wr_ready) n_wr++;

  function automatic logic [31:0] gen(int iv);
    if (iv == 0) return 32'($urandom_range(0, 4095)) * 4096;                 // sparse
    if (iv < 10 || $urandom_range(0, 1)) return 32'($urandom_range(0, 4095)) * 4;  // 16 KB loop
    return 32'($urandom_range(1, 15)) * 32'h10_0000 + 32'($urandom_range(0, 4095)) * 4;
  endfunction

  initial begin
    foreach (rvalid[i]) rvalid[i] = 0;
    foreach (mv[i]) begin mv[i] = 0; mc[i] = 0; mt[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int iv = 0; iv < 18; iv++) begin
      int sum, stall;
      for (int n = 0; n < IV; n++) begin
        logic [31:0] a;
        int line, p, amb, ai, at, vmb, vi, vt, c1, c2, cyc;
        bit hit, af, vf, byp, st;
        logic [31:0] wd;
        a = gen(iv);
        st = iv >= 2 && $urandom_range(0, 5) == 0;
        wd = $urandom;
        @(negedge clk);
        while (!cpu_req_ready) @(negedge clk);
        line = int'(a >> 5);
        p = (line % 2048) % (1 << size);
        hit = rvalid[p] && rline[p] == line;
        amb = int'(a >> 10); ai = amb % 1024; at = (amb / 1024) % 4096;
        af = mv[ai] && mt[ai] == at;
        c1 = af ? (mc[ai] < 255 ? mc[ai] + 1 : 255) : 1;
        vmb = rline[p] / 32; vi = vmb % 1024; vt = (vmb / 1024) % 4096;
        vf = !st && !hit && rvalid[p] && mv[vi] && mt[vi] == vt && vi != ai;
        c2 = mc[vi] > 0 ? mc[vi] - 1 : 0;
        byp = vf && (2 * c1 < c2);
        mv[ai] = 1; mt[ai] = at; mc[ai] = c1;
        if (vf) mc[vi] = c2;
        cpu_req_valid = 1; cpu_req_addr = a; cpu_req_we = st; cpu_req_wdata = wd;
        @(negedge clk);
        cpu_req_valid = 0; cpu_req_we = 0;
        cyc = 1;
        while (!cpu_resp_valid) begin @(negedge clk); cyc++; end
        check("hit/miss", cpu_resp_hit, hit);
        if (st) begin
          check("store latency", cyc, 2);
          check("store never bypasses", cpu_resp_bypass, 0);
          check("write-through address", l2_wr_addr, {a[31:2], 2'b00});
          check("write-through data", l2_wr_data, wd);
          wmem[{a[31:2], 2'b00}] = wd;
          if (hit) n_st_hit++; else n_st_miss++;
          for (int k = 7; k < size; k++) begin
            int pk;
            pk = (line % 2048) % (1 << k);
            if (pk != p) begin
              if (rvalid[pk]) n_drop++;
              rvalid[pk] = 0;
            end
          end
          continue;
        end
        check("data", cpu_resp_data, expect_word(a));
        if (hit) begin
          check("hit latency", cyc, 1);
          n_hit++;
        end else begin
          check("bypass", cpu_resp_bypass, byp);
          n_miss++;
          if (byp) n_byp++;
          else begin rvalid[p] = 1; rline[p] = line; end
        end
      end
      // interval end: reference sum and decision
      sum = 0;
      foreach (mv[i]) if (mv[i]) sum += mc[i];
      if (sum > 65535) sum = 65535;
      if (sum < TH) begin
        if (size > 7) begin
          size--; n_down++;
          for (int i = 0; i < 2048; i++) if (i >= (1 << size)) rvalid[i] = 0;
        end
      end else if (size < 11) begin size++; n_up++; end
      stall = 0;
      @(negedge clk);
      while (!cpu_req_ready) begin @(negedge clk); stall++; end
      check("resize stall cycles", stall, 1026);
      check("sum_MATcnt", sum_matcnt, sum);
      check("size", size_log, size);
      check("active lines", active_lines, 1 << size);
    end
    check("L2 requests = load misses", n_req, n_miss);
    check("write-throughs = stores", n_wr, n_st_hit + n_st_miss);
    $display("hits=%0d misses=%0d bypasses=%0d downsizes=%0d upsizes=%0d",
             n_hit, n_miss, n_byp, n_down, n_up);
    $display("store hits=%0d store misses=%0d copies dropped=%0d", n_st_hit, n_st_miss, n_drop);
    if (n_byp == 0 || n_down == 0 || n_up == 0 || n_st_hit == 0 || n_st_miss == 0 || n_drop == 0) begin
      failures++;
      $display("FAIL coverage: bypass, downsize, upsize, store hit/miss and copy drop must all occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
