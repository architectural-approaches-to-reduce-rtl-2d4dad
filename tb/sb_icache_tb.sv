// sb_icache_tb: runs the subbanked cache (NSB = 8 subbanks, 64 KB, interval
// shortened to 2000 accesses) against the behavioural L2 model.
// Phase A fetches from a small hot loop so that untouched subbanks get
// shut off; phase B mixes the loop with random fetches over 128 KB, which
// also hit the shut-off subbanks and must be folded into their 1 KB ADS.
// A reference model kept here (its own index arithmetic, line addresses per
// physical line) predicts hit or miss for every fetch; data are checked
// against the memory contents, hits must answer one cycle after acceptance,
// the active size must follow the number of shut-off subbanks, and the
// gated lines must be forgotten.
module sb_icache_tb;
  import tb_mem_pkg::*;
  localparam int IV = 2000;
  localparam int NSB = 8;             // subbanks
  localparam int SBL = 2048 / NSB;    // lines per subbank
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_fold_hit = 0, n_fold_miss = 0, n_dis = 0;

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0;
  logic [31:0] cpu_req_addr = 0;
  logic cpu_req_ready, cpu_resp_valid, cpu_resp_hit;
  logic [31:0] cpu_resp_data;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [31:0] l2_req_addr;
  logic [255:0] l2_resp_data;
  logic [NSB-1:0] disabled;
  logic [$clog2(NSB):0] num_disabled;
  logic [11:0] active_lines;
  int unsigned n_req;

  sb_icache #(.NUM_SUBBANKS(NSB), .INTERVAL(IV)) dut (.*);
  l2_model #(.LAT(4)) l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_addr(l2_req_addr),
    .req_ready(l2_req_ready), .resp_valid(l2_resp_valid), .resp_data(l2_resp_data), .n_req,
    .wr_valid(1'b0), .wr_addr('0), .wr_data('0), .wr_ready());

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

  bit        ref_valid [2048];
  int        ref_line  [2048];
  bit [NSB-1:0] ref_dis;

  function automatic int map(int line, output bit folded);
    int idx, sb, off;
    idx = line % 2048; sb = idx / SBL; off = idx % SBL;
    folded = ref_dis[sb];
    if (folded) off = off % 32;
    return sb * SBL + off;
  endfunction


  task automatic tick();
    @(negedge clk);
    if (disabled != ref_dis) begin
      check("one subbank shut off at a time", $countones(disabled ^ ref_dis), 1);
      check("shut-off only adds", (disabled & ref_dis) == ref_dis, 1);
      for (int sb = 0; sb < NSB; sb++)
        if (disabled[sb] && !ref_dis[sb]) begin
          ref_dis[sb] = 1'b1;
          n_dis++;
          for (int i = 32; i < SBL; i++) ref_valid[sb * SBL + i] = 0;
        end
    end
  endtask

  initial begin
    ref_dis = '0;
    foreach (ref_valid[i]) ref_valid[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 10 * IV; n++) begin
      logic [31:0] a;
      int line, p, cyc;
      bit folded, exp_hit;
      if (n < 4 * IV || $urandom_range(0, 1)) a = 32'($urandom_range(0, 1535)) * 4;  // 6 KB loop
      else a = 32'($urandom_range(0, 32767)) * 4;                                    // 128 KB
      tick();
      while (!cpu_req_ready) tick();
      line = int'(a >> 5);
      p = map(line, folded);
      exp_hit = ref_valid[p] && ref_line[p] == line;
      cpu_req_valid = 1; cpu_req_addr = a;
      tick();
      cpu_req_valid = 0;
      cyc = 1;
      while (!cpu_resp_valid) begin tick(); cyc++; end
      check("hit/miss", cpu_resp_hit, exp_hit);
      check("data", cpu_resp_data, mem_word(a));
      if (exp_hit) begin
        check("hit latency", cyc, 1);
        n_hit++; if (folded) n_fold_hit++;
      end else begin
        n_miss++; if (folded) n_fold_miss++;
        ref_valid[p] = 1; ref_line[p] = line;
      end
    end
    tick(); tick(); tick();
    check("disabled mask", disabled, ref_dis);
    check("num_disabled", num_disabled, $countones(ref_dis));
    check("active lines", active_lines,
          (NSB - $countones(ref_dis)) * SBL + $countones(ref_dis) * 32);
    check("L2 requests = misses", n_req, n_miss);
    $display("hits=%0d misses=%0d folded hits=%0d folded misses=%0d shut-offs=%0d",
             n_hit, n_miss, n_fold_hit, n_fold_miss, n_dis);
    if (n_dis == 0 || n_fold_hit == 0 || n_fold_miss == 0) begin
      failures++;
      $display("FAIL coverage: shut-off and ADS folding must both occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
