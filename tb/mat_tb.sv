// mat_tb: random operations on the 1024-entry Memory Address Table, compared
// every cycle with a reference table kept here. Addresses come from a small
// pool of macroblocks, several of which share a table slot, so that entry
// hits, new entries over old ones, victim decrements and bypass decisions
// (2*ctr1 < ctr2 for f = 1/2) all occur; a directed phase drives one
// macroblock's counter into saturation at 255 and another's to 0.
// The summation port is checked at a random index every cycle.
module mat_tb;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_keep = 0, n_alloc = 0, n_sat = 0, n_zero = 0;

  logic clk = 0, rst_n = 0;
  logic op_valid = 0, miss = 0, victim_valid = 0;
  logic [31:0] acc_addr = 0, victim_addr = 0;
  logic bypass, victim_found, sum_valid;
  logic [7:0] ctr1, ctr2, sum_ctr;
  logic [9:0] sum_idx = 0;

  mat dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit rv[1024];
  int rt[1024], rc[1024];
  int pool[24];

  // drive one operation at the negedge, check, then commit at the posedge
  task automatic op(bit ov, int amb, bit m, bit vv, int vmb);
    int ai, at, vi, vt, c1, c2, sidx;
    bit af, vf, byp;
    @(negedge clk);
    op_valid = ov; miss = m; victim_valid = vv;
    acc_addr = 32'(amb) * 1024 + 32'($urandom_range(0, 1023));
    victim_addr = 32'(vmb) * 1024 + 32'($urandom_range(0, 1023));
    sidx = $urandom_range(0, 1023); sum_idx = 10'(sidx);
    #1;
    ai = amb % 1024; at = amb / 1024; vi = vmb % 1024; vt = vmb / 1024;
    af = rv[ai] && rt[ai] == at;
    c1 = af ? (rc[ai] < 255 ? rc[ai] + 1 : 255) : 1;
    vf = m && vv && rv[vi] && rt[vi] == vt && vi != ai;
    c2 = rc[vi] > 0 ? rc[vi] - 1 : 0;
    byp = vf && (2 * c1 < c2);
    check("ctr1", ctr1, c1);
    check("victim_found", victim_found, vf);
    if (vf) check("ctr2", ctr2, c2);
    check("bypass", bypass, byp);
    check("sum_valid", sum_valid, rv[sidx]);
    if (rv[sidx]) check("sum_ctr", sum_ctr, rc[sidx]);
    if (ov) begin
      if (!af) n_alloc++;
      if (af && rc[ai] == 255) n_sat++;
      rv[ai] = 1; rt[ai] = at; rc[ai] = c1;
      if (vf) begin
        if (rc[vi] == 0) n_zero++;
        rc[vi] = c2;
        if (byp) n_bypass++; else n_keep++;
      end
    end
  endtask

  initial begin
    foreach (rv[i]) begin rv[i] = 0; rt[i] = 0; rc[i] = 0; end
    // macroblock numbers: slots 0..7 with up to three different tags each
    foreach (pool[i]) pool[i] = ((i % 3) * 1024) + (i % 8) + ((i / 8) * 8 % 3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // saturate one counter, then hammer a victim down to zero
    for (int k = 0; k < 300; k++) op(1, 5, 0, 0, 0);
    for (int k = 0; k < 300; k++) op(1, 7, 1, 1, 5);
    for (int k = 0; k < 20000; k++)
      op($urandom_range(0, 9) != 0, pool[$urandom_range(0, 23)], $urandom_range(0, 1),
         $urandom_range(0, 3) != 0, pool[$urandom_range(0, 23)]);
    $display("bypass=%0d keep=%0d new entries=%0d saturated=%0d floor=%0d",
             n_bypass, n_keep, n_alloc, n_sat, n_zero);
    if (n_bypass == 0 || n_keep == 0 || n_alloc == 0 || n_sat == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
