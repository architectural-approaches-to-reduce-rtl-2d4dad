// sb_index_map_tb: checks the subbank mapping function for 8 subbanks
// (3 masked bits) and 4 subbanks (4 masked bits) of a 64 KB cache with
// 32-byte lines and a 1 KB ADS, on random indices and shut-off patterns.
// The expected index is formed arithmetically: subbank = idx / lines-per-
// subbank, offset = idx % lines-per-subbank, folded to offset % 32 when the
// subbank is shut off.
module sb_index_map_tb;
  int checks = 0, failures = 0;

  logic [10:0] idx;
  logic [7:0]  dis8;
  logic [3:0]  dis4;
  logic [10:0] p8, p4;
  logic [2:0]  s8;
  logic [1:0]  s4;
  logic [2:0]  u8;
  logic [3:0]  u4;
  logic        f8, f4;

  sb_index_map #(.IDX_W(11), .NUM_SUBBANKS(8), .ADS_LINES(32)) dut8 (
    .idx, .disabled(dis8), .pidx(p8), .subbank(s8), .upper_bits(u8), .folded(f8));
  sb_index_map #(.IDX_W(11), .NUM_SUBBANKS(4), .ADS_LINES(32)) dut4 (
    .idx, .disabled(dis4), .pidx(p4), .subbank(s4), .upper_bits(u4), .folded(f4));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: idx=%0d got %0d expected %0d", what, idx, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int sb, off, e;
      idx  = 11'($urandom);
      dis8 = 8'($urandom);
      dis4 = 4'($urandom);
      #1;
      // 8 subbanks of 256 lines
      sb = idx / 256; off = idx % 256;
      e  = dis8[sb] ? sb * 256 + off % 32 : int'(idx);
      check("pidx8", p8, e);
      check("sub8", s8, sb);
      check("upper8", u8, off / 32);
      check("fold8", f8, dis8[sb]);
      // 4 subbanks of 512 lines
      sb = idx / 512; off = idx % 512;
      e  = dis4[sb] ? sb * 512 + off % 32 : int'(idx);
      check("pidx4", p4, e);
      check("sub4", s4, sb);
      check("upper4", u4, off / 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
