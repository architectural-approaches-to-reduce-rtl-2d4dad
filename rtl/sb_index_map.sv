// sb_index_map: mapping function of the subbanked resizable cache.
//
// The line index of the 64 KB direct-mapped cache is split into a subbank
// number (upper bits) and an in-subbank address (lower bits). When a subbank
// has been disabled, only its first ADS_BYTES (the "activated part of the
// disabled subbank", ADS) stay powered; every access to that subbank is folded
// into the ADS by forcing the upper MASK_W bits of the in-subbank address to
// zero. With 4 subbanks of 16 KB and a 1 KB ADS that is four bits, with
// 8 subbanks of 8 KB three bits.
//
// Purely combinational: one masking gate level on the index path.
// The ADS being the low end of the subbank (upper bits forced to zero) is
// this design's choice of which 1 KB stays on; the masking follows the method.
module sb_index_map #(
  parameter int unsigned IDX_W        = leak_pkg::IDX_W,
  parameter int unsigned NUM_SUBBANKS = 8,
  parameter int unsigned ADS_LINES    = 1024 / leak_pkg::LINE_BYTES,
  localparam int unsigned SB_W     = $clog2(NUM_SUBBANKS),
  localparam int unsigned WITHIN_W = IDX_W - SB_W,
  localparam int unsigned ADS_W    = $clog2(ADS_LINES),
  localparam int unsigned MASK_W   = WITHIN_W - ADS_W
) (
  input  logic [IDX_W-1:0]        idx,          // logical line index from the address
  input  logic [NUM_SUBBANKS-1:0] disabled,     // 1 = subbank disabled (only ADS powered)
  output logic [IDX_W-1:0]        pidx,         // physical line index actually used
  output logic [SB_W-1:0]         subbank,      // subbank addressed
  output logic [MASK_W-1:0]       upper_bits,   // in-subbank bits that masking may drop
  output logic                    folded        // access was folded into an ADS
);
  logic [WITHIN_W-1:0] in_sb;

  always_comb begin
    subbank    = idx[IDX_W-1 -: SB_W];
    in_sb     = idx[WITHIN_W-1:0];
    upper_bits = in_sb[WITHIN_W-1 -: MASK_W];
    folded     = disabled[subbank];
    if (folded) in_sb[WITHIN_W-1 -: MASK_W] = '0;
    pidx = {subbank, in_sb};
  end
endmodule
