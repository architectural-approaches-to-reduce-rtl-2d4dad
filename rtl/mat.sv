// mat: Memory Address Table of the macroblock access-pattern method.
//
// Memory is divided into macroblocks of MB_BYTES (1 KB). The table is direct
// mapped with ENTRIES (1024) entries, each holding a valid bit, a TAG_W (12)
// bit tag and a CTR_W (8) bit saturating spatial counter. The low bits of the
// macroblock number index the table, the next TAG_W bits are the tag, which
// with the defaults covers a 32-bit address exactly.
//
// One operation per cycle (op_valid), made by the cache while it looks up the
// accessed line:
//  * The accessed macroblock's counter is incremented if its entry is present,
//    otherwise a new entry is created with counter INIT_CTR.
//  * On a cache miss with a valid victim line, the victim's macroblock entry
//    (if present) has its counter decremented (ctr2--), and the fill is to
//    bypass the cache when ctr1 < f * ctr2, ctr1 being the missing
//    macroblock's counter after this access. f = F_NUM / 2**F_SHIFT.
//  The bypass flag and both counter values are combinational outputs of the
//  same cycle; the table is updated at the clock edge.
// A second, read-only port (sum_idx) lets the resize controller walk all
// entries to form sum_MATcnt.
//
// Follows the method: sizes of table, tag and counter, increment on access,
// new entry when none is found, decrement of the victim counter and the
// comparison ctr1 < f*ctr2. This design's own: direct mapping of the table,
// INIT_CTR = 1, f = 1/2, saturation at both ends, and no bypass when the
// missing and victim blocks share a table slot (the access then owns it).
module mat #(
  parameter int unsigned ENTRIES  = 1024,
  parameter int unsigned TAG_W    = 12,
  parameter int unsigned CTR_W    = 8,
  parameter int unsigned MB_BYTES = 1024,
  parameter int unsigned F_NUM    = 8,
  parameter int unsigned F_SHIFT  = 4,
  parameter int unsigned INIT_CTR = 1,
  localparam int unsigned IW  = $clog2(ENTRIES),
  localparam int unsigned MBO = $clog2(MB_BYTES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 op_valid,
  input  leak_pkg::addr_t      acc_addr,      // address of this access
  input  logic                 miss,          // the access missed in the cache
  input  logic                 victim_valid,  // the line to be replaced holds data
  input  leak_pkg::addr_t      victim_addr,   // address of the line to be replaced
  output logic                 bypass,        // the fill should bypass the cache
  output logic [CTR_W-1:0]     ctr1,          // accessed macroblock counter (after update)
  output logic [CTR_W-1:0]     ctr2,          // victim counter after decrement
  output logic                 victim_found,  // victim macroblock was in the table
  input  logic [IW-1:0]        sum_idx,       // summation read port
  output logic                 sum_valid,
  output logic [CTR_W-1:0]     sum_ctr
);
  logic [ENTRIES-1:0] v;
  logic [TAG_W-1:0]   tag [ENTRIES];
  logic [CTR_W-1:0]   ctr [ENTRIES];

  logic [IW-1:0]    a_idx, v_idx;
  logic [TAG_W-1:0] a_tag, v_tag;
  logic             a_found, same_slot, do_dec;

  localparam logic [CTR_W-1:0] CTR_MAX = '1;

  always_comb begin
    a_idx   = acc_addr[MBO +: IW];
    a_tag   = acc_addr[MBO + IW +: TAG_W];
    v_idx   = victim_addr[MBO +: IW];
    v_tag   = victim_addr[MBO + IW +: TAG_W];
    a_found = v[a_idx] && tag[a_idx] == a_tag;
    ctr1    = a_found ? (ctr[a_idx] == CTR_MAX ? CTR_MAX : ctr[a_idx] + 1'b1)
                      : CTR_W'(INIT_CTR);
    same_slot    = (v_idx == a_idx);
    victim_found = miss && victim_valid && v[v_idx] && tag[v_idx] == v_tag && !same_slot;
    ctr2         = (ctr[v_idx] == '0) ? '0 : ctr[v_idx] - 1'b1;
    do_dec       = op_valid && victim_found;
    bypass       = victim_found &&
                   ((32'(ctr1) << F_SHIFT) < 32'(F_NUM) * 32'(ctr2));
    sum_valid    = v[sum_idx];
    sum_ctr      = ctr[sum_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else if (op_valid) v[a_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (op_valid) begin
      tag[a_idx] <= a_tag;
      ctr[a_idx] <= ctr1;
      if (do_dec) ctr[v_idx] <= ctr2;
    end
  end
endmodule
