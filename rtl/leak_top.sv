// leak_top: the two leakage-reducing L1 cache organisations side by side.
//
//  * sb_*  : subbanked instruction cache that shuts off lightly missing
//            subbanks, keeping a 1 KB ADS of each (sb_icache).
//  * mb_*  : cache resized by halving/doubling from the macroblock access
//            counts in the Memory Address Table, with cache bypassing
//            (mb_cache), used as the instruction cache or, with threshold
//            MB_THRESHOLD = 141, as a write-through data cache.
// The two are independent designs evaluated on the same 64 KB direct-mapped
// base; each brings out its own CPU port, its own port to the next level
// (the L2 cache, not part of this RTL) and its resizing state, which is what
// the supply gating of the cache arrays would be driven from.
module leak_top
  import leak_pkg::*;
#(
  parameter int unsigned SB_SUBBANKS  = 8,
  parameter int unsigned SB_INTERVAL  = 1_000_000,
  parameter int unsigned MB_INTERVAL  = 1_000_000,
  parameter int unsigned MB_THRESHOLD = 138
) (
  input  logic  clk,
  input  logic  rst_n,
  // subbank method
  input  logic  sb_cpu_req_valid,
  input  addr_t sb_cpu_req_addr,
  output logic  sb_cpu_req_ready,
  output logic  sb_cpu_resp_valid,
  output word_t sb_cpu_resp_data,
  output logic  sb_cpu_resp_hit,
  output logic  sb_l2_req_valid,
  output addr_t sb_l2_req_addr,
  input  logic  sb_l2_req_ready,
  input  logic  sb_l2_resp_valid,
  input  line_t sb_l2_resp_data,
  output logic [SB_SUBBANKS-1:0]        sb_disabled,
  output logic [$clog2(SB_SUBBANKS):0]  sb_num_disabled,
  output logic [IDX_W:0]                sb_active_lines,
  // macroblock method
  input  logic  mb_cpu_req_valid,
  input  addr_t mb_cpu_req_addr,
  input  logic  mb_cpu_req_we,
  input  word_t mb_cpu_req_wdata,
  output logic  mb_cpu_req_ready,
  output logic  mb_cpu_resp_valid,
  output word_t mb_cpu_resp_data,
  output logic  mb_cpu_resp_hit,
  output logic  mb_cpu_resp_bypass,
  output logic  mb_l2_req_valid,
  output addr_t mb_l2_req_addr,
  input  logic  mb_l2_req_ready,
  input  logic  mb_l2_resp_valid,
  input  line_t mb_l2_resp_data,
  output logic  mb_l2_wr_valid,
  output addr_t mb_l2_wr_addr,
  output word_t mb_l2_wr_data,
  input  logic  mb_l2_wr_ready,
  output logic [$clog2(IDX_W+1)-1:0]    mb_size_log,
  output logic [IDX_W:0]                mb_active_lines,
  output logic [15:0]                   mb_sum_matcnt,
  output logic                          mb_resizing
);
  sb_icache #(.NUM_SUBBANKS(SB_SUBBANKS), .INTERVAL(SB_INTERVAL)) u_sb (
    .clk, .rst_n,
    .cpu_req_valid(sb_cpu_req_valid), .cpu_req_addr(sb_cpu_req_addr),
    .cpu_req_ready(sb_cpu_req_ready), .cpu_resp_valid(sb_cpu_resp_valid),
    .cpu_resp_data(sb_cpu_resp_data), .cpu_resp_hit(sb_cpu_resp_hit),
    .l2_req_valid(sb_l2_req_valid), .l2_req_addr(sb_l2_req_addr),
    .l2_req_ready(sb_l2_req_ready), .l2_resp_valid(sb_l2_resp_valid),
    .l2_resp_data(sb_l2_resp_data),
    .disabled(sb_disabled), .num_disabled(sb_num_disabled), .active_lines(sb_active_lines)
  );

  mb_cache #(.INTERVAL(MB_INTERVAL), .THRESHOLD(MB_THRESHOLD)) u_mb (
    .clk, .rst_n,
    .cpu_req_valid(mb_cpu_req_valid), .cpu_req_addr(mb_cpu_req_addr),
    .cpu_req_we(mb_cpu_req_we), .cpu_req_wdata(mb_cpu_req_wdata),
    .cpu_req_ready(mb_cpu_req_ready), .cpu_resp_valid(mb_cpu_resp_valid),
    .cpu_resp_data(mb_cpu_resp_data), .cpu_resp_hit(mb_cpu_resp_hit),
    .cpu_resp_bypass(mb_cpu_resp_bypass),
    .l2_req_valid(mb_l2_req_valid), .l2_req_addr(mb_l2_req_addr),
    .l2_req_ready(mb_l2_req_ready), .l2_resp_valid(mb_l2_resp_valid),
    .l2_resp_data(mb_l2_resp_data),
    .l2_wr_valid(mb_l2_wr_valid), .l2_wr_addr(mb_l2_wr_addr),
    .l2_wr_data(mb_l2_wr_data), .l2_wr_ready(mb_l2_wr_ready),
    .size_log(mb_size_log), .active_lines(mb_active_lines),
    .sum_matcnt(mb_sum_matcnt), .resizing(mb_resizing)
  );
endmodule
