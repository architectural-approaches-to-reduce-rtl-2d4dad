// sb_icache: subbanked, dynamically resizable direct-mapped instruction cache.
//
// The 64 KB cache is built from NUM_SUBBANKS equal subbanks selected by the
// upper bits of the line index. sb_monitor watches the miss rate of each
// subbank over intervals of one million accesses and shuts off the least
// accessed subbank once its miss rate is below 1.5 %. A shut-off subbank keeps
// its first 1 KB (the ADS) powered; sb_index_map folds every later access to
// that subbank into the ADS by masking the upper in-subbank index bits. Since
// a folded line can hold any of several addresses, the bits that masking can
// drop are kept in the tag ("upper_bits"), so the tag is
// ADDR_W - OFF_W - IDX_W + MASK_W bits wide.
//
// Interface: CPU reads with a valid/ready request and a one-cycle response
// pulse; refills from the next level with a valid/ready line request and a
// one-beat line response. Timing: request accepted in cycle 0, arrays read
// synchronously, hit answered in cycle 1; a miss issues the refill in cycle 2
// and answers in the cycle the line arrives. While the monitor evaluates an
// interval (one cycle) no request is accepted. On shut-off the lines outside
// the ADS are invalidated: gated cells lose their contents.
//
// Follows the method: subbanking, the ADS and its size, the masking mapping
// function, the monitor policy. This design's own: line size, handshakes,
// the single-beat refill, invalidation on shut-off, and the active_lines
// output that the supply gating of each subbank section would use.
module sb_icache
  import leak_pkg::*;
#(
  parameter int unsigned NUM_SUBBANKS = 8,
  parameter int unsigned ADS_BYTES    = 1024,
  parameter int unsigned INTERVAL     = 1_000_000,
  parameter int unsigned THR_NUM      = 15,
  parameter int unsigned THR_DEN      = 1000,
  localparam int unsigned SB_W      = $clog2(NUM_SUBBANKS),
  localparam int unsigned SB_LINES  = NUM_LINES / NUM_SUBBANKS,
  localparam int unsigned ADS_LINES = ADS_BYTES / LINE_BYTES,
  localparam int unsigned MASK_W    = $clog2(SB_LINES) - $clog2(ADS_LINES),
  localparam int unsigned TAG_W     = ADDR_W - OFF_W - IDX_W + MASK_W
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU instruction fetch
  input  logic        cpu_req_valid,
  input  addr_t       cpu_req_addr,
  output logic        cpu_req_ready,
  output logic        cpu_resp_valid,
  output word_t       cpu_resp_data,
  output logic        cpu_resp_hit,
  // next level (L2)
  output logic        l2_req_valid,
  output addr_t       l2_req_addr,
  input  logic        l2_req_ready,
  input  logic        l2_resp_valid,
  input  line_t       l2_resp_data,
  // resizing state
  output logic [NUM_SUBBANKS-1:0] disabled,
  output logic [SB_W:0]           num_disabled,
  output logic [IDX_W:0]          active_lines
);
  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_MISS, S_WAIT} state_e;
  state_e state;

  line_t            data_mem [NUM_LINES];
  logic [TAG_W-1:0] tag_mem  [NUM_LINES];
  logic [NUM_LINES-1:0] valid;

  addr_t            addr_q;
  line_t            data_q;
  logic [TAG_W-1:0] tag_q;
  logic             valid_q;

  logic [IDX_W-1:0] pidx_in, pidx_q;
  logic [SB_W-1:0]  sb_in, sb_q;
  logic [MASK_W-1:0] up_in;
  logic [TAG_W-1:0]  stag_in, stag_q;

  logic             mon_busy, dis_pulse;
  logic [SB_W-1:0]  dis_id;
  logic             acc_valid, acc_miss;

  sb_index_map #(.IDX_W(IDX_W), .NUM_SUBBANKS(NUM_SUBBANKS), .ADS_LINES(ADS_LINES)) u_map (
    .idx(cpu_req_addr[OFF_W +: IDX_W]), .disabled(disabled),
    .pidx(pidx_in), .subbank(sb_in), .upper_bits(up_in), .folded()
  );

  assign stag_in = {cpu_req_addr[ADDR_W-1:OFF_W+IDX_W], up_in};

  sb_monitor #(.NUM_SUBBANKS(NUM_SUBBANKS), .INTERVAL(INTERVAL),
               .THR_NUM(THR_NUM), .THR_DEN(THR_DEN)) u_mon (
    .clk, .rst_n, .acc_valid, .acc_subbank(sb_q), .acc_miss,
    .disabled, .busy(mon_busy), .dis_pulse, .dis_id, .num_disabled
  );

  wire hit = valid_q && (tag_q == stag_q);

  assign cpu_req_ready = (state == S_IDLE) && !mon_busy;
  assign l2_req_valid  = (state == S_MISS);
  assign l2_req_addr   = {addr_q[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};

  always_comb begin
    cpu_resp_valid = 1'b0;
    cpu_resp_hit   = 1'b0;
    cpu_resp_data  = line_word(data_q, addr_q[OFF_W-1:2]);
    acc_valid      = 1'b0;
    acc_miss       = 1'b0;
    if (state == S_LOOKUP && hit) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_hit   = 1'b1;
      acc_valid      = 1'b1;
    end else if (state == S_WAIT && l2_resp_valid) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_data  = line_word(l2_resp_data, addr_q[OFF_W-1:2]);
      acc_valid      = 1'b1;
      acc_miss       = 1'b1;
    end
  end

  always_comb
    active_lines = (IDX_W+1)'(NUM_SUBBANKS - num_disabled) * (IDX_W+1)'(SB_LINES)
                 + (IDX_W+1)'(num_disabled) * (IDX_W+1)'(ADS_LINES);

  // Arrays: synchronous read, written on refill.
  always_ff @(posedge clk) begin
    if (cpu_req_valid && cpu_req_ready) begin
      data_q <= data_mem[pidx_in];
      tag_q  <= tag_mem[pidx_in];
    end
    if (state == S_WAIT && l2_resp_valid) begin
      data_mem[pidx_q] <= l2_resp_data;
      tag_mem[pidx_q]  <= stag_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      valid   <= '0;
      valid_q <= 1'b0;
      addr_q  <= '0;
      pidx_q  <= '0;
      sb_q    <= '0;
      stag_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cpu_req_valid && cpu_req_ready) begin
          addr_q  <= cpu_req_addr;
          pidx_q  <= pidx_in;
          sb_q    <= sb_in;
          stag_q  <= stag_in;
          valid_q <= valid[pidx_in];
          state   <= S_LOOKUP;
        end
        S_LOOKUP: state <= hit ? S_IDLE : S_MISS;
        S_MISS:   if (l2_req_ready) state <= S_WAIT;
        S_WAIT:   if (l2_resp_valid) begin
          valid[pidx_q] <= 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // Shut-off: everything of the subbank outside its ADS loses power.
      if (dis_pulse)
        for (int unsigned i = 0; i < NUM_LINES; i++)
          if (i / SB_LINES == 32'(dis_id) && (i % SB_LINES) >= ADS_LINES) valid[i] <= 1'b0;
    end
  end

  // The refill request holds its address until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
    l2_req_valid && !l2_req_ready |=> l2_req_valid && $stable(l2_req_addr))
    else $error("sb_icache: L2 request dropped");
endmodule
