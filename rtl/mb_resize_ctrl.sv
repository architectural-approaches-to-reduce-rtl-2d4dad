// mb_resize_ctrl: interval-end cache resizing of the macroblock method.
//
// On start (end of an interval) it walks the MAT, one entry per cycle, and
// adds the spatial counters of the valid entries in a SUM_W (16) bit adder to
// form sum_MATcnt; the sum saturates at its maximum. One cycle later it
// decides: sum_MATcnt below THRESHOLD means a lightly accessed phase and the
// cache is halved (the index mask shifts right by one bit), otherwise it is
// doubled, both within MIN_IDX .. MAX_IDX index bits. busy is high for
// ENTRIES + 1 cycles after start; down/up pulse with the new size.
//
// Follows the method: summing the counters at the end of the interval with
// a 16-bit adder, the threshold test and halving/doubling through the index
// mask. THRESHOLD defaults to 138, the I-cache value at 0.1 % performance
// penalty (141 is the D-cache value at 1 %). This design's own: the
// sequential walk, saturation of the sum and the smallest size (MIN_IDX).
module mb_resize_ctrl #(
  parameter int unsigned ENTRIES   = 1024,
  parameter int unsigned CTR_W     = 8,
  parameter int unsigned SUM_W     = 16,
  parameter int unsigned THRESHOLD = 138,
  parameter int unsigned MAX_IDX   = leak_pkg::IDX_W,
  parameter int unsigned MIN_IDX   = leak_pkg::IDX_W - 4,
  localparam int unsigned IW = $clog2(ENTRIES),
  localparam int unsigned SW = $clog2(MAX_IDX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic [IW-1:0]      sum_idx,
  input  logic               sum_valid,
  input  logic [CTR_W-1:0]   sum_ctr,
  output logic [SUM_W-1:0]   sum_matcnt,   // last completed sum
  output logic [SW-1:0]      size_log,     // active index bits
  output logic [MAX_IDX-1:0] index_mask,
  output logic               down_pulse,
  output logic               up_pulse
);
  typedef enum logic [1:0] {R_IDLE, R_SUM, R_DECIDE} rstate_e;
  rstate_e          st;
  logic [SUM_W-1:0] acc;
  logic [SUM_W:0]   nxt;

  localparam logic [SUM_W-1:0] SUM_MAX = '1;

  assign busy = (st != R_IDLE);
  assign nxt  = {1'b0, acc} + (SUM_W+1)'(sum_valid ? sum_ctr : '0);

  always_comb
    for (int unsigned i = 0; i < MAX_IDX; i++) index_mask[i] = (i < 32'(size_log));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= R_IDLE;
      acc        <= '0;
      sum_idx    <= '0;
      sum_matcnt <= '0;
      size_log   <= SW'(MAX_IDX);
      down_pulse <= 1'b0;
      up_pulse   <= 1'b0;
    end else begin
      down_pulse <= 1'b0;
      up_pulse   <= 1'b0;
      unique case (st)
        R_IDLE: if (start) begin
          acc     <= '0;
          sum_idx <= '0;
          st      <= R_SUM;
        end
        R_SUM: begin
          acc     <= nxt[SUM_W] ? SUM_MAX : nxt[SUM_W-1:0];
          sum_idx <= sum_idx + 1'b1;
          if (sum_idx == IW'(ENTRIES - 1)) st <= R_DECIDE;
        end
        R_DECIDE: begin
          sum_matcnt <= acc;
          if (32'(acc) < THRESHOLD) begin
            if (size_log > SW'(MIN_IDX)) begin
              size_log   <= size_log - 1'b1;
              down_pulse <= 1'b1;
            end
          end else if (size_log < SW'(MAX_IDX)) begin
            size_log <= size_log + 1'b1;
            up_pulse <= 1'b1;
          end
          st <= R_IDLE;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
