// l2_model: behavioural stand-in for the next-level (L2) cache, used only by
// testbenches. It takes one line request at a time (req_ready is high while
// idle), and LAT cycles later returns the whole 32-byte line in one beat
// with resp_valid high for one cycle. Contents come from tb_mem_pkg, except
// words written through the write channel (wr_*, always ready), which are
// kept in a sparse table and override them.
// Not synthesizable logic of the design: a timing and data model only.
module l2_model #(
  parameter int unsigned LAT = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  input  logic [31:0]  req_addr,
  output logic         req_ready,
  output logic         resp_valid,
  output logic [255:0] resp_data,
  output int unsigned  n_req,
  input  logic         wr_valid,
  input  logic [31:0]  wr_addr,
  input  logic [31:0]  wr_data,
  output logic         wr_ready
);
  logic [31:0] written [int unsigned];

  assign wr_ready = 1'b1;

  function automatic logic [255:0] line_of(logic [31:0] a);
    logic [255:0] l;
    l = tb_mem_pkg::mem_line(a);
    for (int k = 0; k < 8; k++) begin
      int unsigned w;
      w = {a[31:5], 5'b0} + 4 * k;
      if (written.exists(w)) l[k*32 +: 32] = written[w];
    end
    return l;
  endfunction

  always @(posedge clk) if (rst_n && wr_valid) written[{wr_addr[31:2], 2'b00}] = wr_data;

  logic        busy;
  logic [31:0] a_q;
  int unsigned cnt;

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= 0; n_req <= 0; resp_valid <= 1'b0; a_q <= '0;
      resp_data <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy  <= 1'b1;
        a_q   <= req_addr;
        cnt   <= LAT;
        n_req <= n_req + 1;
      end else if (busy) begin
        if (cnt <= 1) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          resp_data  <= line_of(a_q);
        end else cnt <= cnt - 1;
      end
    end
  end
endmodule
