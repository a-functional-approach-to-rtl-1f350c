// Per-instruction parameter buffer (helper of bias_add and requant).
//
// Loads `len` host lines from `base` into an on-chip buffer of up to BMAX
// lines when started, then presents one of them as `cur`. `advance` steps to
// the next line, wrapping after the last, so a layer that uses one line of
// parameters for all its outputs (a convolution) loads one line, and a layer
// that needs a new line per group of outputs (a fully connected layer) loads
// one per group. `loaded` is high once all lines are in; clear empties it.
// Interface and timing as mustm_read for the host side; `cur` is a register
// read, valid while `loaded` is high.
module param_buf
  import shc_pkg::*;
#(
  parameter int unsigned BMAX = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  clear,
  input  logic  start,
  input  addr_t base,
  input  len_t  len,
  input  logic  advance,
  output line_t cur,
  output logic  loaded,
  output logic  rd_req_valid,
  input  logic  rd_req_ready,
  output addr_t rd_req_addr,
  input  logic  rd_rsp_valid,
  input  line_t rd_rsp_data
);
  localparam int unsigned BB = (BMAX > 1) ? $clog2(BMAX) : 1;

  logic  rd_busy, rd_done, l_valid, l_last;
  line_t line;
  line_t buf_q [BMAX];
  logic [BB-1:0] wr_q, rd_q;
  len_t  n_q;

  mustm_read u_rd (
    .clk, .rst, .start, .base, .len,
    .busy(rd_busy), .done(rd_done),
    .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr),
    .rsp_valid(rd_rsp_valid), .rsp_data(rd_rsp_data),
    .out_valid(l_valid), .out_ready(1'b1), .out_data(line), .out_last(l_last)
  );

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      loaded <= 1'b0;
      wr_q   <= '0;
      rd_q   <= '0;
      n_q    <= '0;
    end else begin
      if (start && !rd_busy) begin
        wr_q   <= '0;
        rd_q   <= '0;
        n_q    <= len;
        loaded <= (len == '0);
      end
      if (l_valid) begin
        wr_q <= wr_q + 1'b1;
        if (l_last) loaded <= 1'b1;
      end
      if (advance && loaded)
        rd_q <= (len_t'(rd_q) == n_q - 1'b1) ? '0 : rd_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (l_valid) buf_q[wr_q] <= line;
  end

  assign cur = buf_q[rd_q];

  assert property (@(posedge clk) disable iff (rst) (start && !rd_busy) |-> (len <= len_t'(BMAX)));
endmodule
