// ReadConvWeight: buffered kernel operand of a convolution layer.
//
// Loads kLen = P*K lines from kBase into an on-chip buffer. Line j holds slice
// k = j / P of the kernel of output channel p = j mod P. Once loaded, the
// generator presents slice 0, 1, ..., K-1 of all P kernels, one 2D operand per
// handshake, and starts over at slice 0, for as long as the streamed image
// operand keeps coming: the same kernels are reused for every output pixel.
// The instruction's end (clear) returns it to idle.
//
// Interface: instruction by arg_valid/arg_ready; rd_* host read port; out_*
// operand stream (never flags last: the streamed side ends the zip);
// `loaded` is high once the buffer is full. Timing: kLen read cycles, then
// one operand per cycle. P must be a power of two and kLen <= P*KMAX.
// The document names the generator; the buffer organisation is this design's.
module read_conv_weight
  import shc_pkg::*;
#(
  parameter int unsigned P    = 16,
  parameter int unsigned KMAX = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clear,
  input  logic                    arg_valid,
  output logic                    arg_ready,
  input  insn_t                   insn,
  output logic                    rd_req_valid,
  input  logic                    rd_req_ready,
  output addr_t                   rd_req_addr,
  input  logic                    rd_rsp_valid,
  input  line_t                   rd_rsp_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [P-1:0][LINE_W-1:0] out_data,
  output logic                    out_last,
  output logic                    loaded
);
  localparam int unsigned PB = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned KB = (KMAX > 1) ? $clog2(KMAX) : 1;

  logic  rd_busy, rd_done, l_valid, l_last, active_q;
  line_t line;
  line_t buf_q [KMAX][P];
  len_t  wr_q, k_max_q;
  logic [KB-1:0] k_q;

  assign arg_ready = !active_q;

  mustm_read u_rd (
    .clk, .rst, .start(arg_valid && !active_q), .base(insn.kBase), .len(insn.kLen),
    .busy(rd_busy), .done(rd_done),
    .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr),
    .rsp_valid(rd_rsp_valid), .rsp_data(rd_rsp_data),
    .out_valid(l_valid), .out_ready(1'b1), .out_data(line), .out_last(l_last)
  );

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      active_q <= 1'b0;
      loaded   <= 1'b0;
      wr_q     <= '0;
      k_q      <= '0;
      k_max_q  <= '0;
    end else begin
      if (arg_valid && !active_q) begin
        active_q <= 1'b1;
        wr_q     <= '0;
        k_q      <= '0;
        k_max_q  <= (insn.kLen >> PB) - 1'b1;
      end
      if (l_valid) begin
        wr_q <= wr_q + 1'b1;
        if (l_last) loaded <= 1'b1;
      end
      if (out_valid && out_ready)
        k_q <= (len_t'(k_q) == k_max_q) ? '0 : k_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (l_valid) buf_q[wr_q[PB+KB-1:PB]][wr_q[PB-1:0]] <= line;
  end

  assign out_valid = loaded;
  assign out_last  = 1'b0;
  always_comb begin
    for (int p = 0; p < P; p++) out_data[p] = buf_q[k_q][p];
  end

  assert property (@(posedge clk) disable iff (rst)
    (arg_valid && !active_q) |-> (insn.kLen <= len_t'(P * KMAX)));
endmodule
