// Bias: add a per-output bias to each lane of the partial-sum vectors.
//
// At the start of an instruction it loads bLen lines from bBase; each line
// holds sixteen 32-bit signed biases, lane p in bits [32p+31:32p]. Vector n of
// the stream uses line n mod bLen: a convolution (bLen = 1) applies the same
// per-channel biases to every pixel, a fully connected layer (bLen = number of
// output groups) steps to the next line for each group of P neurons. The
// stream is held off until the biases are in.
//
// Interface: arg_valid starts a load with the instruction; clear ends the
// instruction; in_*/out_* are P-lane 32-bit vector streams; rd_* host read
// port. Timing: one register stage, one vector per cycle. The document gives
// the function and the bBase/bLen fields; the layout is this design's.
module bias_add
  import shc_pkg::*;
#(
  parameter int unsigned P    = 16,
  parameter int unsigned BMAX = 8
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           clear,
  input  logic                           arg_valid,
  input  insn_t                          insn,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic signed [P-1:0][ACC_W-1:0] in_y,
  input  logic                           in_last,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic signed [P-1:0][ACC_W-1:0] out_y,
  output logic                           out_last,
  output logic                           rd_req_valid,
  input  logic                           rd_req_ready,
  output addr_t                          rd_req_addr,
  input  logic                           rd_rsp_valid,
  input  line_t                          rd_rsp_data
);
  line_t cur;
  logic  loaded, take;

  param_buf #(.BMAX(BMAX)) u_buf (
    .clk, .rst, .clear, .start(arg_valid), .base(insn.bBase), .len(insn.bLen),
    .advance(take), .cur, .loaded,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_rsp_valid, .rd_rsp_data
  );

  assign in_ready = loaded && (!out_valid || out_ready);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out_last  <= in_last;
        for (int p = 0; p < P; p++) out_y[p] <= in_y[p] + $signed(cur[32*p +: 32]);
      end
    end
  end

  initial assert (P <= LINE_W / 32);
endmodule
