// ReadConvImages: streamed image operand of a convolution layer.
//
// Reads iLen lines from iBase as an upper-bounded stream. Each line holds the
// receptive-field patch of one output pixel (or one K-th of it when a patch
// spans K lines), laid out by the host so that patches follow in output-pixel
// order. The same line feeds all P dot-product units (one unit per output
// channel), so the line is broadcast to the P rows of the 2D operand.
//
// Interface: the instruction is taken with arg_valid/arg_ready (ready while
// idle); rd_* is the host read port; out_* is the operand stream with `last`
// on the final line. Timing: as mustm_read, one line per cycle at best.
// The document names this data generator and says it fixes the ordering and
// repetition of conv image data; the pre-arranged patch layout is this
// design's choice.
module read_conv_images
  import shc_pkg::*;
#(
  parameter int unsigned P = 16
) (
  input  logic                    clk,
  input  logic                    rst,
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
  output logic                    out_last
);
  logic  busy, done;
  line_t line;

  assign arg_ready = !busy;

  mustm_read u_rd (
    .clk, .rst, .start(arg_valid), .base(insn.iBase), .len(insn.iLen),
    .busy, .done,
    .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr),
    .rsp_valid(rd_rsp_valid), .rsp_data(rd_rsp_data),
    .out_valid, .out_ready, .out_data(line), .out_last
  );

  assign out_data = {P{line}};
endmodule
