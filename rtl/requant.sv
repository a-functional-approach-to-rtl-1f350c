// Requant: rescale 32-bit results to 8-bit activations, with ReLU.
//
// At the start of an instruction it loads bLen lines of 32-bit signed scale
// multipliers from qsBase (same layout and same line-per-vector rule as the
// biases). For each lane: v = round(acc * scale / 2^QS) + qz, then ReLU
// clamps v from below at the zero point qz, and the result is clipped to the
// signed 8-bit range. The stream is held off until the scales are in.
//
// Interface: arg_valid starts the load with the instruction; clear ends it;
// in_* is a P-lane 32-bit stream; out_* a P-lane signed 8-bit stream.
// Timing: one register stage, one vector per cycle. The document gives the
// stages (32-bit input, multiply by scale, cut to 8 bits), the qsBase and qz
// fields, and a ReLU in the pipeline; the fixed-point format (QS fraction
// bits, rounding) and applying ReLU to every layer are this design's choices.
module requant
  import shc_pkg::*;
#(
  parameter int unsigned P    = 16,
  parameter int unsigned BMAX = 8,
  parameter int unsigned QS   = 16
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
  output logic signed [P-1:0][7:0]       out_q,
  output logic                           out_last,
  output logic                           rd_req_valid,
  input  logic                           rd_req_ready,
  output addr_t                          rd_req_addr,
  input  logic                           rd_rsp_valid,
  input  line_t                          rd_rsp_data
);
  line_t cur;
  logic  loaded, take;
  logic signed [7:0] q [P];

  param_buf #(.BMAX(BMAX)) u_buf (
    .clk, .rst, .clear, .start(arg_valid), .base(insn.qsBase), .len(insn.bLen),
    .advance(take), .cur, .loaded,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_rsp_valid, .rd_rsp_data
  );

  always_comb begin
    for (int p = 0; p < P; p++) begin
      logic signed [63:0] prod, v;
      logic signed [63:0] zp;
      zp   = 64'($signed(insn.qz));
      prod = 64'($signed(in_y[p])) * 64'($signed(cur[32*p +: 32]));
      v    = ((prod + (64'sd1 <<< (QS - 1))) >>> QS) + zp;
      if (v < zp)   v = zp;         // ReLU at the zero point
      if (v > 127)  v = 127;
      if (v < -128) v = -128;
      q[p] = v[7:0];
    end
  end

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
        for (int p = 0; p < P; p++) out_q[p] <= q[p];
      end
    end
  end

  initial assert (P <= LINE_W / 32 && QS >= 1);
endmodule
