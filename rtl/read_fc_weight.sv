// ReadFCWeight: streamed weight operand of a fully connected layer.
//
// Reads kLen lines from kBase. Each group of P consecutive lines holds the
// same K-th slice of the weight rows of P neighbouring output neurons, so the
// group forms one 2D operand: row p goes to dot-product unit p. A UStmToVec
// collects the P lines; if the stream ends inside a group, the missing rows
// have false flags, and a PackVec drives them as zero weights.
//
// Interface: instruction by arg_valid/arg_ready; rd_* host read port; out_*
// operand stream of P-line groups with `last` on the final group.
// Timing: P read cycles per operand, so fully connected layers are bounded by
// memory bandwidth. The weight layout is the host's and this design's choice;
// the document names the generator only.
module read_fc_weight
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
  logic   busy, done;
  logic   l_valid, l_ready, l_last;
  line_t  line;
  line_t  rows [P];
  line_t  rows_z [P];
  logic [P-1:0] flags;

  assign arg_ready = !busy;

  mustm_read u_rd (
    .clk, .rst, .start(arg_valid), .base(insn.kBase), .len(insn.kLen),
    .busy, .done,
    .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr),
    .rsp_valid(rd_rsp_valid), .rsp_data(rd_rsp_data),
    .out_valid(l_valid), .out_ready(l_ready), .out_data(line), .out_last(l_last)
  );

  ustm_to_vec #(.N(P), .W(LINE_W)) u_vec (
    .clk, .rst,
    .in_valid(l_valid), .in_ready(l_ready), .in_data(line), .in_last(l_last),
    .out_valid, .out_ready, .out_vec(rows), .out_flag(flags), .out_last
  );

  // PackVec moves flagged rows to the front and zeroes the rest; the flags
  // from UStmToVec are already a leading run, so only the zeroing is used
  pack_vec #(.N(P), .W(LINE_W)) u_pack (
    .in_vec(rows), .in_flag(flags), .out_vec(rows_z), .out_flag()
  );

  always_comb begin
    for (int p = 0; p < P; p++) out_data[p] = rows_z[p];
  end
endmodule
