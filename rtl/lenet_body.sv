// Instruction body of the LeNet-5 accelerator (the reduction's function).
//
// One instruction runs one layer (or one slice of a layer) through a fixed
// pipeline:
//
//   SwitchApply(opCfc){ReadConvImages | ReadFCWeight}  --a-->\
//                                                              ParallelDP
//   SwitchApply(opCfc){ReadConvWeight | ReadFCImages}  --b-->/     |
//     -> PartialSum(opPsum, K) -> Bias -> Requant (+ReLU)
//     -> SwitchApply(opPool){identity | AvgPool} -> Write(wBase, wLen)
//
// The two data-generator SwitchApply stages swap the roles of images and
// weights between convolution and fully connected layers, so both layer kinds
// share one set of dot-product units. Port a carries the streamed operand,
// whose `last` ends the whole pipeline; port b carries the buffered operand,
// repeated for as long as port a has data. The dot-product length in lines is
// K = kLen / P for a convolution and K = iLen for a fully connected layer.
//
// On an accepted instruction every stage is started in the same cycle; the
// readers then share the host read bandwidth through the memory interface.
// When the writer reports that all output lines are acknowledged, the
// buffered generators and parameter buffers are cleared and `done` pulses.
//
// Interface: insn_valid/insn_ready/insn from the instruction loop, done back;
// rd_* six host read ports (0 conv image, 1 FC weight, 2 conv weight, 3 FC
// image, 4 bias, 5 scale); wr_* the host write port.
// The composition follows the document's expression and datapath figure for
// LeNet-5; the operand layouts and K rule are this design's choices.
module lenet_body
  import shc_pkg::*;
#(
  parameter int unsigned P    = 16,
  parameter int unsigned KMAX = 8,
  parameter int unsigned BMAX = 8,
  parameter int unsigned QS   = 16,
  parameter int unsigned WIN  = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        insn_valid,
  output logic        insn_ready,
  input  insn_t       insn,
  output logic        done,
  output logic [5:0]  rd_req_valid,
  input  logic [5:0]  rd_req_ready,
  output addr_t       rd_req_addr [6],
  input  logic [5:0]  rd_rsp_valid,
  input  line_t       rd_rsp_data,
  output logic        wr_valid,
  input  logic        wr_ready,
  output addr_t       wr_addr,
  output line_t       wr_data,
  input  logic        wr_ack
);
  localparam int unsigned PB = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned OW = P * LINE_W;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_CLEAR} state_e;
  state_e state_q;
  insn_t  insn_q;
  logic   go, clear, wr_busy, wr_done;

  assign insn_ready = (state_q == S_IDLE);
  assign go         = insn_valid && insn_ready;
  assign clear      = (state_q == S_CLEAR);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      insn_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE:  if (go) begin
                   insn_q  <= insn;
                   state_q <= S_RUN;
                 end
        S_RUN:   if (wr_done) state_q <= S_CLEAR;
        S_CLEAR: begin
                   done    <= 1'b1;
                   state_q <= S_IDLE;
                 end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Stage configuration comes from the live instruction in the start cycle,
  // from the held copy afterwards.
  insn_t cfg;
  assign cfg = go ? insn : insn_q;

  // ---------------- data generators, operand a ----------------
  logic [1:0]           ga_arg_valid, ga_arg_ready, ga_res_valid, ga_res_ready, ga_res_last;
  logic [INSN_W-1:0]    ga_arg_data;
  logic                 ga_arg_last;
  logic [OW-1:0]        ga_res_data [2];
  logic                 a_valid, a_ready, a_last, a_arg_ready;
  logic [OW-1:0]        a_data;

  switch_apply #(.N(2), .TW(INSN_W), .UW(OW)) u_sw_a (
    .sel(cfg.opCfc), .arg_valid(go), .arg_ready(a_arg_ready), .arg_data(insn), .arg_last(1'b1),
    .f_arg_valid(ga_arg_valid), .f_arg_ready(ga_arg_ready), .f_arg_data(ga_arg_data),
    .f_arg_last(ga_arg_last),
    .f_res_valid(ga_res_valid), .f_res_ready(ga_res_ready), .f_res_data(ga_res_data),
    .f_res_last(ga_res_last),
    .res_valid(a_valid), .res_ready(a_ready), .res_data(a_data), .res_last(a_last)
  );

  read_conv_images #(.P(P)) u_conv_img (
    .clk, .rst, .arg_valid(ga_arg_valid[0]), .arg_ready(ga_arg_ready[0]),
    .insn(insn_t'(ga_arg_data)),
    .rd_req_valid(rd_req_valid[0]), .rd_req_ready(rd_req_ready[0]), .rd_req_addr(rd_req_addr[0]),
    .rd_rsp_valid(rd_rsp_valid[0]), .rd_rsp_data,
    .out_valid(ga_res_valid[0]), .out_ready(ga_res_ready[0]), .out_data(ga_res_data[0]),
    .out_last(ga_res_last[0])
  );

  read_fc_weight #(.P(P)) u_fc_w (
    .clk, .rst, .arg_valid(ga_arg_valid[1]), .arg_ready(ga_arg_ready[1]),
    .insn(insn_t'(ga_arg_data)),
    .rd_req_valid(rd_req_valid[1]), .rd_req_ready(rd_req_ready[1]), .rd_req_addr(rd_req_addr[1]),
    .rd_rsp_valid(rd_rsp_valid[1]), .rd_rsp_data,
    .out_valid(ga_res_valid[1]), .out_ready(ga_res_ready[1]), .out_data(ga_res_data[1]),
    .out_last(ga_res_last[1])
  );

  // ---------------- data generators, operand b ----------------
  logic [1:0]           gb_arg_valid, gb_arg_ready, gb_res_valid, gb_res_ready, gb_res_last;
  logic [INSN_W-1:0]    gb_arg_data;
  logic                 gb_arg_last;
  logic [OW-1:0]        gb_res_data [2];
  logic                 b_valid, b_ready, b_last, b_arg_ready;
  logic [OW-1:0]        b_data;
  logic                 cw_loaded, fi_loaded;

  switch_apply #(.N(2), .TW(INSN_W), .UW(OW)) u_sw_b (
    .sel(cfg.opCfc), .arg_valid(go), .arg_ready(b_arg_ready), .arg_data(insn), .arg_last(1'b1),
    .f_arg_valid(gb_arg_valid), .f_arg_ready(gb_arg_ready), .f_arg_data(gb_arg_data),
    .f_arg_last(gb_arg_last),
    .f_res_valid(gb_res_valid), .f_res_ready(gb_res_ready), .f_res_data(gb_res_data),
    .f_res_last(gb_res_last),
    .res_valid(b_valid), .res_ready(b_ready), .res_data(b_data), .res_last(b_last)
  );

  read_conv_weight #(.P(P), .KMAX(KMAX)) u_conv_w (
    .clk, .rst, .clear, .arg_valid(gb_arg_valid[0]), .arg_ready(gb_arg_ready[0]),
    .insn(insn_t'(gb_arg_data)),
    .rd_req_valid(rd_req_valid[2]), .rd_req_ready(rd_req_ready[2]), .rd_req_addr(rd_req_addr[2]),
    .rd_rsp_valid(rd_rsp_valid[2]), .rd_rsp_data,
    .out_valid(gb_res_valid[0]), .out_ready(gb_res_ready[0]), .out_data(gb_res_data[0]),
    .out_last(gb_res_last[0]), .loaded(cw_loaded)
  );

  read_fc_images #(.P(P), .KMAX(KMAX)) u_fc_img (
    .clk, .rst, .clear, .arg_valid(gb_arg_valid[1]), .arg_ready(gb_arg_ready[1]),
    .insn(insn_t'(gb_arg_data)),
    .rd_req_valid(rd_req_valid[3]), .rd_req_ready(rd_req_ready[3]), .rd_req_addr(rd_req_addr[3]),
    .rd_rsp_valid(rd_rsp_valid[3]), .rd_rsp_data,
    .out_valid(gb_res_valid[1]), .out_ready(gb_res_ready[1]), .out_data(gb_res_data[1]),
    .out_last(gb_res_last[1]), .loaded(fi_loaded)
  );

  // ---------------- zip a with b, dot products ----------------
  logic dp_in_ready, dp_valid, dp_ready, dp_last;
  logic signed [P-1:0][ACC_W-1:0] dp_y;

  assign a_ready = dp_in_ready && a_valid && b_valid;
  assign b_ready = a_ready;

  parallel_dp #(.P(P)) u_dp (
    .clk, .rst, .in_valid(a_valid && b_valid), .in_ready(dp_in_ready),
    .in_a(a_data), .in_b(b_data), .in_last(a_last),
    .out_valid(dp_valid), .out_ready(dp_ready), .out_y(dp_y), .out_last(dp_last)
  );

  // ---------------- partial sum, bias, requant ----------------
  len_t k_lines;
  assign k_lines = (insn_q.opCfc == CFC_CONV) ? (insn_q.kLen >> PB) : insn_q.iLen;

  logic ps_valid, ps_ready, ps_last;
  logic signed [P-1:0][ACC_W-1:0] ps_y;

  partial_sum #(.P(P)) u_psum (
    .clk, .rst, .mode(insn_q.opPsum), .k(k_lines),
    .in_valid(dp_valid), .in_ready(dp_ready), .in_y(dp_y), .in_last(dp_last),
    .out_valid(ps_valid), .out_ready(ps_ready), .out_y(ps_y), .out_last(ps_last)
  );

  logic bi_valid, bi_ready, bi_last;
  logic signed [P-1:0][ACC_W-1:0] bi_y;

  bias_add #(.P(P), .BMAX(BMAX)) u_bias (
    .clk, .rst, .clear, .arg_valid(go), .insn(cfg),
    .in_valid(ps_valid), .in_ready(ps_ready), .in_y(ps_y), .in_last(ps_last),
    .out_valid(bi_valid), .out_ready(bi_ready), .out_y(bi_y), .out_last(bi_last),
    .rd_req_valid(rd_req_valid[4]), .rd_req_ready(rd_req_ready[4]), .rd_req_addr(rd_req_addr[4]),
    .rd_rsp_valid(rd_rsp_valid[4]), .rd_rsp_data
  );

  logic rq_valid, rq_ready, rq_last;
  logic signed [P-1:0][7:0] rq_q;

  requant #(.P(P), .BMAX(BMAX), .QS(QS)) u_rq (
    .clk, .rst, .clear, .arg_valid(go), .insn(cfg),
    .in_valid(bi_valid), .in_ready(bi_ready), .in_y(bi_y), .in_last(bi_last),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_q(rq_q), .out_last(rq_last),
    .rd_req_valid(rd_req_valid[5]), .rd_req_ready(rd_req_ready[5]), .rd_req_addr(rd_req_addr[5]),
    .rd_rsp_valid(rd_rsp_valid[5]), .rd_rsp_data
  );

  // ---------------- optional average pooling ----------------
  logic [1:0]       gp_arg_valid, gp_arg_ready, gp_res_valid, gp_res_ready, gp_res_last;
  logic [P*8-1:0]   gp_arg_data;
  logic             gp_arg_last;
  logic [P*8-1:0]   gp_res_data [2];
  logic             po_valid, po_ready, po_last;
  logic [P*8-1:0]   po_data;

  switch_apply #(.N(2), .TW(P*8), .UW(P*8)) u_sw_pool (
    .sel(insn_q.opPool), .arg_valid(rq_valid), .arg_ready(rq_ready), .arg_data(rq_q),
    .arg_last(rq_last),
    .f_arg_valid(gp_arg_valid), .f_arg_ready(gp_arg_ready), .f_arg_data(gp_arg_data),
    .f_arg_last(gp_arg_last),
    .f_res_valid(gp_res_valid), .f_res_ready(gp_res_ready), .f_res_data(gp_res_data),
    .f_res_last(gp_res_last),
    .res_valid(po_valid), .res_ready(po_ready), .res_data(po_data), .res_last(po_last)
  );

  // function 0: identity
  assign gp_res_valid[0] = gp_arg_valid[0];
  assign gp_arg_ready[0] = gp_res_ready[0];
  assign gp_res_data[0]  = gp_arg_data;
  assign gp_res_last[0]  = gp_arg_last;

  // function 1: average pooling
  avg_pool #(.P(P), .WIN(WIN)) u_pool (
    .clk, .rst, .in_valid(gp_arg_valid[1]), .in_ready(gp_arg_ready[1]), .in_q(gp_arg_data),
    .in_last(gp_arg_last), .out_valid(gp_res_valid[1]), .out_ready(gp_res_ready[1]),
    .out_q(gp_res_data[1]), .out_last(gp_res_last[1])
  );

  // ---------------- write back ----------------
  write_out #(.P(P)) u_wr (
    .clk, .rst, .arg_valid(go), .insn(cfg), .busy(wr_busy), .done(wr_done),
    .in_valid(po_valid), .in_ready(po_ready), .in_q(po_data), .in_last(po_last),
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_ack
  );

  // Both generator pools are idle whenever a new instruction is accepted.
  assert property (@(posedge clk) disable iff (rst) go |-> (a_arg_ready && b_arg_ready));
endmodule
