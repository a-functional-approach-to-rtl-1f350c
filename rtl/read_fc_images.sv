// ReadFCImages: buffered input-vector operand of a fully connected layer.
//
// Loads the K = iLen lines of the layer's input vector from iBase into an
// on-chip buffer, flagging the first K of its KMAX entries. Once loaded, the
// flagged buffer is handed to a VecToUStm shift register, which streams lines
// 0, 1, ..., K-1 (each broadcast to all P dot-product units) and, as its last
// line leaves, takes a fresh copy of the buffer. The input vector so repeats,
// once per group of P output neurons, until the streamed weight operand ends;
// clear returns the unit to idle. The copy in the shift register doubles the
// buffer storage (KMAX lines), which the uniform vector/stream scheme costs.
//
// Interface: instruction by arg_valid/arg_ready; rd_* host read port; out_*
// operand stream (never flags last); `loaded` is high once the buffer is full.
// Timing: iLen read cycles, one cycle to fill the shift register, then one
// operand per cycle with no gap between repetitions. iLen <= KMAX.
// The document names the generator and the VecToUStm primitive; the buffer
// organisation is this design's.
module read_fc_images
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
  localparam int unsigned KB = (KMAX > 1) ? $clog2(KMAX) : 1;

  logic  rd_busy, rd_done, l_valid, l_last, active_q;
  logic  v_valid;
  line_t line, v_data;
  line_t buf_q [KMAX];
  logic [KMAX-1:0] flag_q;
  len_t  wr_q;

  assign arg_ready = !active_q;

  mustm_read u_rd (
    .clk, .rst, .start(arg_valid && !active_q), .base(insn.iBase), .len(insn.iLen),
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
      flag_q   <= '0;
    end else begin
      if (arg_valid && !active_q) begin
        active_q <= 1'b1;
        wr_q     <= '0;
        for (int i = 0; i < KMAX; i++) flag_q[i] <= (len_t'(i) < insn.iLen);
      end
      if (l_valid) begin
        wr_q <= wr_q + 1'b1;
        if (l_last) loaded <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (l_valid) buf_q[wr_q[KB-1:0]] <= line;
  end

  // replay: the whole flagged buffer is reloaded each time the stream ends
  vec_to_ustm #(.N(KMAX), .W(LINE_W)) u_replay (
    .clk, .rst(rst || clear),
    .in_valid(loaded), .in_ready(), .in_vec(buf_q), .in_flag(flag_q),
    .out_valid(v_valid), .out_ready, .out_data(v_data), .out_last()
  );

  assign out_valid = v_valid;
  assign out_last  = 1'b0;
  assign out_data  = {P{v_data}};

  assert property (@(posedge clk) disable iff (rst)
    (arg_valid && !active_q) |-> (insn.iLen <= len_t'(KMAX)));
endmodule
