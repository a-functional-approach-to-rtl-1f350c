// Programmable LeNet-5 accelerator, top level.
//
// A single shared datapath (lenet_body) is driven by a stream of instructions
// read from host memory (insn_loop); all memory traffic goes through one host
// memory interface (host_mem_if) for reads and one write port. Nothing is
// replicated per layer or per call: which layer runs, on which buffers and at
// which sizes, is decided only by the instructions, so the same hardware runs
// any network whose layers fit its bounds, and all control and memory logic
// exists once.
//
// Host memory layout: line 0 holds the instruction count n (bits 15:0), lines
// 1..n hold one instruction each (shc_pkg::insn_t in the low bits); data
// buffers sit anywhere else, addressed in 64-byte lines.
//
// Interface: start pulses to run the program; busy is high until done pulses.
// h_rd_* is the host read port (request with valid/ready, in-order responses
// that cannot be stalled); h_wr_* the host write port (h_wr_ack pulses once per
// completed write). Timing is set by the host: the accelerator keeps up to
// OUTS reads in flight.
module shc_top
  import shc_pkg::*;
#(
  parameter int unsigned P    = 16,
  parameter int unsigned KMAX = 8,
  parameter int unsigned BMAX = 8,
  parameter int unsigned QS   = 16,
  parameter int unsigned WIN  = 4,
  parameter int unsigned OUTS = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  output logic  busy,
  output logic  done,
  output logic  h_rd_req_valid,
  input  logic  h_rd_req_ready,
  output addr_t h_rd_req_addr,
  input  logic  h_rd_rsp_valid,
  input  line_t h_rd_rsp_data,
  output logic  h_wr_valid,
  input  logic  h_wr_ready,
  output addr_t h_wr_addr,
  output line_t h_wr_data,
  input  logic  h_wr_ack
);
  logic [6:0] rq_valid, rq_ready, rs_valid;
  addr_t      rq_addr [7];
  line_t      rs_data;
  logic       insn_valid, insn_ready, body_done;
  insn_t      insn;
  addr_t      body_addr [6];

  host_mem_if #(.NPORT(7), .OUTS(OUTS)) u_mem (
    .clk, .rst, .rq_valid, .rq_ready, .rq_addr, .rs_valid, .rs_data,
    .h_req_valid(h_rd_req_valid), .h_req_ready(h_rd_req_ready), .h_req_addr(h_rd_req_addr),
    .h_rsp_valid(h_rd_rsp_valid), .h_rsp_data(h_rd_rsp_data)
  );

  insn_loop u_loop (
    .clk, .rst, .start, .busy, .done,
    .rd_req_valid(rq_valid[0]), .rd_req_ready(rq_ready[0]), .rd_req_addr(rq_addr[0]),
    .rd_rsp_valid(rs_valid[0]), .rd_rsp_data(rs_data),
    .insn_valid, .insn_ready, .insn, .body_done
  );

  lenet_body #(.P(P), .KMAX(KMAX), .BMAX(BMAX), .QS(QS), .WIN(WIN)) u_body (
    .clk, .rst, .insn_valid, .insn_ready, .insn, .done(body_done),
    .rd_req_valid(rq_valid[6:1]), .rd_req_ready(rq_ready[6:1]), .rd_req_addr(body_addr),
    .rd_rsp_valid(rs_valid[6:1]), .rd_rsp_data(rs_data),
    .wr_valid(h_wr_valid), .wr_ready(h_wr_ready), .wr_addr(h_wr_addr), .wr_data(h_wr_data),
    .wr_ack(h_wr_ack)
  );

  always_comb begin
    for (int i = 0; i < 6; i++) rq_addr[i+1] = body_addr[i];
  end
endmodule
