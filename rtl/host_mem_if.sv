// Host memory interface: read-request arbiter and in-order response router.
//
// Every reader of the accelerator (instruction fetch, the four data
// generators, the bias and scale readers) owns a request port here. The
// interface grants one request per cycle, lowest port number first, forwards
// it to the single host read port and records the winner's port number in a
// FIFO. The host answers reads in order, so each response goes to the port at
// the head of that FIFO. All reads thus share one piece of memory logic, which
// is the point of the reduce-based sharing scheme. Writes come from a single
// writer and do not pass through this block.
//
// Interface: rq_valid/rq_ready/rq_addr and rs_valid per port; one rs_data bus
// wired straight from the host to every port, taken only by the port whose
// rs_valid is high, so the data needs no multiplexer. Responses cannot be
// stalled; readers only ask for what they can hold.
// h_req_* and h_rsp_* face the host. Timing: a grant is combinational from
// the host's ready; a response is routed in the cycle it arrives. At most
// OUTS reads may be outstanding. Arbitration order and the outstanding limit
// are this design's choices.
module host_mem_if
  import shc_pkg::*;
#(
  parameter int unsigned NPORT = 7,
  parameter int unsigned OUTS  = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NPORT-1:0] rq_valid,
  output logic [NPORT-1:0] rq_ready,
  input  addr_t            rq_addr [NPORT],
  output logic [NPORT-1:0] rs_valid,
  output line_t            rs_data,
  output logic             h_req_valid,
  input  logic             h_req_ready,
  output addr_t            h_req_addr,
  input  logic             h_rsp_valid,
  input  line_t            h_rsp_data
);
  localparam int unsigned IW = (NPORT > 1) ? $clog2(NPORT) : 1;
  localparam int unsigned OW = $clog2(OUTS);
  localparam int unsigned CW = $clog2(OUTS + 1);

  logic [IW-1:0] id_fifo [OUTS];
  logic [OW-1:0] wp_q, rp_q;
  logic [CW-1:0] cnt_q;
  logic [IW-1:0] win;
  logic          any, full, grant;

  always_comb begin
    any = 1'b0;
    win = '0;
    for (int i = NPORT - 1; i >= 0; i--) begin
      if (rq_valid[i]) begin
        any = 1'b1;
        win = IW'(i);
      end
    end
  end

  assign full        = (cnt_q == CW'(OUTS));
  assign h_req_valid = any && !full;
  assign h_req_addr  = rq_addr[win];
  assign grant       = h_req_valid && h_req_ready;

  always_comb begin
    rq_ready = '0;
    rs_valid = '0;
    if (!full && h_req_ready) rq_ready[win] = any;
    if (h_rsp_valid) rs_valid[id_fifo[rp_q]] = 1'b1;
  end
  assign rs_data = h_rsp_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (grant) wp_q <= wp_q + 1'b1;
      if (h_rsp_valid) rp_q <= rp_q + 1'b1;
      cnt_q <= cnt_q + CW'(grant) - CW'(h_rsp_valid);
    end
  end

  always_ff @(posedge clk) begin
    if (grant) id_fifo[wp_q] <= win;
  end

  // The host never answers more reads than were asked.
  assert property (@(posedge clk) disable iff (rst) h_rsp_valid |-> (cnt_q != '0));
  // OUTS must be a power of two for the wrapping pointers.
  initial assert ((1 << OW) == OUTS);
endmodule
