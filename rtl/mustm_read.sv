// MUStm Read: MapUStm(Read(base, _), UCounter(len)).
//
// Reads `len` consecutive host-memory lines starting at line address `base` and
// delivers them, in order, as an upper-bounded stream with a `last` flag. A
// UCounter produces the line indices; each index is turned into a read request
// on the host read port. The host answers in order and cannot be stalled, so the
// reader keeps a small response FIFO and only issues a request while
// (requests in flight + lines held) is below its depth: a stalled consumer then
// slows the reader down instead of losing data.
//
// Interface: start/base/len begin a run (accepted only when idle); req_* is the
// read request channel, rsp_* the in-order response; out_* the line stream.
// done pulses when the last line has been handed to the consumer.
// Timing: one request per cycle when credits allow; the first line appears one
// cycle after its response arrives. The request/response split and the FIFO
// depth are this design's choices.
module mustm_read
  import shc_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned MAXLEN = 1 << LEN_W
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  addr_t base,
  input  len_t  len,
  output logic  busy,
  output logic  done,
  // host read port
  output logic  req_valid,
  input  logic  req_ready,
  output addr_t req_addr,
  input  logic  rsp_valid,
  input  line_t rsp_data,
  // line stream
  output logic  out_valid,
  input  logic  out_ready,
  output line_t out_data,
  output logic  out_last
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  addr_t        base_q;
  len_t         n_q, sent_q;
  logic [CW-1:0] inflight_q, count_q;
  line_t        fifo [DEPTH];
  logic [PW-1:0] wp_q, rp_q;
  logic         cnt_valid, cnt_last, cnt_done, cnt_busy;
  len_t         cnt_idx;
  logic         issue, pop;

  // Request indices come from an upper-bounded counter.
  ucounter #(.N(MAXLEN - 1), .W(LEN_W)) u_cnt (
    .clk, .rst, .start(start && !busy), .len,
    .idx(cnt_idx), .valid(cnt_valid), .ready(issue), .last(cnt_last),
    .done(cnt_done), .busy(cnt_busy)
  );

  assign req_valid = cnt_valid && ((inflight_q + count_q) < CW'(DEPTH));
  assign req_addr  = base_q + addr_t'(cnt_idx);
  assign issue     = req_valid && req_ready;

  assign out_valid = (count_q != '0);
  assign out_data  = fifo[rp_q];
  assign out_last  = out_valid && (sent_q == n_q - 1'b1);
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      base_q     <= '0;
      n_q        <= '0;
      sent_q     <= '0;
      inflight_q <= '0;
      count_q    <= '0;
      wp_q       <= '0;
      rp_q       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        base_q <= base;
        n_q    <= len;
        sent_q <= '0;
        busy   <= (len != '0);
        done   <= (len == '0);
      end
      inflight_q <= inflight_q + CW'(issue) - CW'(rsp_valid);
      count_q    <= count_q + CW'(rsp_valid) - CW'(pop);
      if (rsp_valid) wp_q <= (wp_q == PW'(DEPTH - 1)) ? '0 : wp_q + 1'b1;
      if (pop) begin
        rp_q   <= (rp_q == PW'(DEPTH - 1)) ? '0 : rp_q + 1'b1;
        sent_q <= sent_q + 1'b1;
        if (out_last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rsp_valid) fifo[wp_q] <= rsp_data;
  end

  // A response only ever answers an outstanding request.
  assert property (@(posedge clk) disable iff (rst) rsp_valid |-> (inflight_q != '0));
endmodule
