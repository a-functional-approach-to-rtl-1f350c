// Output write: WriteAddr and Write of the instruction body.
//
// Packs the P-byte output vectors, LINE_BYTES/P to a line (vector v in bytes
// [P*v, P*v+P) of the line), and writes the lines to wBase, wBase+1, ...
// A line is sent when it is full or when the stream's last vector has arrived;
// unused bytes of a final partial line are zero. The host acknowledges each
// write; as in the document, the write reduction only completes once every
// write has been acknowledged, so the next instruction never sees stale data.
// `done` pulses when wLen acknowledgements have been counted and the stream's
// last vector has been taken.
//
// Interface: arg_valid starts with the instruction (wBase, wLen); in_* is the
// vector stream; wr_* the host write port (wr_ack: one pulse per completed
// write). Timing: a line leaves one cycle after its closing vector; input is
// held off while a line waits for the host. The packing is this design's
// choice.
module write_out
  import shc_pkg::*;
#(
  parameter int unsigned P = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     arg_valid,
  input  insn_t                    insn,
  output logic                     busy,
  output logic                     done,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [P-1:0][7:0] in_q,
  input  logic                     in_last,
  output logic                     wr_valid,
  input  logic                     wr_ready,
  output addr_t                    wr_addr,
  output line_t                    wr_data,
  input  logic                     wr_ack
);
  localparam int unsigned VPL = LINE_BYTES / P;
  localparam int unsigned VB  = (VPL > 1) ? $clog2(VPL) : 1;

  addr_t        base_q;
  len_t         wlen_q, line_q, ack_q;
  logic [VB-1:0] v_q;
  logic         seen_last_q;

  assign in_ready = busy && !wr_valid && !seen_last_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      wr_valid    <= 1'b0;
      seen_last_q <= 1'b0;
      v_q         <= '0;
      line_q      <= '0;
      ack_q       <= '0;
      base_q      <= '0;
      wlen_q      <= '0;
      wr_data     <= '0;
    end else begin
      done <= 1'b0;
      if (arg_valid && !busy) begin
        busy        <= 1'b1;
        base_q      <= insn.wBase;
        wlen_q      <= insn.wLen;
        seen_last_q <= 1'b0;
        v_q         <= '0;
        line_q      <= '0;
        ack_q       <= '0;
        wr_data     <= '0;
      end
      if (in_valid && in_ready) begin
        wr_data[v_q*P*8 +: P*8] <= in_q;
        v_q <= (v_q == VB'(VPL - 1)) ? '0 : v_q + 1'b1;
        if (in_last) seen_last_q <= 1'b1;
        if (in_last || v_q == VB'(VPL - 1)) wr_valid <= 1'b1;
      end
      if (wr_valid && wr_ready) begin
        wr_valid <= 1'b0;
        wr_data  <= '0;
        line_q   <= line_q + 1'b1;
      end
      if (wr_ack) ack_q <= ack_q + 1'b1;
      if (busy && seen_last_q && !wr_valid && ack_q == wlen_q) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign wr_addr = base_q + addr_t'(line_q);

  initial assert (VPL * P == LINE_BYTES);
endmodule
