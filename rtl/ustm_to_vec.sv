// UStmToVec: upper-bounded stream to flagged vector.
//
// Collects up to N consecutive elements of an upper-bounded stream into a
// vector of N registers. Each element carries a flag: true for the elements
// that arrived, false for the rest, so a vector closed early by `last` still
// has the static size N. As in the document's sketch of this primitive, a
// counter steers each incoming element to its register and a shift register
// builds the flags by shifting in a 1 per element.
//
// Interface: in_* is the element stream; out_vec/out_flag/out_last is the
// vector, handed over with a valid/ready handshake. out_last repeats the `last`
// of the element that closed the vector, so a long stream becomes a stream of
// vectors. Timing: N input cycles (or fewer, up to last) fill a vector; it is
// presented the next cycle, and input is held off until it is taken.
module ustm_to_vec #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  input  logic         in_last,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_vec [N],
  output logic [N-1:0] out_flag,
  output logic         out_last
);
  localparam int unsigned CW = $clog2(N + 1);
  logic [CW-1:0] cnt_q;

  assign in_ready = !out_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_flag  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        out_flag  <= '0;
        cnt_q     <= '0;
      end
      if (in_valid && in_ready) begin
        out_vec[cnt_q[$clog2(N > 1 ? N : 2)-1:0]] <= in_data;
        out_flag <= {out_flag[N-2:0], 1'b1};
        cnt_q    <= cnt_q + 1'b1;
        if (in_last || cnt_q == CW'(N - 1)) begin
          out_valid <= 1'b1;
          out_last  <= in_last;
        end
      end
    end
  end
endmodule
