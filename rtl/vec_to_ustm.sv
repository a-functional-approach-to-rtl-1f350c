// VecToUStm: flagged vector to upper-bounded stream.
//
// Loads a vector of N elements, each paired with a flag, into a shift
// register and emits the elements one per cycle from position 0. Emission stops
// at the first false flag: everything from there on is ignored, so the output
// stream has the run-time length of the leading run of true flags. A vector
// whose first flag is false produces no element.
//
// Interface: in_vec/in_flag is taken with a valid/ready handshake when the unit
// is empty; out_* is the element stream with `last` on its final element.
// Timing: the first element is valid the cycle after the vector is taken; one
// element per cycle while out_ready is high. A new vector is taken in the
// cycle the last element leaves, so back-to-back vectors stream without a gap. The document describes the
// single-shift-register structure; the handshake is this design's choice.
module vec_to_ustm #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_vec [N],
  input  logic [N-1:0] in_flag,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         out_last
);
  logic [W-1:0] sh_q [N];
  logic [N-1:0] fl_q;

  assign out_valid = fl_q[0];
  assign out_data  = sh_q[0];
  assign out_last  = fl_q[0] && ((N == 1) || !fl_q[N > 1 ? 1 : 0]);
  assign in_ready  = !fl_q[0] || (out_ready && out_last);

  always_ff @(posedge clk) begin
    if (rst) begin
      fl_q <= '0;
    end else if (in_valid && in_ready) begin
      fl_q <= in_flag;
      for (int i = 0; i < N; i++) sh_q[i] <= in_vec[i];
    end else if (out_valid && out_ready) begin
      // shift towards position 0; a false flag at the head ends the stream
      fl_q <= out_last ? '0 : (fl_q >> 1);
      for (int i = 0; i < N - 1; i++) sh_q[i] <= sh_q[i+1];
    end
  end
endmodule
