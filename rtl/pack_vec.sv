// PackVec: compact the flagged-true elements of a vector to its front.
//
// Combinational. Output position j receives the j-th element whose flag is
// true, counting from position 0, so the true elements keep their relative
// order; the output flags are true for the first (number of true inputs)
// positions and the remaining positions are zero. Each output position is a
// multiplexer over the input positions at or after it, which is why the
// document keeps packing separate from stream/vector conversion: it costs many
// multiplexers and can be skipped when a vector is known to be packed.
//
// Interface: in_vec/in_flag in, out_vec/out_flag out, no clock.
module pack_vec #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in_vec  [N],
  input  logic [N-1:0] in_flag,
  output logic [W-1:0] out_vec [N],
  output logic [N-1:0] out_flag
);
  localparam int unsigned CW = $clog2(N + 1);

  always_comb begin
    logic [CW-1:0] pos;
    pos = '0;
    for (int j = 0; j < N; j++) begin
      out_vec[j]  = '0;
      out_flag[j] = 1'b0;
    end
    for (int i = 0; i < N; i++) begin
      if (in_flag[i]) begin
        out_vec[pos[$clog2(N > 1 ? N : 2)-1:0]]  = in_vec[i];
        out_flag[pos[$clog2(N > 1 ? N : 2)-1:0]] = 1'b1;
        pos = pos + 1'b1;
      end
    end
  end
endmodule
