// AvgPool: average pooling over groups of consecutive output vectors.
//
// The host orders a convolution's output pixels so that the WIN pixels of each
// pooling window follow each other (WIN = 4 for LeNet-5's 2x2 windows). The
// unit adds WIN consecutive signed 8-bit vectors lane by lane in an
// accumulator and emits sum >>> log2(WIN) (an arithmetic shift, rounding
// towards minus infinity). A stream that ends inside a window closes it early.
//
// Interface: in_*/out_* are P-lane signed 8-bit vector streams with last.
// Timing: input every cycle while the output register is free; one output per
// WIN inputs, one cycle after the window's last input. The adder, the
// feedback and the shift follow the document's datapath figure; the window
// ordering is this design's choice.
module avg_pool #(
  parameter int unsigned P   = 16,
  parameter int unsigned WIN = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [P-1:0][7:0] in_q,
  input  logic                     in_last,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [P-1:0][7:0] out_q,
  output logic                     out_last
);
  localparam int unsigned SH = $clog2(WIN);
  localparam int unsigned AW = 8 + SH;
  localparam int unsigned CW = (WIN > 1) ? $clog2(WIN) : 1;

  logic signed [AW-1:0] acc_q [P];
  logic signed [AW-1:0] sum   [P];
  logic [CW-1:0]        cnt_q;
  logic                 emit;

  always_comb begin
    for (int p = 0; p < P; p++) sum[p] = acc_q[p] + AW'($signed(in_q[p]));
    emit = in_last || (cnt_q == CW'(WIN - 1));
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      cnt_q     <= '0;
      for (int p = 0; p < P; p++) acc_q[p] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (emit) begin
          out_valid <= 1'b1;
          out_last  <= in_last;
          cnt_q     <= '0;
          for (int p = 0; p < P; p++) begin
            out_q[p] <= 8'(sum[p] >>> SH);
            acc_q[p] <= '0;
          end
        end else begin
          cnt_q <= cnt_q + 1'b1;
          for (int p = 0; p < P; p++) acc_q[p] <= sum[p];
        end
      end
    end
  end

  initial assert ((1 << SH) == WIN);
endmodule
