// ParallelDP: P dot products of L signed 8-bit pairs per cycle.
//
// Row p of operand a and row p of operand b are multiplied lane by lane and
// the L products are summed by an adder tree into a 32-bit result for unit p.
// All P units work in parallel on one pair of 2D operands per handshake; this
// is where the accelerator's multipliers (the FPGA's DSP blocks) are. The
// result stage is a register with a valid/ready handshake: it takes a new
// operand pair whenever it is empty or its result is being taken, so a
// steady stream flows at one operand pair per cycle with one cycle latency.
// `last` travels with the data.
//
// Interface: in_* carries a and b (P rows of L bytes, lane l in bits
// [8l+7:8l] of a row); out_* carries the P sums. The document gives the
// function; the single-stage pipeline and the operand layout are this
// design's choices.
module parallel_dp
  import shc_pkg::*;
#(
  parameter int unsigned P = 16,
  parameter int unsigned L = LINE_BYTES
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [P-1:0][L*8-1:0]       in_a,
  input  logic [P-1:0][L*8-1:0]       in_b,
  input  logic                        in_last,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic signed [P-1:0][ACC_W-1:0] out_y,
  output logic                        out_last
);
  logic signed [ACC_W-1:0] dp [P];

  always_comb begin
    for (int p = 0; p < P; p++) begin
      dp[p] = '0;
      for (int l = 0; l < L; l++)
        dp[p] += ACC_W'($signed(in_a[p][8*l +: 8]) * $signed(in_b[p][8*l +: 8]));
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_last <= in_last;
        for (int p = 0; p < P; p++) out_y[p] <= dp[p];
      end
    end
  end
endmodule
