// PartialSum: combine dot-product vectors according to opPsum.
//
// Three modes serve small and large layers:
//   PASS  each P-lane vector is passed on unchanged (a dot product fits in one
//         line, K = 1);
//   PART  lane by lane, runs of K consecutive vectors are summed and one vector
//         is emitted per run; this completes dot products whose operands span
//         K lines (K is given per instruction, a stream ending early closes
//         the run);
//   FULL  all lanes of all vectors of the stream are summed into one scalar,
//         emitted in lane 0 (other lanes 0) when the stream ends.
// The emitted vector is registered; it carries `last` of the vector that
// closed it.
//
// Interface: mode and k are held for the whole stream; in_*/out_* are P-lane
// 32-bit vector streams. Timing: input accepted every cycle while the output
// register is free; an emitted vector appears one cycle after its closing
// input. The document lists the three modes; their exact arithmetic is this
// design's reading of them.
module partial_sum
  import shc_pkg::*;
#(
  parameter int unsigned P = 16
) (
  input  logic                           clk,
  input  logic                           rst,
  input  op_psum_e                       mode,
  input  len_t                           k,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic signed [P-1:0][ACC_W-1:0] in_y,
  input  logic                           in_last,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic signed [P-1:0][ACC_W-1:0] out_y,
  output logic                           out_last
);
  logic signed [P-1:0][ACC_W-1:0] acc_q, sum;
  logic signed [ACC_W-1:0]        lane_sum;
  len_t                           cnt_q;
  logic                           emit;

  always_comb begin
    lane_sum = '0;
    for (int p = 0; p < P; p++) lane_sum += in_y[p];
    sum = '0;
    unique case (mode)
      PSUM_PART: for (int p = 0; p < P; p++) sum[p] = acc_q[p] + in_y[p];
      PSUM_FULL: sum[0] = acc_q[0] + lane_sum;
      default:   sum = in_y;
    endcase
    unique case (mode)
      PSUM_PART: emit = in_last || (cnt_q == k - 1'b1);
      PSUM_FULL: emit = in_last;
      default:   emit = 1'b1;
    endcase
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      acc_q     <= '0;
      cnt_q     <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (emit) begin
          out_valid <= 1'b1;
          out_y     <= sum;
          out_last  <= in_last;
          acc_q     <= '0;
          cnt_q     <= '0;
        end else begin
          acc_q <= sum;
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end
endmodule
