// SwitchApply: run-time selection of one function out of a pool of N.
//
// The argument (payload and last flag) is wired to every function in the pool,
// but only the function picked by the zero-based run-time index `sel` sees the
// handshake: it receives the producer's valid, and the consumer's ready. All
// other functions get valid and ready held at 0, so they do nothing.
// Multiplexers steer the selected function's result, valid and last to the
// output and its ready back to the producer. Multiplexer count grows linearly
// with N. This is the structure the document describes; the port naming and
// the flattened arrays are this design's.
//
// Interface: arg_* from the producer, f_arg_* to the pool, f_res_* from the
// pool, res_* to the consumer. Purely combinational; `sel` must be held stable
// while a stream passes through.
module switch_apply #(
  parameter int unsigned N  = 2,
  parameter int unsigned TW = 8,   // argument width
  parameter int unsigned UW = 8,   // result width
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SW-1:0] sel,
  // argument from the producer
  input  logic          arg_valid,
  output logic          arg_ready,
  input  logic [TW-1:0] arg_data,
  input  logic          arg_last,
  // argument to each function
  output logic [N-1:0]  f_arg_valid,
  input  logic [N-1:0]  f_arg_ready,
  output logic [TW-1:0] f_arg_data,
  output logic          f_arg_last,
  // result of each function
  input  logic [N-1:0]  f_res_valid,
  output logic [N-1:0]  f_res_ready,
  input  logic [UW-1:0] f_res_data [N],
  input  logic [N-1:0]  f_res_last,
  // result to the consumer
  output logic          res_valid,
  input  logic          res_ready,
  output logic [UW-1:0] res_data,
  output logic          res_last
);
  assign f_arg_data = arg_data;
  assign f_arg_last = arg_last;

  always_comb begin
    f_arg_valid = '0;
    f_res_ready = '0;
    arg_ready   = 1'b0;
    res_valid   = 1'b0;
    res_data    = '0;
    res_last    = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (SW'(i) == sel) begin
        f_arg_valid[i] = arg_valid;
        f_res_ready[i] = res_ready;
        arg_ready      = f_arg_ready[i];
        res_valid      = f_res_valid[i];
        res_data       = f_res_data[i];
        res_last       = f_res_last[i];
      end
    end
  end
endmodule
