// UCounter: upper-bounded counter stream.
//
// Produces the stream 0, 1, ..., n-1, where the length n is given at run time
// and may be anything up to the static bound N. It is the source of every
// upper-bounded stream in the accelerator: reads, writes and the program
// counter are all driven by one. A start pulse loads n; the stream then flows
// under a valid/ready handshake, with `last` on the final element. If n is 0
// nothing is produced and `done` pulses in the cycle after start.
//
// Interface: start/len load a run; idx/valid/ready/last is the stream; done
// pulses once when the run has ended; busy is high while a run is in progress.
// Timing: the first element is valid the cycle after start, then one element
// per cycle while ready is high. That the length is a run-time input bounded by
// N follows the document; the start/done sideband is this design's choice.
module ucounter #(
  parameter int unsigned N = 1024,
  parameter int unsigned W = $clog2(N + 1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] len,
  output logic [W-1:0] idx,
  output logic         valid,
  input  logic         ready,
  output logic         last,
  output logic         done,
  output logic         busy
);
  logic [W-1:0] n_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      idx  <= '0;
      n_q  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        idx  <= '0;
        n_q  <= len;
        busy <= (len != '0);
        done <= (len == '0);
      end else if (valid && ready) begin
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assign valid = busy;
  assign last  = busy && (idx == n_q - 1'b1);

  // A run never exceeds the static bound.
  assert property (@(posedge clk) disable iff (rst) (start && !busy) |-> (len <= W'(N)));
endmodule
