// Test of parallel_dp at P = 4, L = 64: random signed operands (including the
// extreme values -128 and 127) under random producer and consumer stalls;
// each result lane is compared with a dot product computed here, `last`
// must travel with its data, and with no stalls each result must appear one
// cycle after its operands at one result per cycle.
module tb_parallel_dp;
  import shc_pkg::*;
  localparam int P = 4, L = 64;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [P-1:0][L*8-1:0] in_a, in_b;
  logic signed [P-1:0][ACC_W-1:0] out_y;
  int checks = 0, failures = 0;
  int expq [$];
  bit lastq [$];

  always #5 clk = ~clk;

  parallel_dp #(.P(P), .L(L)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rb(int mode);
    if (mode == 1) return 8'h80;
    if (mode == 2) return 8'h7f;
    return 8'($urandom());
  endfunction

  initial begin
    int sent = 0, got = 0, s, e;
    bit stalls, took;
    took = 1'b0;
    in_valid = 1'b0; in_last = 1'b0; out_ready = 1'b0; in_a = '0; in_b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 3000 && got < 400; cyc++) begin
      stalls = (sent >= 20);        // the first 20 flow without stalls
      // consumer
      out_ready = stalls ? 1'($urandom_range(0, 1)) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        for (int p = 0; p < P; p++) begin
          e = expq.pop_front();
          chk(out_y[p] == e, $sformatf("result %0d lane %0d: %0d vs %0d", got, p, out_y[p], e));
        end
        chk(out_last == lastq.pop_front(), "last travels with data");
        got++;
        if (!stalls) chk(got == sent, "one-cycle latency");
      end
      // producer
      if (!in_valid || took) begin
        in_valid = (sent < 400) && (stalls ? 1'($urandom_range(0, 1)) : 1'b1);
        if (in_valid) begin
          for (int p = 0; p < P; p++) begin
            s = 0;
            for (int l = 0; l < L; l++) begin
              in_a[p][8*l +: 8] = rb((sent == 3) ? 1 : (sent == 4) ? 2 : 0);
              in_b[p][8*l +: 8] = rb((sent == 3) ? 1 : (sent == 4) ? 1 : 0);
              s += int'($signed(in_a[p][8*l +: 8])) * int'($signed(in_b[p][8*l +: 8]));
            end
            expq.push_back(s);
          end
          in_last = (sent % 7 == 6);
          lastq.push_back(in_last);
        end
      end
      #1;
      took = in_valid && in_ready;
      if (took) sent++;
      @(negedge clk);
    end
    chk(got == 400, $sformatf("received %0d results", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
