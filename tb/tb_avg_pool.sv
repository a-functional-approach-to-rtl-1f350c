// Test of avg_pool at P = 4, WIN = 4: random signed 8-bit vectors in streams
// of length 8 and 10 (the second ends inside a window); each output lane must
// be the window sum shifted right arithmetically by 2, with `last` on the
// final output, under random stalls.
module tb_avg_pool;
  localparam int P = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic signed [P-1:0][7:0] in_q, out_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  avg_pool #(.P(P), .WIN(4)) dut (.*);

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

  int v [16][P];
  int e [16][P];

  task automatic run(int n);
    int ne = 0, sent = 0, got = 0;
    bit took = 1'b0;
    for (int t = 0; t < n; t++) for (int p = 0; p < P; p++) v[t][p] = $urandom_range(0, 255) - 128;
    for (int t = 0; t < n; t++) begin
      if (t % 4 == 0) for (int p = 0; p < P; p++) e[ne][p] = 0;
      for (int p = 0; p < P; p++) e[ne][p] += v[t][p];
      if (t % 4 == 3 || t == n - 1) begin
        for (int p = 0; p < P; p++) e[ne][p] = e[ne][p] >>> 2;
        ne++;
      end
    end
    while (got < ne) begin
      out_ready = 1'($urandom_range(0, 1));
      if (!in_valid || took) begin
        in_valid = (sent < n) && 1'($urandom_range(0, 1));
        if (in_valid) begin
          for (int p = 0; p < P; p++) in_q[p] = 8'(v[sent][p]);
          in_last = (sent == n - 1);
        end
      end
      #1;
      took = in_valid && in_ready;
      if (out_valid && out_ready) begin
        for (int p = 0; p < P; p++)
          chk(int'($signed(out_q[p])) == e[got][p], $sformatf("out %0d lane %0d: %0d vs %0d", got, p, out_q[p], e[got][p]));
        chk(out_last == (got == ne - 1), "last on final output");
        got++;
      end
      @(negedge clk);
      if (took) sent++;
    end
    in_valid = 1'b0;
    out_ready = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    in_valid = 1'b0; in_last = 1'b0; out_ready = 1'b0; in_q = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run(8);
    run(10);
    run(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
