// Test of partial_sum at P = 4 in all three modes, with streams whose length
// is and is not a multiple of K, under random stalls:
//   PASS each vector unchanged; PART lane sums of runs of K (a stream ending
//   early closes its run); FULL one scalar, the sum over all lanes and
//   vectors, in lane 0 with the other lanes zero. `last` must mark the final
//   output of each stream.
module tb_partial_sum;
  import shc_pkg::*;
  localparam int P = 4;
  logic clk = 1'b0, rst = 1'b1;
  op_psum_e mode;
  len_t k;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic signed [P-1:0][ACC_W-1:0] in_y, out_y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  partial_sum #(.P(P)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int v [64][P];
  int e [64][P];

  task automatic run(op_psum_e m, int kk, int n);
    int ne = 0, sent = 0, got = 0;
    bit took = 1'b0;
    mode = m;
    k = len_t'(kk);
    for (int t = 0; t < n; t++) for (int p = 0; p < P; p++) v[t][p] = $urandom_range(0, 2000) - 1000;
    // expected outputs
    if (m == PSUM_PASS) begin
      for (int t = 0; t < n; t++) e[t] = v[t];
      ne = n;
    end else if (m == PSUM_PART) begin
      for (int t = 0; t < n; t++) begin
        if (t % kk == 0) for (int p = 0; p < P; p++) e[ne][p] = 0;
        for (int p = 0; p < P; p++) e[ne][p] += v[t][p];
        if (t % kk == kk - 1 || t == n - 1) ne++;
      end
    end else begin
      for (int p = 0; p < P; p++) e[0][p] = 0;
      for (int t = 0; t < n; t++) for (int p = 0; p < P; p++) e[0][0] += v[t][p];
      ne = 1;
    end
    in_valid = 1'b0;
    while (got < ne) begin
      out_ready = 1'($urandom_range(0, 1));
      if (!in_valid || took) begin
        in_valid = (sent < n) && 1'($urandom_range(0, 1));
        if (in_valid) begin
          for (int p = 0; p < P; p++) in_y[p] = v[sent][p];
          in_last = (sent == n - 1);
        end
      end
      #1;
      took = in_valid && in_ready;
      if (out_valid && out_ready) begin
        for (int p = 0; p < P; p++) chk(out_y[p] == e[got][p], $sformatf("mode %0d out %0d lane %0d", m, got, p));
        chk(out_last == (got == ne - 1), "last marks the final output");
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
    in_valid = 1'b0; in_last = 1'b0; out_ready = 1'b0; in_y = '0; mode = PSUM_PASS; k = '1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run(PSUM_PASS, 1, 9);
    run(PSUM_PART, 3, 12);
    run(PSUM_PART, 4, 10);
    run(PSUM_PART, 1, 5);
    run(PSUM_FULL, 1, 7);
    run(PSUM_PART, 7, 21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
