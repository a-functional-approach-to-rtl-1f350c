// Test of vec_to_ustm: random vectors with random flag patterns; the stream
// must hold exactly the elements before the first false flag, in order, with
// last on the final one, and a vector starting with a false flag yields none.
// A vector with all flags true must stream in N consecutive cycles.
module tb_vec_to_ustm;
  localparam int N = 6, W = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, out_last;
  logic [W-1:0] in_vec [N];
  logic [N-1:0] in_flag;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vec_to_ustm #(.N(N), .W(W)) dut (.clk, .rst, .in_valid, .in_ready, .in_vec, .in_flag,
                                  .out_valid, .out_ready, .out_data, .out_last);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, got, cyc;
    logic [W-1:0] v [N];
    for (int i = 0; i < N; i++) in_vec[i] = '0;
    in_flag = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 30; t++) begin
      in_flag = N'($urandom());
      if (t == 0) in_flag = '1;
      if (t == 1) in_flag = N'(6'b111110);
      n = 0;
      while (n < N && in_flag[n]) n++;
      for (int i = 0; i < N; i++) begin
        v[i] = W'($urandom());
        in_vec[i] = v[i];
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
      got = 0;
      cyc = 0;
      while (got < n) begin
        out_ready <= (t == 0) ? 1'b1 : ($urandom_range(0, 2) != 0);
        @(negedge clk);
        cyc++;
        if (out_valid && out_ready) begin
          chk(out_data == v[got], $sformatf("vector %0d element %0d", t, got));
          chk(out_last == (got == n - 1), "last flag");
          got++;
        end
        @(posedge clk);
      end
      if (t == 0) chk(cyc == N, "full vector streams in N cycles");
      out_ready <= 1'b0;
      @(negedge clk);
      chk(!out_valid, "nothing after the first false flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
