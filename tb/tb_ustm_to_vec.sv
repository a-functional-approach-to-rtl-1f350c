// Test of ustm_to_vec: streams of random length (some not a multiple of N)
// are cut into vectors of N; every element, every flag and the last flag of
// each vector are checked under random producer and consumer stalls.
module tb_ustm_to_vec;
  localparam int N = 4, W = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, in_ready, in_last = 1'b0, out_valid, out_ready = 1'b0, out_last;
  logic [W-1:0] in_data = '0;
  logic [W-1:0] out_vec [N];
  logic [N-1:0] out_flag;
  int checks = 0, failures = 0;
  int exp_len [$];

  always #5 clk = ~clk;

  ustm_to_vec #(.N(N), .W(W)) dut (.clk, .rst, .in_valid, .in_ready, .in_data, .in_last,
                                  .out_valid, .out_ready, .out_vec, .out_flag, .out_last);

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

  // producer: stream s has length len; element i of stream s has value s*16+i
  int streams_done = 0;
  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int s = 0; s < 10; s++) begin
      n = (s == 0) ? N : $urandom_range(1, 3 * N);
      exp_len.push_back(n);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = W'(s * 16 + i);
        in_last  = (i == n - 1);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // consumer
  initial begin
    int s = 0, pos = 0, n;
    while (s < 10) begin
      out_ready <= ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (out_valid && out_ready && exp_len.size() > 0) begin
        n = exp_len[0];
        for (int j = 0; j < N; j++) begin
          chk(out_flag[j] == (pos + j < n), $sformatf("stream %0d flag %0d", s, j));
          if (pos + j < n) chk(out_vec[j] == W'(s * 16 + pos + j), $sformatf("element s%0d p%0d j%0d got %0d", s, pos, j, out_vec[j]));
        end
        pos += N;
        chk(out_last == (pos >= n), "vector last flag");
        if (pos >= n) begin
          void'(exp_len.pop_front());
          s++;
          pos = 0;
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
