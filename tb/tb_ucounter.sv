// Test of ucounter: runs of random length (including 0 and the bound) under
// random consumer stalls; checks every index, the last flag, the number of
// elements, the done pulse, and that an uninterrupted run takes n cycles.
module tb_ucounter;
  localparam int N = 20;
  localparam int W = $clog2(N + 1);
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, ready = 1'b0;
  logic [W-1:0] len, idx;
  logic valid, last, done, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ucounter #(.N(N)) dut (.clk, .rst, .start, .len, .idx, .valid, .ready, .last, .done, .busy);

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
    bit stall;
    len = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int run = 0; run < 40; run++) begin
      n     = (run == 0) ? 0 : (run == 1) ? N : $urandom_range(1, N);
      stall = (run % 2 == 0);
      @(posedge clk);
      start <= 1'b1;
      len   <= W'(n);
      @(posedge clk);
      start <= 1'b0;
      got = 0;
      cyc = 0;
      if (n == 0) begin
        @(negedge clk);
        chk(done && !valid, "len 0 gives done and no element");
        continue;
      end
      while (1) begin
        ready <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
        @(negedge clk);
        cyc++;
        if (valid && ready) begin
          chk(idx == W'(got), $sformatf("idx %0d expected %0d", idx, got));
          chk(last == (got == n - 1), "last flag");
          got++;
          if (last) break;
        end
        @(posedge clk);
      end
      @(posedge clk);
      @(negedge clk);
      chk(done, "done after last");
      chk(got == n, "element count");
      if (!stall) chk(cyc == n, $sformatf("run of %0d took %0d cycles", n, cyc));
      ready <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
