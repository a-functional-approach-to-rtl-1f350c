// Test of switch_apply with a pool of three functions: for every selection and
// random handshake and data values, only the selected function may see the
// producer's valid and the consumer's ready, the argument must reach all of
// them, and the selected function's result, valid, last and ready must be the
// ones that come out.
module tb_switch_apply;
  localparam int N = 3, TW = 8, UW = 12;
  logic [1:0] sel;
  logic arg_valid, arg_ready, arg_last, f_arg_last, res_valid, res_ready, res_last;
  logic [TW-1:0] arg_data, f_arg_data;
  logic [N-1:0] f_arg_valid, f_arg_ready, f_res_valid, f_res_ready, f_res_last;
  logic [UW-1:0] f_res_data [N];
  logic [UW-1:0] res_data;
  int checks = 0, failures = 0;

  switch_apply #(.N(N), .TW(TW), .UW(UW)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      sel = 2'($urandom_range(0, N - 1));
      arg_valid = 1'($urandom()); arg_last = 1'($urandom()); arg_data = TW'($urandom());
      res_ready = 1'($urandom());
      f_arg_ready = N'($urandom()); f_res_valid = N'($urandom()); f_res_last = N'($urandom());
      for (int i = 0; i < N; i++) f_res_data[i] = UW'($urandom());
      #1;
      chk(f_arg_data == arg_data && f_arg_last == arg_last, "argument broadcast");
      for (int i = 0; i < N; i++) begin
        chk(f_arg_valid[i] == ((i == sel) ? arg_valid : 1'b0), "valid gating");
        chk(f_res_ready[i] == ((i == sel) ? res_ready : 1'b0), "ready gating");
      end
      chk(arg_ready == f_arg_ready[sel], "argument ready from selected");
      chk(res_valid == f_res_valid[sel] && res_last == f_res_last[sel], "result handshake mux");
      chk(res_data == f_res_data[sel], "result data mux");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
