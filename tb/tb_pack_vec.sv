// Test of pack_vec: all flag patterns of an 8-element vector with random data;
// the output must list the flagged elements in their original order, followed
// by zero elements with false flags.
module tb_pack_vec;
  localparam int N = 8, W = 8;
  logic [W-1:0] in_vec [N], out_vec [N];
  logic [N-1:0] in_flag, out_flag;
  int checks = 0, failures = 0;

  pack_vec #(.N(N), .W(W)) dut (.in_vec, .in_flag, .out_vec, .out_flag);

  initial begin
    int k;
    logic [W-1:0] e [N];
    for (int f = 0; f < (1 << N); f++) begin
      in_flag = N'(f);
      for (int i = 0; i < N; i++) in_vec[i] = W'($urandom());
      k = 0;
      for (int i = 0; i < N; i++) if (in_flag[i]) begin
        e[k] = in_vec[i];
        k++;
      end
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (out_flag[j] != (j < k) || (j < k && out_vec[j] != e[j]) || (j >= k && out_vec[j] != '0)) begin
          failures++;
          if (failures < 5) $display("FAIL flags %b position %0d", in_flag, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
