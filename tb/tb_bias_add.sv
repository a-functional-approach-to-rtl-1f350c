// Test of bias_add at P = 4: loads bias lines from the host model (random
// stalls) and checks, for a one-line (convolution-like) and a three-line
// (fully-connected-like) instruction, that vector n gets line n mod bLen added
// lane by lane; the stream must not pass before the biases are in.
module tb_bias_add;
  import shc_pkg::*;
  localparam int P = 4;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, arg_valid = 1'b0;
  insn_t insn;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic signed [P-1:0][ACC_W-1:0] in_y, out_y;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid;
  addr_t rd_req_addr;
  line_t rd_rsp_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bias_add #(.P(P), .BMAX(4)) dut (.*);
  host_mem_model #(.LINES(256), .LAT(6), .STALL(1'b1)) mem (
    .clk, .rst, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_ack()
  );

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

  int v [32][P];

  task automatic run(int bb, int bl, int n);
    int sent = 0, got = 0, b;
    bit took = 1'b0;
    insn = '0;
    insn.bBase = addr_t'(bb);
    insn.bLen = len_t'(bl);
    for (int t = 0; t < n; t++) for (int p = 0; p < P; p++) v[t][p] = $urandom_range(0, 200000) - 100000;
    arg_valid = 1'b1;
    @(negedge clk);
    arg_valid = 1'b0;
    chk(!in_ready, "held off while loading");
    while (got < n) begin
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
        for (int p = 0; p < P; p++) begin
          b = int'($signed(mem.mem[bb + got % bl][32*p +: 32]));
          chk(out_y[p] == v[got][p] + b, $sformatf("vector %0d lane %0d", got, p));
        end
        chk(out_last == (got == n - 1), "last");
        got++;
      end
      @(negedge clk);
      if (took) sent++;
    end
    in_valid = 1'b0;
    out_ready = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
  endtask

  initial begin
    in_valid = 1'b0; in_last = 1'b0; out_ready = 1'b0; in_y = '0; insn = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 16; j++) mem.mem[i][32*j +: 32] = 32'($urandom_range(0, 60000) - 30000);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run(10, 1, 6);
    run(20, 3, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
