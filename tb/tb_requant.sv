// Test of requant at P = 4, QS = 16: loads scale lines from the host model
// (random stalls), then checks each lane of random 32-bit inputs against
//   clip8(max(round(acc * scale / 2^16) + qz, qz)),
// for a one-line and a two-line scale set and for positive and negative zero
// points, so that rounding, ReLU and both clip limits are exercised.
module tb_requant;
  import shc_pkg::*;
  localparam int P = 4;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, arg_valid = 1'b0;
  insn_t insn;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic signed [P-1:0][ACC_W-1:0] in_y;
  logic signed [P-1:0][7:0] out_q;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid;
  addr_t rd_req_addr;
  line_t rd_rsp_data;
  int checks = 0, failures = 0;
  int n_relu = 0, n_hi = 0, n_lo = 0;

  always #5 clk = ~clk;

  requant #(.P(P), .BMAX(4), .QS(16)) dut (.*);
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

  int v [64][P];

  function automatic int expq(int acc, int sc, int qz);
    longint r;
    r = ((longint'(acc) * longint'(sc) + 32768) >>> 16) + qz;
    if (r < qz) r = qz;
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return int'(r);
  endfunction

  task automatic run(int qb, int bl, int qz, int n);
    int sent = 0, got = 0, e, r0;
    bit took = 1'b0;
    insn = '0;
    insn.qsBase = addr_t'(qb);
    insn.bLen = len_t'(bl);
    insn.qz = 8'(qz);
    for (int t = 0; t < n; t++) for (int p = 0; p < P; p++) v[t][p] = $urandom_range(0, 4000000) - 2000000;
    arg_valid = 1'b1;
    @(negedge clk);
    arg_valid = 1'b0;
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
          e = expq(v[got][p], int'($signed(mem.mem[qb + got % bl][32*p +: 32])), qz);
          r0 = int'(((longint'(v[got][p]) * longint'($signed(mem.mem[qb + got % bl][32*p +: 32])) + 32768) >>> 16) + qz);
          if (r0 < qz) n_relu++;
          if (r0 > 127) n_hi++;
          chk(int'($signed(out_q[p])) == e, $sformatf("vector %0d lane %0d: %0d vs %0d", got, p, $signed(out_q[p]), e));
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
      for (int j = 0; j < 16; j++) mem.mem[i][32*j +: 32] = 32'($urandom_range(1, 9000));
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run(10, 1, 0, 20);
    run(20, 2, -100, 30);
    run(30, 1, 5, 20);
    checks++;
    if (n_relu == 0 || n_hi == 0) begin
      failures++;
      $display("FAIL ReLU (%0d) or upper clip (%0d) never exercised", n_relu, n_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
