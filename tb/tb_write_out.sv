// Test of write_out at P = 16 (four vectors per line) against the host model
// with random write stalls: streams of 8 and 6 vectors must land as 2 lines
// each at wBase, the second stream's last line half filled and zero padded;
// done must pulse only after every write is acknowledged. The host model's
// acknowledgements are delayed by four more cycles here, so a unit that does
// not wait for them reports done too early.
module tb_write_out;
  import shc_pkg::*;
  localparam int P = 16;
  logic clk = 1'b0, rst = 1'b1, arg_valid = 1'b0;
  insn_t insn;
  logic busy, done, in_valid, in_ready, in_last;
  logic signed [P-1:0][7:0] in_q;
  logic wr_valid, wr_ready, wr_ack, ack_m;
  logic [3:0] ack_sr = '0;
  int acks = 0;
  addr_t wr_addr;
  line_t wr_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  write_out #(.P(P)) dut (.*);
  host_mem_model #(.LINES(256), .LAT(2), .STALL(1'b1)) mem (
    .clk, .rst, .rd_req_valid(1'b0), .rd_req_ready(), .rd_req_addr('0), .rd_rsp_valid(),
    .rd_rsp_data(), .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_ack(ack_m)
  );

  // late acknowledgements: the host model's pulse, four cycles later
  always_ff @(posedge clk) begin
    if (rst) ack_sr <= '0;
    else     ack_sr <= {ack_sr[2:0], ack_m};
    if (wr_ack && !rst) acks <= acks + 1;
  end
  assign wr_ack = ack_sr[3];

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

  logic [P*8-1:0] v [16];

  task automatic run(int wb, int n);
    int sent = 0, nl;
    bit took = 1'b0, seen_done = 1'b0;
    line_t e;
    nl = (n + 3) / 4;
    insn = '0;
    insn.wBase = addr_t'(wb);
    insn.wLen = len_t'(nl);
    for (int t = 0; t < n; t++) v[t] = {4{32'($urandom())}};
    arg_valid = 1'b1;
    @(negedge clk);
    arg_valid = 1'b0;
    while (!seen_done) begin
      if (!in_valid || took) begin
        in_valid = (sent < n) && 1'($urandom_range(0, 1));
        if (in_valid) begin
          in_q = v[sent];
          in_last = (sent == n - 1);
        end
      end
      #1;
      took = in_valid && in_ready;
      if (done) begin
        seen_done = 1'b1;
        chk(mem.n_writes == total_lines + nl, "done only after all writes");
        chk(acks == total_lines + nl, $sformatf("done only after all acknowledgements (%0d of %0d)", acks, total_lines + nl));
      end
      @(negedge clk);
      if (took) sent++;
    end
    in_valid = 1'b0;
    total_lines += nl;
    for (int l = 0; l < nl; l++) begin
      e = '0;
      for (int j = 0; j < 4; j++) if (l * 4 + j < n) e[j*P*8 +: P*8] = v[l * 4 + j];
      chk(mem.mem[wb + l] == e, $sformatf("line %0d", wb + l));
    end
    chk(mem.mem[wb + nl] == '0, "nothing written past wLen");
  endtask

  int total_lines = 0;

  initial begin
    in_valid = 1'b0; in_last = 1'b0; in_q = '0; insn = '0;
    for (int i = 0; i < 256; i++) mem.mem[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run(40, 8);
    run(60, 6);
    run(80, 13);
    chk(mem.wr_stalls > 0, "write stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
