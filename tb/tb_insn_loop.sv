// Test of insn_loop against the host model: a program of n instructions
// (n = 5, then 0, then 1) is placed at lines 1..n with the count at line 0. A
// stand-in body accepts each instruction, works for a random number of cycles
// and reports done. Each instruction must arrive whole and in order, never
// while the previous one is still running, and the loop's done must follow
// the last body done.
module tb_insn_loop;
  import shc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic busy, done, rd_req_valid, rd_req_ready, rd_rsp_valid, insn_valid, insn_ready, body_done;
  addr_t rd_req_addr;
  line_t rd_rsp_data;
  insn_t insn;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  insn_loop dut (.*);
  host_mem_model #(.LINES(64), .LAT(4), .STALL(1'b1)) mem (
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

  // stand-in body
  int got = 0, work = 0;
  bit running = 1'b0;
  insn_t prog [8];
  always @(negedge clk) begin
    body_done = 1'b0;
    insn_ready = !running;
    if (running) begin
      if (work == 0) begin
        running = 1'b0;
        body_done = 1'b1;
      end else work--;
    end
  end
  always @(posedge clk) if (!rst && insn_valid && insn_ready) begin
    chk(!running, "instruction while body busy");
    chk(insn == prog[got], $sformatf("instruction %0d", got));
    got <= got + 1;
    running = 1'b1;
    work = $urandom_range(0, 12);
  end

  task automatic run(int n);
    got = 0;
    mem.mem[0] = line_t'(n);
    for (int i = 0; i < n; i++) begin
      prog[i] = insn_t'({$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(),
                         $urandom(), $urandom()});
      mem.mem[1 + i] = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(),
                        $urandom(), $urandom(), 256'(prog[i])};
    end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    chk(busy, "busy after start");
    while (!done) @(negedge clk);
    chk(got == n, $sformatf("executed %0d of %0d", got, n));
    chk(!running, "done after the last body done");
    @(negedge clk);
    chk(!busy, "idle after done");
  endtask

  initial begin
    insn_ready = 1'b1;
    body_done = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run(5);
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
