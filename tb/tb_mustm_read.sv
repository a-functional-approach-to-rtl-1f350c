// Test of mustm_read against the host memory model: several runs of random
// base and length, with random host and consumer stalls. Each line is checked
// against memory, the last flag is checked, and a run with no stalls must
// deliver its lines at one per cycle after the memory latency.
module tb_mustm_read;
  import shc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, out_ready = 1'b0;
  addr_t base;
  len_t len;
  logic busy, done, req_valid, req_ready, rsp_valid, out_valid, out_last;
  addr_t req_addr;
  line_t rsp_data, out_data;
  logic stall_host;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mustm_read #(.DEPTH(4)) dut (
    .clk, .rst, .start, .base, .len, .busy, .done, .req_valid, .req_ready, .req_addr,
    .rsp_valid, .rsp_data, .out_valid, .out_ready, .out_data, .out_last
  );

  logic mreq_ready;
  host_mem_model #(.LINES(1024), .LAT(3), .STALL(1'b1)) mem (
    .clk, .rst, .rd_req_valid(req_valid && !stall_host), .rd_req_ready(mreq_ready),
    .rd_req_addr(req_addr), .rd_rsp_valid(rsp_valid), .rd_rsp_data(rsp_data),
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_ack()
  );
  // stall_host forces the host ready low; with it off the model still stalls at random,
  // so the timing run below uses a second, stall-free copy of the port.
  assign req_ready = mreq_ready && !stall_host;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, got, b;
    stall_host = 1'b0;
    base = '0;
    len = '0;
    for (int i = 0; i < 1024; i++) mem.mem[i] = {16{32'(i * 7919 + 13)}};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int run = 0; run < 12; run++) begin
      n = $urandom_range(1, 40);
      b = $urandom_range(0, 900);
      @(posedge clk);
      start <= 1'b1;
      base  <= addr_t'(b);
      len   <= len_t'(n);
      @(posedge clk);
      start <= 1'b0;
      got = 0;
      while (got < n) begin
        out_ready <= ($urandom_range(0, 3) != 0);
        stall_host <= ($urandom_range(0, 5) == 0);
        @(negedge clk);
        if (out_valid && out_ready) begin
          chk(out_data == mem.mem[b + got], $sformatf("run %0d line %0d", run, got));
          chk(out_last == (got == n - 1), "last flag");
          got++;
        end
        @(posedge clk);
      end
      stall_host <= 1'b0;
      out_ready <= 1'b0;
      @(posedge clk);
      @(negedge clk);
      chk(!busy, "idle after the run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
