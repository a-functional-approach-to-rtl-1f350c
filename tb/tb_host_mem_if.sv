// Test of host_mem_if: three readers issue reads at random to random
// addresses while the host model stalls at random. Each reader must receive
// exactly its own lines, in the order it asked for them, and when several ask
// in the same cycle the lowest port must win.
module tb_host_mem_if;
  import shc_pkg::*;
  localparam int NP = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic [NP-1:0] rq_valid, rq_ready, rs_valid;
  addr_t rq_addr [NP];
  line_t rs_data;
  logic h_req_valid, h_req_ready, h_rsp_valid;
  addr_t h_req_addr;
  line_t h_rsp_data;
  int checks = 0, failures = 0;
  line_t expq [NP][$];
  int received [NP];

  always #5 clk = ~clk;

  host_mem_if #(.NPORT(NP), .OUTS(4)) dut (.*);

  host_mem_model #(.LINES(256), .LAT(3), .STALL(1'b1)) mem (
    .clk, .rst, .rd_req_valid(h_req_valid), .rd_req_ready(h_req_ready), .rd_req_addr(h_req_addr),
    .rd_rsp_valid(h_rsp_valid), .rd_rsp_data(h_rsp_data),
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_ack()
  );

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued [NP];
    bit contested;
    for (int i = 0; i < 256; i++) mem.mem[i] = {16{32'(i * 2654435761)}};
    rq_valid = '0;
    for (int i = 0; i < NP; i++) begin
      rq_addr[i] = '0;
      issued[i] = 0;
      received[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // responses arriving this cycle
      for (int i = 0; i < NP; i++) if (rs_valid[i]) begin
        chk(expq[i].size() > 0, "response without request");
        if (expq[i].size() > 0) chk(rs_data == expq[i].pop_front(), $sformatf("port %0d data", i));
        received[i]++;
      end
      chk($countones(rs_valid) <= 1, "one response per cycle");
      // new requests from idle ports
      for (int i = 0; i < NP; i++) if (!rq_valid[i] && issued[i] < 100 && $urandom_range(0, 1)) begin
        rq_valid[i] = 1'b1;
        rq_addr[i]  = addr_t'($urandom_range(0, 255));
      end
      #1;
      contested = ($countones(rq_valid) > 1) && h_req_ready;
      for (int i = 0; i < NP; i++) if (rq_valid[i] && rq_ready[i]) begin
        if (contested) for (int j = 0; j < i; j++) chk(!rq_valid[j], "lowest port wins");
        expq[i].push_back(mem.mem[rq_addr[i]]);
        issued[i]++;
      end
      @(posedge clk);
      #1;
      // a granted request is released after the edge
      for (int i = 0; i < NP; i++) rq_valid[i] = rq_valid[i] && !granted_last[i];
    end
    for (int i = 0; i < NP; i++) chk(received[i] == 100, $sformatf("port %0d got %0d", i, received[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grants seen at each rising edge
  logic [NP-1:0] granted_last;
  always @(posedge clk) granted_last = rq_valid & rq_ready;
endmodule
