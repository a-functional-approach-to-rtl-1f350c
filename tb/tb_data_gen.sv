// Test of the four data generators (ReadConvImages, ReadFCWeight,
// ReadConvWeight, ReadFCImages) at P = 4, each on its own port of a host
// memory interface in front of the host model (random stalls):
//  - conv images: each line broadcast to all rows, last on the final line;
//  - FC weights: groups of P lines as rows, a short final group padded with
//    zero rows, last on the final group;
//  - conv weights: after loading, slices 0..K-1 of all kernels repeat;
//  - FC images: after loading, lines 0..K-1 repeat, broadcast to all rows;
//  clear must return the buffered generators to idle.
module tb_data_gen;
  import shc_pkg::*;
  localparam int P = 4;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  logic [3:0] arg_valid, arg_ready, out_valid, out_ready, out_last;
  logic [3:0] rq_valid, rq_ready, rs_valid;
  addr_t rq_addr [4];
  line_t rs_data;
  logic [P-1:0][LINE_W-1:0] od [4];
  logic h_req_valid, h_req_ready, h_rsp_valid;
  addr_t h_req_addr;
  line_t h_rsp_data;
  logic cw_loaded, fi_loaded;
  insn_t insn;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  host_mem_if #(.NPORT(4), .OUTS(8)) u_if (.clk, .rst, .rq_valid, .rq_ready, .rq_addr, .rs_valid,
    .rs_data, .h_req_valid, .h_req_ready, .h_req_addr, .h_rsp_valid, .h_rsp_data);
  host_mem_model #(.LINES(1024), .LAT(4), .STALL(1'b1)) mem (
    .clk, .rst, .rd_req_valid(h_req_valid), .rd_req_ready(h_req_ready), .rd_req_addr(h_req_addr),
    .rd_rsp_valid(h_rsp_valid), .rd_rsp_data(h_rsp_data),
    .wr_valid(1'b0), .wr_ready(), .wr_addr('0), .wr_data('0), .wr_ack()
  );

  read_conv_images #(.P(P)) g0 (.clk, .rst, .arg_valid(arg_valid[0]), .arg_ready(arg_ready[0]), .insn,
    .rd_req_valid(rq_valid[0]), .rd_req_ready(rq_ready[0]), .rd_req_addr(rq_addr[0]),
    .rd_rsp_valid(rs_valid[0]), .rd_rsp_data(rs_data),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(od[0]), .out_last(out_last[0]));
  read_fc_weight #(.P(P)) g1 (.clk, .rst, .arg_valid(arg_valid[1]), .arg_ready(arg_ready[1]), .insn,
    .rd_req_valid(rq_valid[1]), .rd_req_ready(rq_ready[1]), .rd_req_addr(rq_addr[1]),
    .rd_rsp_valid(rs_valid[1]), .rd_rsp_data(rs_data),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(od[1]), .out_last(out_last[1]));
  read_conv_weight #(.P(P), .KMAX(4)) g2 (.clk, .rst, .clear, .arg_valid(arg_valid[2]),
    .arg_ready(arg_ready[2]), .insn,
    .rd_req_valid(rq_valid[2]), .rd_req_ready(rq_ready[2]), .rd_req_addr(rq_addr[2]),
    .rd_rsp_valid(rs_valid[2]), .rd_rsp_data(rs_data),
    .out_valid(out_valid[2]), .out_ready(out_ready[2]), .out_data(od[2]), .out_last(out_last[2]),
    .loaded(cw_loaded));
  read_fc_images #(.P(P), .KMAX(4)) g3 (.clk, .rst, .clear, .arg_valid(arg_valid[3]),
    .arg_ready(arg_ready[3]), .insn,
    .rd_req_valid(rq_valid[3]), .rd_req_ready(rq_ready[3]), .rd_req_addr(rq_addr[3]),
    .rd_rsp_valid(rs_valid[3]), .rd_rsp_data(rs_data),
    .out_valid(out_valid[3]), .out_ready(out_ready[3]), .out_data(od[3]), .out_last(out_last[3]),
    .loaded(fi_loaded));

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

  // start generator g, then take n outputs, comparing each with exp_row(t, p)
  function automatic line_t exp_row(int g, int t, int p);
    int idx;
    case (g)
      0: return mem.mem[100 + t];                                  // iBase 100
      1: begin                                                     // kBase 200, kLen 10
        idx = t * P + p;
        return (idx < 10) ? mem.mem[200 + idx] : '0;
      end
      2: return mem.mem[300 + (t % 3) * P + p];                    // kBase 300, K 3
      default: return mem.mem[400 + (t % 3)];                      // iBase 400, K 3
    endcase
  endfunction

  task automatic run_gen(int g, int n, bit has_last);
    int t = 0;
    @(negedge clk);
    arg_valid = 4'(1 << g);
    chk(arg_ready[g], "generator idle before start");
    @(negedge clk);
    arg_valid = '0;
    while (t < n) begin
      out_ready = 4'($urandom_range(0, 1) << g);
      #1;
      if (out_valid[g] && out_ready[g]) begin
        for (int p = 0; p < P; p++) chk(od[g][p] == exp_row(g, t, p), $sformatf("gen %0d item %0d row %0d", g, t, p));
        if (has_last) chk(out_last[g] == (t == n - 1), $sformatf("gen %0d last flag", g));
        else chk(!out_last[g], "buffered generator never flags last");
        t++;
      end
      @(negedge clk);
    end
    out_ready = '0;
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem.mem[i] = {16{32'(i * 40503 + 7)}};
    arg_valid = '0;
    out_ready = '0;
    insn = '0;
    insn.iBase = 100; insn.iLen = 9; insn.kBase = 200; insn.kLen = 10;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run_gen(0, 9, 1'b1);
    run_gen(1, 3, 1'b1);
    insn.kBase = 300; insn.kLen = len_t'(3 * P);
    insn.iBase = 400; insn.iLen = 3;
    run_gen(2, 10, 1'b0);
    chk(cw_loaded, "conv weights loaded");
    run_gen(3, 8, 1'b0);
    chk(fi_loaded, "fc image loaded");
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    chk(!cw_loaded && !fi_loaded && arg_ready[2] && arg_ready[3], "clear empties the buffers");
    chk(!out_valid[2] && !out_valid[3], "no operand after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
