// End-to-end test of the programmable LeNet-5 accelerator at its default size.
//
// Loads a five-instruction program into the host memory model and runs it:
//   1. convolution, one line per patch (PartialSum PASS), average pooling on;
//   2. convolution, two lines per patch (PartialSum PART), pooling off;
//   3. fully connected layer reading layer 2's output directly, with a weight
//      stream that ends inside a group of P lines (partly flagged vector);
//   4. fully connected layer in PartialSum FULL mode;
//   5. convolution without pooling, fast enough to back up the pipeline.
// A reference model in this file runs the same program on its own copy of the
// memory, from the instruction semantics alone, and every output line is
// compared. Host ready signals drop at random. The test also counts how often
// each mechanism happened (read stall, write stall, each opCfc, each opPsum
// mode, pooling, bypass, partly flagged weight group, datapath back-pressure)
// and fails for any that never did.
module tb_shc_top;
  import shc_pkg::*;
  localparam int P = 16;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic busy, done;
  logic h_rd_req_valid, h_rd_req_ready, h_rd_rsp_valid;
  addr_t h_rd_req_addr, h_wr_addr;
  line_t h_rd_rsp_data, h_wr_data;
  logic h_wr_valid, h_wr_ready, h_wr_ack;
  int checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;

  shc_top u_dut (
    .clk, .rst, .start, .busy, .done,
    .h_rd_req_valid, .h_rd_req_ready, .h_rd_req_addr, .h_rd_rsp_valid, .h_rd_rsp_data,
    .h_wr_valid, .h_wr_ready, .h_wr_addr, .h_wr_data, .h_wr_ack
  );

  host_mem_model #(.LINES(4096), .LAT(5), .STALL(1'b1)) u_mem (
    .clk, .rst,
    .rd_req_valid(h_rd_req_valid), .rd_req_ready(h_rd_req_ready), .rd_req_addr(h_rd_req_addr),
    .rd_rsp_valid(h_rd_rsp_valid), .rd_rsp_data(h_rd_rsp_data),
    .wr_valid(h_wr_valid), .wr_ready(h_wr_ready), .wr_addr(h_wr_addr), .wr_data(h_wr_data),
    .wr_ack(h_wr_ack)
  );

  line_t ref_mem [4096];
  insn_t prog [5];

  // ---------------- reference model ----------------
  function automatic int sbyte(line_t l, int i);
    return int'($signed(l[8*i +: 8]));
  endfunction
  function automatic int sword(line_t l, int i);
    return int'($signed(l[32*i +: 32]));
  endfunction
  function automatic int dot(line_t a, line_t b);
    int s = 0;
    for (int i = 0; i < 64; i++) s += sbyte(a, i) * sbyte(b, i);
    return s;
  endfunction

  int dpv [256][P];
  int psv [256][P];
  int qv  [256][P];
  int pv  [256][P];

  task automatic ref_insn(insn_t I);
    int nvec, K, nps, nq, npo, idx;
    line_t img, w, ol;
    K    = (I.opCfc == CFC_CONV) ? int'(I.kLen) / P : int'(I.iLen);
    nvec = (I.opCfc == CFC_CONV) ? int'(I.iLen) : (int'(I.kLen) + P - 1) / P;
    for (int t = 0; t < nvec; t++) begin
      for (int p = 0; p < P; p++) begin
        if (I.opCfc == CFC_CONV) begin
          img = ref_mem[I.iBase + t];
          w   = ref_mem[I.kBase + (t % K) * P + p];
        end else begin
          img = ref_mem[I.iBase + (t % K)];
          idx = t * P + p;
          w   = (idx < int'(I.kLen)) ? ref_mem[I.kBase + idx] : '0;
        end
        dpv[t][p] = dot(img, w);
      end
    end
    nps = 0;
    if (I.opPsum == PSUM_PASS) begin
      for (int t = 0; t < nvec; t++) psv[t] = dpv[t];
      nps = nvec;
    end else if (I.opPsum == PSUM_PART) begin
      for (int t = 0; t < nvec; t++) begin
        if (t % K == 0) for (int p = 0; p < P; p++) psv[nps][p] = 0;
        for (int p = 0; p < P; p++) psv[nps][p] += dpv[t][p];
        if (t % K == K - 1 || t == nvec - 1) nps++;
      end
    end else begin
      for (int p = 0; p < P; p++) psv[0][p] = 0;
      for (int t = 0; t < nvec; t++) for (int p = 0; p < P; p++) psv[0][0] += dpv[t][p];
      nps = 1;
    end
    for (int n = 0; n < nps; n++) begin
      for (int p = 0; p < P; p++) begin
        longint acc, v;
        acc = longint'(psv[n][p] + sword(ref_mem[I.bBase + n % I.bLen], p));
        v = ((acc * longint'(sword(ref_mem[I.qsBase + n % I.bLen], p)) + 32768) >>> 16)
            + longint'($signed(I.qz));
        if (v < longint'($signed(I.qz))) v = longint'($signed(I.qz));
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        qv[n][p] = int'(v);
      end
    end
    nq = nps;
    npo = 0;
    if (I.opPool) begin
      for (int n = 0; n < nq; n++) begin
        if (n % 4 == 0) for (int p = 0; p < P; p++) pv[npo][p] = 0;
        for (int p = 0; p < P; p++) pv[npo][p] += qv[n][p];
        if (n % 4 == 3 || n == nq - 1) begin
          for (int p = 0; p < P; p++) pv[npo][p] = pv[npo][p] >>> 2;
          npo++;
        end
      end
    end else begin
      for (int n = 0; n < nq; n++) pv[n] = qv[n];
      npo = nq;
    end
    for (int l = 0; l < (npo + 3) / 4; l++) begin
      ol = '0;
      for (int v = 0; v < 4; v++)
        if (l * 4 + v < npo)
          for (int p = 0; p < P; p++) ol[(v * P + p) * 8 +: 8] = 8'(pv[l * 4 + v][p]);
      ref_mem[I.wBase + l] = ol;
    end
  endtask

  // ---------------- stimulus ----------------
  function automatic line_t rnd_bytes(int lo, int hi);
    line_t l;
    for (int i = 0; i < 64; i++) l[8*i +: 8] = 8'($urandom_range(0, hi - lo) + lo);
    return l;
  endfunction
  function automatic line_t rnd_words(int lo, int hi);
    line_t l;
    for (int i = 0; i < 16; i++) l[32*i +: 32] = 32'($urandom_range(0, hi - lo) + lo);
    return l;
  endfunction

  function automatic insn_t mk(op_cfc_e cfc, op_psum_e ps, logic pool, int ib, int il, int kb,
                               int kl, int bb, int bl, int qb, int qz, int wb, int wl);
    insn_t I;
    I = '0;
    I.opCfc = cfc; I.opPsum = ps; I.opPool = pool;
    I.iBase = addr_t'(ib); I.iLen = len_t'(il); I.kBase = addr_t'(kb); I.kLen = len_t'(kl);
    I.bBase = addr_t'(bb); I.bLen = len_t'(bl); I.qsBase = addr_t'(qb); I.qz = 8'(qz);
    I.wBase = addr_t'(wb); I.wLen = len_t'(wl);
    return I;
  endfunction

  // mechanism counters
  int n_conv = 0, n_fc = 0, n_pass = 0, n_part = 0, n_full = 0, n_pool = 0, n_bypass = 0;
  int n_flagged = 0, n_backpressure = 0, n_zipwait = 0, n_insn = 0;

  always @(posedge clk) if (!rst) begin
    cycles <= cycles + 1;
    if (u_dut.u_body.go) begin
      n_insn <= n_insn + 1;
      if (u_dut.insn.opCfc == CFC_CONV) n_conv <= n_conv + 1; else n_fc <= n_fc + 1;
      if (u_dut.insn.opPsum == PSUM_PASS) n_pass <= n_pass + 1;
      if (u_dut.insn.opPsum == PSUM_PART) n_part <= n_part + 1;
      if (u_dut.insn.opPsum == PSUM_FULL) n_full <= n_full + 1;
      if (u_dut.insn.opPool) n_pool <= n_pool + 1; else n_bypass <= n_bypass + 1;
    end
    if (u_dut.u_body.u_fc_w.out_valid && u_dut.u_body.u_fc_w.out_ready
        && !(&u_dut.u_body.u_fc_w.flags)) n_flagged <= n_flagged + 1;
    if ((u_dut.u_body.po_valid && !u_dut.u_body.po_ready) || (u_dut.u_body.rq_valid && !u_dut.u_body.rq_ready)
        || (u_dut.u_body.dp_valid && !u_dut.u_body.dp_ready)) n_backpressure <= n_backpressure + 1;
    if (u_dut.u_body.a_valid && !u_dut.u_body.b_valid) n_zipwait <= n_zipwait + 1;
  end

  task automatic check_mech(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end else $display("mechanism %-22s %0d", name, n);
  endtask

  initial begin
    // watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = '0;
    prog[0] = mk(CFC_CONV, PSUM_PASS, 1'b1, 100, 32, 200, 16,  300, 1, 310, -3, 400, 2);
    prog[1] = mk(CFC_CONV, PSUM_PART, 1'b0, 500, 32, 600, 32,  301, 1, 311, -5, 700, 4);
    prog[2] = mk(CFC_FC,   PSUM_PART, 1'b0, 700, 4,  800, 120, 302, 2, 312, 0,  1000, 1);
    prog[3] = mk(CFC_FC,   PSUM_FULL, 1'b0, 1000, 1, 1100, 16, 304, 1, 314, 2, 1200, 1);
    prog[4] = mk(CFC_CONV, PSUM_PASS, 1'b0, 100, 32, 200, 16,  300, 1, 310, 4, 1300, 8);
    u_mem.mem[0] = line_t'(5);
    for (int i = 0; i < 5; i++) u_mem.mem[1 + i] = line_t'(prog[i]);
    for (int i = 0; i < 32; i++)  u_mem.mem[100 + i] = rnd_bytes(-20, 20);
    for (int i = 0; i < 16; i++)  u_mem.mem[200 + i] = rnd_bytes(-20, 20);
    for (int i = 0; i < 32; i++)  u_mem.mem[500 + i] = rnd_bytes(-30, 30);
    for (int i = 0; i < 32; i++)  u_mem.mem[600 + i] = rnd_bytes(-20, 20);
    for (int i = 0; i < 120; i++) u_mem.mem[800 + i] = rnd_bytes(-10, 10);
    for (int i = 0; i < 16; i++)  u_mem.mem[1100 + i] = rnd_bytes(-10, 10);
    for (int i = 0; i < 5; i++)   u_mem.mem[300 + i] = rnd_words(-2000, 2000);
    for (int i = 0; i < 5; i++)   u_mem.mem[310 + i] = rnd_words(500, 4000);
    for (int i = 0; i < 4096; i++) ref_mem[i] = u_mem.mem[i];
    for (int i = 0; i < 5; i++) ref_insn(prog[i]);

    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);

    for (int a = 400; a < 1320; a++) begin
      if (ref_mem[a] != u_mem.mem[a]) begin
        failures++;
        if (failures < 6) $display("FAIL line %0d: got %h exp %h", a, u_mem.mem[a], ref_mem[a]);
      end
      checks++;
    end
    checks++;
    if (u_mem.n_writes != 16) begin
      failures++;
      $display("FAIL writes %0d, expected 16", u_mem.n_writes);
    end
    checks++;
    if (n_insn != 5) begin
      failures++;
      $display("FAIL executed %0d instructions", n_insn);
    end
    check_mech("host read stall", u_mem.rd_stalls);
    check_mech("host write stall", u_mem.wr_stalls);
    check_mech("conv (opCfc=0)", n_conv);
    check_mech("fc (opCfc=1)", n_fc);
    check_mech("psum PASS", n_pass);
    check_mech("psum PART", n_part);
    check_mech("psum FULL", n_full);
    check_mech("avg pool", n_pool);
    check_mech("pool bypass", n_bypass);
    check_mech("partly flagged group", n_flagged);
    check_mech("pipeline back-pressure", n_backpressure);
    check_mech("zip waits for operand b", n_zipwait);
    $display("cycles %0d, host reads %0d", cycles, u_mem.n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
