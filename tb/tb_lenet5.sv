// LeNet-5 inference on the accelerator at its default size.
//
// Runs the five layers of LeNet-5 on a random 28x28 image with random int8
// weights, 32-bit biases and requantisation scales:
//   conv1 5x5, 1 -> 6 channels, 24x24, 2x2 average pool -> 12x12x6
//   conv2 5x5, 6 -> 16 channels, 8x8, 2x2 average pool -> 4x4x16
//   fc1 256 -> 120, fc2 120 -> 84, fc3 84 -> 10
// The testbench plays the host. It lays out each layer's operands in the
// host memory model as the accelerator expects them:
// - im2col patches in pooling-window order
// - kernels as line k*P + p
// - FC weights as line (g*K + k)*P + p
// - one bias line and one scale line per group of P outputs
// Each convolution runs as a one-instruction program. The host re-lays out
// the pooled result into the next layer's patches. The three fully connected
// layers run as one three-instruction program, each reading its predecessor's
// output in place. fc3 uses a weight stream that ends inside a group, so its
// missing rows must read as zero.
// Every layer's output is compared with a direct, loop-by-loop reference
// computation of the same layer in this file:
//   acc = bias + sum(w * x); y = clip8(max(((acc*scale + 2^15) >>> 16) + qz, qz))
//   pooling: (a + b + c + d) >>> 2
// Channels and neurons beyond a layer's width must come out as zero. The
// cycle count of each program is printed.
module tb_lenet5;
  import shc_pkg::*;
  localparam int P = 16;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic busy, done;
  logic h_rd_req_valid, h_rd_req_ready, h_rd_rsp_valid;
  addr_t h_rd_req_addr, h_wr_addr;
  line_t h_rd_rsp_data, h_wr_data;
  logic h_wr_valid, h_wr_ready, h_wr_ack;
  int checks = 0, failures = 0;

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

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- network
  byte x  [28][28];
  byte w1 [6][5][5];      int b1 [6];   int s1 [6];
  byte w2 [16][5][5][6];  int b2 [16];  int s2 [16];
  byte f1 [120][256];     int fb1[120]; int fs1[120];
  byte f2 [84][120];      int fb2[84];  int fs2[84];
  byte f3 [10][84];       int fb3[10];  int fs3[10];
  // reference activations
  byte c1 [24][24][6];  byte p1 [12][12][6];
  byte c2 [8][8][16];   byte p2 [4][4][16];
  byte h1 [120]; byte h2 [84]; byte h3 [10];

  function automatic byte rq(longint acc, longint s, int qz);
    longint v;
    v = ((acc * s + (64'sd1 <<< 15)) >>> 16) + longint'(qz);
    if (v < qz) v = qz;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return byte'(v);
  endfunction

  function automatic byte pool4(byte a, byte b, byte c, byte d);
    int s;
    s = int'(a) + int'(b) + int'(c) + int'(d);
    return byte'(s >>> 2);
  endfunction

  function automatic byte rb(int lo, int hi);
    return byte'($urandom_range(0, hi - lo) + lo);
  endfunction

  function automatic int rw(int lo, int hi);
    return int'($urandom_range(0, hi - lo)) + lo;
  endfunction

  task automatic put(int line, int b, byte v);
    u_mem.mem[line][8*b +: 8] = v;
  endtask

  function automatic byte get(int line, int b);
    return byte'(u_mem.mem[line][8*b +: 8]);
  endfunction

  task automatic put_w(int line, int lane, int v);
    u_mem.mem[line][32*lane +: 32] = v;
  endtask

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

  function automatic insn_t mk(op_cfc_e cfc, op_psum_e ps, bit pool, int ib, int il, int kb,
                               int kl, int bb, int bl, int qb, int wb, int wl);
    insn_t I;
    I = '0;
    I.opCfc = cfc; I.opPsum = ps; I.opPool = pool;
    I.iBase = addr_t'(ib); I.iLen = len_t'(il); I.kBase = addr_t'(kb); I.kLen = len_t'(kl);
    I.bBase = addr_t'(bb); I.bLen = len_t'(bl); I.qsBase = addr_t'(qb); I.qz = 8'(0);
    I.wBase = addr_t'(wb); I.wLen = len_t'(wl);
    return I;
  endfunction

  insn_t prog [3];

  task automatic run_prog(int n, string name);
    int cyc = 0;
    u_mem.mem[0] = line_t'(n);
    for (int i = 0; i < n; i++) u_mem.mem[1 + i] = line_t'(prog[i]);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
    repeat (2) @(posedge clk);
    $display("%s: %0d cycles", name, cyc);
  endtask

  // memory map (lines)
  localparam int C1_IMG = 16,   C1_KER = 600,  C1_B = 620,  C1_S = 624,  C1_OUT = 640;
  localparam int C2_IMG = 700,  C2_KER = 900,  C2_B = 950,  C2_S = 952,  C2_OUT = 960;
  localparam int F1_W = 1000,   F1_B = 1520,   F1_S = 1530, F1_OUT = 1540;
  localparam int F2_W = 1600,   F2_B = 1800,   F2_S = 1810, F2_OUT = 1820;
  localparam int F3_W = 1830,   F3_B = 1860,   F3_S = 1862, F3_OUT = 1864;

  initial begin
    int acc, v, y, xx, t;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = '0;

    // random network and image
    foreach (x[i, j]) x[i][j] = rb(0, 63);
    foreach (w1[i, j, k]) w1[i][j][k] = rb(-8, 8);
    foreach (w2[i, j, k, l]) w2[i][j][k][l] = rb(-8, 8);
    foreach (f1[i, j]) f1[i][j] = rb(-8, 8);
    foreach (f2[i, j]) f2[i][j] = rb(-8, 8);
    foreach (f3[i, j]) f3[i][j] = rb(-8, 8);
    foreach (b1[i])  begin b1[i]  = rw(-500, 500); s1[i]  = rw(1500, 5000); end
    foreach (b2[i])  begin b2[i]  = rw(-500, 500); s2[i]  = rw(1500, 5000); end
    foreach (fb1[i]) begin fb1[i] = rw(-500, 500); fs1[i] = rw(1500, 5000); end
    foreach (fb2[i]) begin fb2[i] = rw(-500, 500); fs2[i] = rw(1500, 5000); end
    foreach (fb3[i]) begin fb3[i] = rw(-500, 500); fs3[i] = rw(1500, 5000); end

    // reference forward pass
    for (int c = 0; c < 6; c++)
      for (int i = 0; i < 24; i++)
        for (int j = 0; j < 24; j++) begin
          acc = b1[c];
          for (int ky = 0; ky < 5; ky++)
            for (int kx = 0; kx < 5; kx++) acc += int'(w1[c][ky][kx]) * int'(x[i+ky][j+kx]);
          c1[i][j][c] = rq(acc, s1[c], 0);
        end
    foreach (p1[i, j, c])
      p1[i][j][c] = pool4(c1[2*i][2*j][c], c1[2*i][2*j+1][c], c1[2*i+1][2*j][c], c1[2*i+1][2*j+1][c]);
    for (int c = 0; c < 16; c++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          acc = b2[c];
          for (int ky = 0; ky < 5; ky++)
            for (int kx = 0; kx < 5; kx++)
              for (int ci = 0; ci < 6; ci++)
                acc += int'(w2[c][ky][kx][ci]) * int'(p1[i+ky][j+kx][ci]);
          c2[i][j][c] = rq(acc, s2[c], 0);
        end
    foreach (p2[i, j, c])
      p2[i][j][c] = pool4(c2[2*i][2*j][c], c2[2*i][2*j+1][c], c2[2*i+1][2*j][c], c2[2*i+1][2*j+1][c]);
    for (int n = 0; n < 120; n++) begin
      acc = fb1[n];
      for (int i = 0; i < 256; i++) acc += int'(f1[n][i]) * int'(p2[i/64][(i/16)%4][i%16]);
      h1[n] = rq(acc, fs1[n], 0);
    end
    for (int n = 0; n < 84; n++) begin
      acc = fb2[n];
      for (int i = 0; i < 120; i++) acc += int'(f2[n][i]) * int'(h1[i]);
      h2[n] = rq(acc, fs2[n], 0);
    end
    for (int n = 0; n < 10; n++) begin
      acc = fb3[n];
      for (int i = 0; i < 84; i++) acc += int'(f3[n][i]) * int'(h2[i]);
      h3[n] = rq(acc, fs3[n], 0);
    end

    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    // ---------------------------------------------------------------- conv1
    // pixel v = ((py*12 + px)*4 + dy*2 + dx) at (2py+dy, 2px+dx); patch byte ky*5+kx
    for (int py = 0; py < 12; py++)
      for (int px = 0; px < 12; px++)
        for (int d = 0; d < 4; d++) begin
          v = (py * 12 + px) * 4 + d;
          y = 2 * py + d / 2;
          xx = 2 * px + d % 2;
          for (int ky = 0; ky < 5; ky++)
            for (int kx = 0; kx < 5; kx++) put(C1_IMG + v, ky * 5 + kx, x[y+ky][xx+kx]);
        end
    for (int c = 0; c < 6; c++) begin
      for (int ky = 0; ky < 5; ky++)
        for (int kx = 0; kx < 5; kx++) put(C1_KER + c, ky * 5 + kx, w1[c][ky][kx]);
      put_w(C1_B, c, b1[c]);
      put_w(C1_S, c, s1[c]);
    end
    prog[0] = mk(CFC_CONV, PSUM_PASS, 1'b1, C1_IMG, 576, C1_KER, P, C1_B, 1, C1_S, C1_OUT, 36);
    run_prog(1, "conv1");
    for (int v2 = 0; v2 < 144; v2++)
      for (int c = 0; c < P; c++)
        chk(get(C1_OUT + v2 / 4, (v2 % 4) * P + c) == ((c < 6) ? p1[v2/12][v2%12][c] : 8'sd0),
            $sformatf("conv1 pixel %0d channel %0d", v2, c));

    // ---------------------------------------------------------------- conv2
    // host im2col from the accelerator's own output; K = 3 lines per patch,
    // patch byte t = (ky*5 + kx)*6 + c
    for (int py = 0; py < 4; py++)
      for (int px = 0; px < 4; px++)
        for (int d = 0; d < 4; d++) begin
          v = (py * 4 + px) * 4 + d;
          y = 2 * py + d / 2;
          xx = 2 * px + d % 2;
          for (int ky = 0; ky < 5; ky++)
            for (int kx = 0; kx < 5; kx++)
              for (int c = 0; c < 6; c++) begin
                t = (ky * 5 + kx) * 6 + c;
                put(C2_IMG + v * 3 + t / 64, t % 64,
                    get(C1_OUT + ((y + ky) * 12 + xx + kx) / 4, (((y + ky) * 12 + xx + kx) % 4) * P + c));
              end
        end
    for (int o = 0; o < 16; o++) begin
      for (int ky = 0; ky < 5; ky++)
        for (int kx = 0; kx < 5; kx++)
          for (int c = 0; c < 6; c++) begin
            t = (ky * 5 + kx) * 6 + c;
            put(C2_KER + (t / 64) * P + o, t % 64, w2[o][ky][kx][c]);
          end
      put_w(C2_B, o, b2[o]);
      put_w(C2_S, o, s2[o]);
    end
    prog[0] = mk(CFC_CONV, PSUM_PART, 1'b1, C2_IMG, 192, C2_KER, 3 * P, C2_B, 1, C2_S, C2_OUT, 4);
    run_prog(1, "conv2");
    for (int v2 = 0; v2 < 16; v2++)
      for (int c = 0; c < P; c++)
        chk(get(C2_OUT + v2 / 4, (v2 % 4) * P + c) == p2[v2/4][v2%4][c],
            $sformatf("conv2 pixel %0d channel %0d", v2, c));

    // ------------------------------------------------------- fc1, fc2, fc3
    // fc1: input = conv2 output in place (byte i = pixel i/16, channel i%16), K = 4
    for (int n = 0; n < 120; n++) begin
      for (int i = 0; i < 256; i++) put(F1_W + ((n / P) * 4 + i / 64) * P + n % P, i % 64, f1[n][i]);
      put_w(F1_B + n / P, n % P, fb1[n]);
      put_w(F1_S + n / P, n % P, fs1[n]);
    end
    // fc2: K = 2 (inputs 120..127 have zero weights), 6 groups
    for (int n = 0; n < 84; n++) begin
      for (int i = 0; i < 120; i++) put(F2_W + ((n / P) * 2 + i / 64) * P + n % P, i % 64, f2[n][i]);
      put_w(F2_B + n / P, n % P, fb2[n]);
      put_w(F2_S + n / P, n % P, fs2[n]);
    end
    // fc3: K = 2, one group; the second slice holds only the 10 real rows
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < 84; i++) put(F3_W + (i / 64) * P + n, i % 64, f3[n][i]);
      put_w(F3_B, n, fb3[n]);
      put_w(F3_S, n, fs3[n]);
    end
    prog[0] = mk(CFC_FC, PSUM_PART, 1'b0, C2_OUT, 4, F1_W, 8 * 4 * P, F1_B, 8, F1_S, F1_OUT, 2);
    prog[1] = mk(CFC_FC, PSUM_PART, 1'b0, F1_OUT, 2, F2_W, 6 * 2 * P, F2_B, 6, F2_S, F2_OUT, 2);
    prog[2] = mk(CFC_FC, PSUM_PART, 1'b0, F2_OUT, 2, F3_W, P + 10, F3_B, 1, F3_S, F3_OUT, 1);
    run_prog(3, "fc1-fc3");
    for (int n = 0; n < 128; n++)
      chk(get(F1_OUT + n / 64, n % 64) == ((n < 120) ? h1[n] : 8'sd0), $sformatf("fc1 neuron %0d", n));
    for (int n = 0; n < 128; n++)
      chk(get(F2_OUT + n / 64, n % 64) == ((n < 84) ? h2[n] : 8'sd0), $sformatf("fc2 neuron %0d", n));
    for (int n = 0; n < 64; n++)
      chk(get(F3_OUT, n) == ((n < 10) ? h3[n] : 8'sd0), $sformatf("fc3 output %0d", n));
    chk(u_mem.n_writes == 36 + 4 + 2 + 2 + 1, $sformatf("%0d lines written", u_mem.n_writes));
    $write("class scores:");
    for (int n = 0; n < 10; n++) $write(" %0d", get(F3_OUT, n));
    $display("");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
