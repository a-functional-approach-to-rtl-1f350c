// Instruction reduction loop: the programmable control of the accelerator.
//
// On start it reads host line 0, whose low 16 bits give the number of
// instructions n. A UCounter then produces the program counter 0..n-1 and the
// instruction lines 1..n are read as an upper-bounded stream (MUStm Read).
// Each instruction is handed to the body, and the loop waits for the body's
// done before handing over the next: the reduction's accumulator carries no
// data, it only orders the iterations so that one instruction finishes its
// writes before the next one reads. After the last one, `done` pulses.
//
// Interface: start/busy/done face the host driver; rd_* is the host read port;
// insn_valid/insn_ready/insn pass an instruction to the body, body_done comes
// back. Timing: the instruction stream is prefetched (up to the read FIFO
// depth) while the body works. Memory layout (count at line 0, instructions
// from line 1) follows the document's example; the field layout is in shc_pkg.
module insn_loop
  import shc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  output logic  busy,
  output logic  done,
  output logic  rd_req_valid,
  input  logic  rd_req_ready,
  output addr_t rd_req_addr,
  input  logic  rd_rsp_valid,
  input  line_t rd_rsp_data,
  output logic  insn_valid,
  input  logic  insn_ready,
  output insn_t insn,
  input  logic  body_done
);
  typedef enum logic [2:0] {IDLE, COUNT, LAUNCH, FETCH, RUN, FINISH} state_e;
  state_e state_q;

  logic  rd_start, rd_busy, rd_done;
  addr_t rd_base;
  len_t  rd_len;
  logic  l_valid, l_ready, l_last;
  line_t line;
  logic  last_q;
  len_t  n_q;

  mustm_read u_rd (
    .clk, .rst, .start(rd_start), .base(rd_base), .len(rd_len),
    .busy(rd_busy), .done(rd_done),
    .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr),
    .rsp_valid(rd_rsp_valid), .rsp_data(rd_rsp_data),
    .out_valid(l_valid), .out_ready(l_ready), .out_data(line), .out_last(l_last)
  );

  always_comb begin
    rd_start = 1'b0;
    rd_base  = '0;
    rd_len   = '0;
    if (state_q == IDLE && start) begin
      rd_start = 1'b1;          // line 0: instruction count
      rd_len   = len_t'(1);
    end else if (state_q == LAUNCH) begin
      rd_start = 1'b1;
      rd_base  = addr_t'(1);    // instructions follow the count
      rd_len   = n_q;
    end
  end

  assign l_ready    = (state_q == COUNT) || (state_q == FETCH && insn_ready);
  assign insn_valid = (state_q == FETCH) && l_valid;
  assign insn       = insn_t'(line[INSN_W-1:0]);
  assign busy       = (state_q != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= IDLE;
      done    <= 1'b0;
      last_q  <= 1'b0;
      n_q     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE:   if (start) state_q <= COUNT;
        COUNT:  if (l_valid) begin
                  n_q     <= line[LEN_W-1:0];
                  state_q <= (line[LEN_W-1:0] == '0) ? FINISH : LAUNCH;
                end
        LAUNCH: state_q <= FETCH;
        FETCH:  if (insn_valid && insn_ready) begin
                  last_q  <= l_last;
                  state_q <= RUN;
                end
        RUN:    if (body_done) state_q <= last_q ? FINISH : FETCH;
        FINISH: begin
                  done    <= 1'b1;
                  state_q <= IDLE;
                end
        default: state_q <= IDLE;
      endcase
    end
  end
endmodule
