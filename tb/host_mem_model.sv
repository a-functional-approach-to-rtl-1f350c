// Behavioural model of host memory as seen over the accelerator's host port.
//
// Not synthesizable logic of the design: it stands in for the host's shared
// memory reached over PCI-Express. Lines of 64 bytes are stored in an array
// that testbenches fill and inspect directly. Reads are answered in order after
// a fixed latency of LAT cycles; writes are stored when accepted and
// acknowledged one cycle later. With STALL set, the request and write ready
// signals drop at random, and the model counts the cycles in which a request
// waited (rd_stalls, wr_stalls).
module host_mem_model
  import shc_pkg::*;
#(
  parameter int unsigned LINES = 4096,
  parameter int unsigned LAT   = 4,
  parameter bit          STALL = 1'b1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  rd_req_valid,
  output logic  rd_req_ready,
  input  addr_t rd_req_addr,
  output logic  rd_rsp_valid,
  output line_t rd_rsp_data,
  input  logic  wr_valid,
  output logic  wr_ready,
  input  addr_t wr_addr,
  input  line_t wr_data,
  output logic  wr_ack
);
  line_t mem [LINES];
  logic  pv [LAT];
  line_t pd [LAT];
  int    rd_stalls, wr_stalls, n_reads, n_writes;

  assign rd_rsp_valid = pv[LAT-1];
  assign rd_rsp_data  = pd[LAT-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LAT; i++) pv[i] <= 1'b0;
      rd_req_ready <= 1'b1;
      wr_ready     <= 1'b1;
      wr_ack       <= 1'b0;
      rd_stalls    <= 0;
      wr_stalls    <= 0;
      n_reads      <= 0;
      n_writes     <= 0;
    end else begin
      rd_req_ready <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
      wr_ready     <= STALL ? ($urandom_range(0, 1) != 0) : 1'b1;
      if (rd_req_valid && !rd_req_ready) rd_stalls <= rd_stalls + 1;
      if (wr_valid && !wr_ready) wr_stalls <= wr_stalls + 1;
      pv[0] <= rd_req_valid && rd_req_ready;
      if (rd_req_valid && rd_req_ready) begin
        pd[0]   <= mem[rd_req_addr % LINES];
        n_reads <= n_reads + 1;
      end
      for (int i = 1; i < LAT; i++) begin
        pv[i] <= pv[i-1];
        pd[i] <= pd[i-1];
      end
      wr_ack <= wr_valid && wr_ready;
      if (wr_valid && wr_ready) begin
        mem[wr_addr % LINES] <= wr_data;
        n_writes <= n_writes + 1;
      end
    end
  end
endmodule
