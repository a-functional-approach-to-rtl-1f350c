// Shared types and constants of the programmable LeNet-5 accelerator.
//
// The accelerator works on host-memory cache lines of 64 bytes (the PCI-Express
// granularity of the host read/write operations). Activations and weights are
// signed 8-bit integers; dot products and biases are 32-bit. One instruction
// occupies one cache line; its fields are those printed on the datapath figure
// of the LeNet-5 design (opCfc, opPsum, opPool, iBase/iLen, kBase/kLen,
// bBase/bLen, qsBase, qz, wBase/wLen). Field widths and the bit layout of the
// instruction word are this design's own choice.
package shc_pkg;

  localparam int unsigned LINE_BYTES = 64;              // bytes per host line
  localparam int unsigned LINE_W     = LINE_BYTES * 8;  // 512 bits
  localparam int unsigned ADDR_W     = 32;              // host line address
  localparam int unsigned LEN_W      = 16;              // stream length field
  localparam int unsigned ACC_W      = 32;              // dot-product accumulator

  typedef logic [LINE_W-1:0] line_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LEN_W-1:0]  len_t;

  // Operand-pair selection for the two data-generator SwitchApply stages.
  typedef enum logic [0:0] {
    CFC_CONV = 1'b0,   // streamed conv image lines x buffered conv weights
    CFC_FC   = 1'b1    // streamed FC weight lines  x buffered FC image
  } op_cfc_e;

  // PartialSum modes.
  typedef enum logic [1:0] {
    PSUM_PASS = 2'd0,  // pass each dot-product vector unchanged
    PSUM_PART = 2'd1,  // sum runs of K consecutive vectors lane by lane
    PSUM_FULL = 2'd2   // sum all lanes and accumulate over the whole stream
  } op_psum_e;

  // Instruction word, one per cache line (LSBs of the line).
  typedef struct packed {
    logic [7:0] qz;       // output zero point (signed int8)
    addr_t      qsBase;   // requantisation scale lines
    len_t       bLen;     // number of bias (and scale) lines
    addr_t      bBase;    // bias lines
    len_t       wLen;     // output lines to write
    addr_t      wBase;    // output base
    len_t       kLen;     // lines of the kernel/weight operand
    addr_t      kBase;
    len_t       iLen;     // lines of the image operand
    addr_t      iBase;
    logic       opPool;   // 1: average-pool the output
    op_psum_e   opPsum;
    op_cfc_e    opCfc;
  } insn_t;

  localparam int unsigned INSN_W = $bits(insn_t);

endpackage
