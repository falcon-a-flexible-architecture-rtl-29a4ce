// falcon_pkg: types and constants shared by the Falcon co-processor.
//
// Falcon is a 256-bit SIMD machine with 16 registers whose lane width
// (8, 16, 32, 64, 128 or 256 bits) is a global setting. Lane widths are carried
// as a 3-bit code w = log2(width) - 3, so 0 means 8-bit lanes and 5 means a
// single 256-bit lane.
//
// Instruction formats follow the three encodings of the architecture (16-bit
// words, most significant field first):
//   short register form : [15:11] opcode  [10:8] R3  [7:4] R2  [3:0] R1
//   short immediate form: [15:11] opcode  [10:4] imm7          [3:0] R1
//   long form (LDi only): [15:11] opcode  [10:4] imm width     [3:0] R1
//                         followed by the immediate, least significant 16 bits first
// R3 is four bits wide once extended with R1[3] as its most significant bit.
// The opcode numbers, the width codes of SET_WIDTH and LDi, and the opcodes
// beyond those the architecture names (HALT, arithmetic, shifts, memory and
// buffer transfers) are this implementation's own choices.
package falcon_pkg;

  localparam int unsigned XLEN   = 256;  // register and datapath width
  localparam int unsigned NREGS  = 16;   // architectural registers
  localparam int unsigned NBYTES = XLEN / 8;
  localparam int unsigned NUNITS = 16;   // 16-bit execution lanes
  localparam int unsigned NWORDS = XLEN / 32;

  typedef logic [2:0] wcode_t;           // lane width = 8 << wcode
  localparam wcode_t W8 = 3'd0, W16 = 3'd1, W32 = 3'd2, W64 = 3'd3, W128 = 3'd4, W256 = 3'd5;

  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_HALT   = 5'd1,   // end of program
    OP_SETW   = 5'd2,   // SET_WIDTH imm7 (width code)
    OP_SETM   = 5'd3,   // SET_MASK R1
    OP_LDI    = 5'd4,   // LDi R1, imm (long form)
    OP_PERM   = 5'd5,   // PERMUTE R1, R2 (shuffle), R3 (data)
    OP_BSLICE = 5'd6,   // BITSLICE R1, R2
    OP_ADD    = 5'd7,
    OP_SUB    = 5'd8,
    OP_MUL    = 5'd9,   // low half of the lane product
    OP_AND    = 5'd10,
    OP_OR     = 5'd11,
    OP_XOR    = 5'd12,
    OP_NOT    = 5'd13,  // R1 = ~R2
    OP_SLI    = 5'd14,
    OP_SRI    = 5'd15,
    OP_ROLI   = 5'd16,
    OP_RORI   = 5'd17,
    OP_LD     = 5'd18,  // R1 = mem[R2 bits 31:0]
    OP_ST     = 5'd19,  // mem[R2 bits 31:0] = R1
    OP_IN     = 5'd20,  // R1 = next 256 bits of the input buffer
    OP_OUT    = 5'd21,  // output buffer <= R1
    OP_LOOPB  = 5'd22,  // LOOP_BEGIN count (bits 10:0), 32-bit aligned
    OP_LOOPE  = 5'd23,  // LOOP_END, 32-bit aligned
    OP_MOV    = 5'd24   // R1 = R2
  } opcode_e;

  // Decoded instruction handed from the frontend to the backend.
  typedef struct packed {
    opcode_e          op;
    logic [3:0]       rd;     // R1
    logic [3:0]       rs2;    // R2
    logic [3:0]       rs3;    // {R1[3], R3}
    logic [6:0]       imm7;
    wcode_t           width;  // lane width in force for this instruction
    logic [XLEN-1:0]  imm;    // LDi value already spread over 256 bits
  } uop_t;

  // Simple single-outstanding memory bus: a request is taken when valid and
  // ready are both high; exactly one response (read data or write
  // acknowledge) comes back later, in order.
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;    // byte address, word aligned
    logic [31:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] rdata;
  } bus_rsp_t;

  // Number of 16-bit halfwords that follow an LDi with immediate width code w.
  function automatic int unsigned ldi_halfwords(input wcode_t w);
    return (w <= W16) ? 1 : (1 << (w - 1));
  endfunction

  function automatic int unsigned lane_bits(input wcode_t w);
    return 8 << w;
  endfunction

endpackage
