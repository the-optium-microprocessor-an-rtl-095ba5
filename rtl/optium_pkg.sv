// optium_pkg - shared types and constants of the Optium 8-bit processor.
//
// Instruction formats (first byte, most significant bit on the left):
//   single byte : [7:4] opcode (bit 7 = 1)  [3:0] N, the I/O port number
//   double byte : [7:4] opcode (bit 7 = 0)  [3:2] AM  [1:0] JC,  second byte m
// Opcode, addressing-mode and jump-condition codes are the ones of the
// instruction set tables; the field order inside the first byte follows the
// printed format and the exact bit numbers are this design's reading of it.
// The control word (ctrl_t) and the hand-over record between the fetch/decode
// unit and the execution unit (fd_instr_t) are this design's own encodings.
package optium_pkg;

  // Operation codes (4 bits)
  localparam logic [3:0] OP_LOAD   = 4'b0000; // A <- m            Z
  localparam logic [3:0] OP_STORE  = 4'b0001; // m <- A
  localparam logic [3:0] OP_ADD    = 4'b0010; // A <- A + m        C,Z
  localparam logic [3:0] OP_AND    = 4'b0011; // A <- A & m        Z
  localparam logic [3:0] OP_JUMP   = 4'b0100; // PC <- m
  localparam logic [3:0] OP_JCOND  = 4'b0101; // PC <- cond ? m : PC+1
  localparam logic [3:0] OP_CPL    = 4'b1000; // A <- ~A           Z
  localparam logic [3:0] OP_RRC    = 4'b1001; // A <- A/2, C <- A0 C,Z
  localparam logic [3:0] OP_IN     = 4'b1010; // A <- IN(N)        Z
  localparam logic [3:0] OP_OUT    = 4'b1011; // OUT(N) <- A

  // Addressing modes
  localparam logic [1:0] AM_IMM    = 2'b00;   // operand = m
  localparam logic [1:0] AM_ABS    = 2'b01;   // operand = mem[m]
  localparam logic [1:0] AM_BAD    = 2'b10;   // not defined: NOP
  localparam logic [1:0] AM_IND    = 2'b11;   // operand = mem[mem[m]]

  // Jump conditions
  localparam logic [1:0] JC_CS     = 2'b00;   // carry set
  localparam logic [1:0] JC_CC     = 2'b01;   // carry clear
  localparam logic [1:0] JC_ZS     = 2'b10;   // zero set
  localparam logic [1:0] JC_ZC     = 2'b11;   // zero clear

  // ALU operations
  typedef enum logic [2:0] {
    ALU_PASS = 3'd0,   // y = b
    ALU_ADD  = 3'd1,   // y = a + b, carry out
    ALU_AND  = 3'd2,   // y = a & b
    ALU_CPL  = 3'd3,   // y = ~a
    ALU_RRC  = 3'd4    // y = a >> 1, carry = a[0]
  } alu_op_t;

  // Source of the ALU's b operand
  typedef enum logic [0:0] {
    SRC_AMU  = 1'b0,
    SRC_IN   = 1'b1
  } src_t;

  // States of the execution unit's control unit (instruction decoder output)
  typedef enum logic [3:0] {
    ST_NOP     = 4'd0,
    ST_LOAD    = 4'd1,
    ST_STORE   = 4'd2,
    ST_ADD     = 4'd3,
    ST_AND     = 4'd4,
    ST_JCOND   = 4'd5,
    ST_CPL     = 4'd6,
    ST_RRC     = 4'd7,
    ST_IN      = 4'd8,
    ST_OUT     = 4'd9,
    ST_PTR     = 4'd10   // first cycle of an indirect access: fetch pointer
  } cu_state_t;

  // Command variables produced by the state decoder for one cycle
  typedef struct packed {
    alu_op_t   alu_op;
    src_t      src;
    logic      a_we;       // write accumulator
    logic      c_we;       // write carry flag
    logic      z_we;       // write zero flag
    logic      mem_we;     // write data memory (STORE)
    logic      ptr_load;   // capture indirect pointer
    logic      in_rd;      // input port strobe
    logic      out_wr;     // output port strobe
    logic      jcond;      // validate a conditional jump
    logic      last;       // last cycle of the instruction
  } ctrl_t;

  // One complete instruction handed from fetch/decode to execution
  typedef struct packed {
    logic       valid;     // validation bit
    logic [7:0] b0;        // first byte (opcode ...)
    logic [7:0] b1;        // second byte m (0 for single-byte)
    logic       pred;      // conditional jump: predicted taken
    logic [7:0] jpc;       // address of the instruction's first byte
    logic [7:0] alt_pc;    // address to continue at if the prediction is wrong
  } fd_instr_t;

endpackage
