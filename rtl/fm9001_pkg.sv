// fm9001_pkg: types and constants shared by the FM9001 processor RTL.
//
// The instruction word layout, the op-code numbering, the store-condition
// numbering and the addressing-mode numbering are those of the FM9001
// instruction set. The control-state encoding (the value seen on the
// CNTL-STATE[5] pins) is this implementation's own: the architecture only
// says that five pins carry an encoding of the internal state.
package fm9001_pkg;

  // Op-codes, instruction bits 27:24.
  typedef enum logic [3:0] {
    OP_MOVE = 4'b0000,  // b <- a
    OP_INC  = 4'b0001,  // b <- a + 1
    OP_ADDC = 4'b0010,  // b <- a + b + c
    OP_ADD  = 4'b0011,  // b <- b + a
    OP_NEG  = 4'b0100,  // b <- 0 - a
    OP_DEC  = 4'b0101,  // b <- a - 1
    OP_SUBB = 4'b0110,  // b <- b - a - c
    OP_SUB  = 4'b0111,  // b <- b - a
    OP_ROR  = 4'b1000,  // b <- c, a >> 1 (rotate right through carry)
    OP_ASR  = 4'b1001,  // b <- a >> 1 (arithmetic)
    OP_LSR  = 4'b1010,  // b <- a >> 1 (logical)
    OP_XOR  = 4'b1011,  // b <- b xor a
    OP_OR   = 4'b1100,  // b <- b or a
    OP_AND  = 4'b1101,  // b <- b and a
    OP_NOT  = 4'b1110,  // b <- not a
    OP_M15  = 4'b1111   // b <- a (second encoding of move)
  } op_t;

  // Store conditions, instruction bits 23:20.
  typedef enum logic [3:0] {
    CC_CC = 4'b0000, CC_CS = 4'b0001, CC_VC = 4'b0010, CC_VS = 4'b0011,
    CC_PL = 4'b0100, CC_MI = 4'b0101, CC_NE = 4'b0110, CC_EQ = 4'b0111,
    CC_HI = 4'b1000, CC_LS = 4'b1001, CC_GE = 4'b1010, CC_LT = 4'b1011,
    CC_GT = 4'b1100, CC_LE = 4'b1101, CC_T  = 4'b1110, CC_F  = 4'b1111
  } cc_t;

  // Addressing modes, bits 15:14 (operand B) and 5:4 (operand A).
  typedef enum logic [1:0] {
    MODE_DIRECT   = 2'b00,  // Rn
    MODE_INDIRECT = 2'b01,  // (Rn)
    MODE_PREDEC   = 2'b10,  // -(Rn)
    MODE_POSTINC  = 2'b11   // (Rn)+
  } mode_t;

  // Arithmetic flags, in the bit order of the FLAGS[3:0] pins.
  typedef struct packed {
    logic c;  // FLAGS[3] carry (borrow for subtraction)
    logic v;  // FLAGS[2] signed overflow
    logic n;  // FLAGS[1] negative
    logic z;  // FLAGS[0] zero
  } flags_t;

  // Instruction word. For the immediate format (imm = 1) bits 8:0 are the
  // signed 9-bit datum and the last three fields overlay it.
  typedef struct packed {
    logic [3:0] unused_hi;  // 31:28, visible on the I-REG[4] pins
    op_t        op;         // 27:24
    cc_t        store_cc;   // 23:20
    flags_t     set_flags;  // 19:16 update enables for C, V, N, Z
    mode_t      mode_b;     // 15:14
    logic [3:0] reg_b;      // 13:10
    logic       imm;        // 9: 1 selects the immediate datum for operand A
    logic [2:0] unused_lo;  // 8:6
    mode_t      mode_a;     // 5:4
    logic [3:0] reg_a;      // 3:0
  } instr_t;

  // Control states, as seen on CNTL-STATE[4:0].
  typedef enum logic [4:0] {
    S_RESET  = 5'd0,   // held while RESET- is low
    S_RSEQ   = 5'd1,   // reset sequence: clears one register per cycle
    S_HOLD   = 5'd2,   // hold acknowledged, bus floated
    S_FETCH0 = 5'd3,   // read the PC, latch it as the address
    S_FETCH1 = 5'd4,   // instruction read strobe; on DTACK- load IR, PC <- PC + 1
    S_REGA   = 5'd5,   // operand A: register, immediate, or address + side effect
    S_READA  = 5'd6,   // operand A memory read strobe
    S_REGB   = 5'd7,   // operand B: register, or address + side effect
    S_READB  = 5'd8,   // operand B memory read strobe
    S_UPDATE = 5'd9,   // ALU, flags, conditional register store
    S_WRITE  = 5'd10   // conditional memory store strobe
  } state_t;

  // Op-codes whose result depends on operand B: only these read B from memory.
  function automatic logic op_reads_b(op_t op);
    return op inside {OP_ADDC, OP_ADD, OP_SUBB, OP_SUB, OP_XOR, OP_OR, OP_AND};
  endfunction

endpackage
