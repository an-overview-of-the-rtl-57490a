// fm9001_alu: the FM9001 arithmetic and logic unit.
//
// Combinational. Computes one of the sixteen op-codes (fifteen distinct
// operations, MOVE and M15 both copy A) from operand A, operand B and the
// current carry flag, and produces the four candidate flags for the result.
// The operation list is the FM9001's. How each operation sets carry and
// overflow is this design's choice, made to fit the store conditions:
//   * additions (INC, ADDC, ADD): C is the carry out, V the signed overflow;
//   * subtractions (NEG, DEC, SUBB, SUB): C is the borrow, so that the
//     unsigned conditions HI (~C & ~Z) and LS (C | Z) read naturally after a
//     compare, and V is the signed overflow;
//   * shifts and ROR: C is the bit shifted out (A[0]), V is 0;
//   * MOVE, M15, NOT, XOR, OR, AND: C and V are 0.
// N is always bit 31 of the result and Z is set when the result is zero.
// The zero output is also brought out on its own: the chip's TIMING pin
// shows it, being the end of the longest combinational path.
module fm9001_alu
  import fm9001_pkg::*;
(
  input  op_t         op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        c_in,    // current carry flag
  output logic [31:0] result,
  output flags_t      flags,   // candidate flags, gated by the instruction later
  output logic        zero     // = flags.z
);

  logic [32:0] sum;      // {carry, sum} of the adder
  logic [31:0] add_x, add_y;
  logic        add_cin;
  logic        subtract; // adder computes x - y as x + ~y + 1 - borrow_in

  always_comb begin
    // Adder operand selection.
    subtract = 1'b0;
    add_x    = a;
    add_y    = '0;
    add_cin  = 1'b0;
    unique case (op)
      OP_INC:  begin add_x = a; add_y = 32'd1; end
      OP_ADDC: begin add_x = b; add_y = a; add_cin = c_in; end
      OP_ADD:  begin add_x = b; add_y = a; end
      OP_NEG:  begin subtract = 1'b1; add_x = '0; add_y = a; end
      OP_DEC:  begin subtract = 1'b1; add_x = a;  add_y = 32'd1; end
      OP_SUBB: begin subtract = 1'b1; add_x = b;  add_y = a; add_cin = c_in; end
      OP_SUB:  begin subtract = 1'b1; add_x = b;  add_y = a; end
      default: ;
    endcase
    if (subtract)
      sum = {1'b0, add_x} + {1'b0, ~add_y} + {32'd0, ~add_cin};
    else
      sum = {1'b0, add_x} + {1'b0, add_y} + {32'd0, add_cin};

    flags.c = 1'b0;
    flags.v = 1'b0;
    unique case (op)
      OP_MOVE, OP_M15: result = a;
      OP_INC, OP_ADDC, OP_ADD: begin
        result  = sum[31:0];
        flags.c = sum[32];
        flags.v = (add_x[31] == add_y[31]) && (result[31] != add_x[31]);
      end
      OP_NEG, OP_DEC, OP_SUBB, OP_SUB: begin
        result  = sum[31:0];
        flags.c = ~sum[32];  // borrow
        flags.v = (add_x[31] != add_y[31]) && (result[31] != add_x[31]);
      end
      OP_ROR: begin result = {c_in, a[31:1]};  flags.c = a[0]; end
      OP_ASR: begin result = {a[31], a[31:1]}; flags.c = a[0]; end
      OP_LSR: begin result = {1'b0, a[31:1]};  flags.c = a[0]; end
      OP_XOR: result = b ^ a;
      OP_OR:  result = b | a;
      OP_AND: result = b & a;
      OP_NOT: result = ~a;
      default: result = a;
    endcase
    flags.n = result[31];
    flags.z = (result == '0);
    zero    = flags.z;
  end

endmodule
