// fm9001_operand_ea: operand selection and effective address for one operand.
//
// Combinational. Given an operand's addressing mode and the current value of
// its register, it says whether the operand comes from memory, at which
// address, and what the register must be rewritten to:
//   00 Rn     register direct: the operand is the register value
//   01 (Rn)   register indirect: address = Rn
//   10 -(Rn)  pre-decrement: Rn <- Rn - 1, address = Rn - 1
//   11 (Rn)+  post-increment: address = Rn, Rn <- Rn + 1
// For operand A, imm = 1 selects the immediate format instead: the 9-bit
// datum of the instruction, sign-extended to 32 bits, is the operand and no
// register is touched. Operand B has no immediate form; tie imm to 0.
// Modes, encodings and the sign extension follow the FM9001 instruction set.
module fm9001_operand_ea
  import fm9001_pkg::*;
(
  input  mode_t       mode,
  input  logic [31:0] reg_val,
  input  logic        imm,
  input  logic [8:0]  imm9,
  output logic [31:0] value,     // operand when mem_read = 0
  output logic        mem_read,  // operand must be read from memory at ea
  output logic [31:0] ea,
  output logic        reg_we,    // register side effect
  output logic [31:0] reg_next
);

  always_comb begin
    value    = reg_val;
    mem_read = 1'b0;
    ea       = reg_val;
    reg_we   = 1'b0;
    reg_next = reg_val;
    if (imm) begin
      value = {{23{imm9[8]}}, imm9};
    end else begin
      unique case (mode)
        MODE_DIRECT:   ;
        MODE_INDIRECT: mem_read = 1'b1;
        MODE_PREDEC: begin
          mem_read = 1'b1;
          reg_we   = 1'b1;
          reg_next = reg_val - 32'd1;
          ea       = reg_next;
        end
        MODE_POSTINC: begin
          mem_read = 1'b1;
          reg_we   = 1'b1;
          reg_next = reg_val + 32'd1;
        end
        default: ;
      endcase
    end
  end

endmodule
