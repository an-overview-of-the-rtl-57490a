// fm9001_store_cc: the FM9001 store-condition test.
//
// Combinational. Every FM9001 instruction carries a 4-bit STORE-CC field; the
// result is written to operand B only when the selected condition holds on
// the flags. The sixteen conditions and their encodings are the FM9001's:
// CC/CS, VC/VS, PL/MI, NE/EQ test one flag, HI/LS are unsigned and GE/LT/GT/LE
// signed comparisons, T always stores and F never does (used for compares).
module fm9001_store_cc
  import fm9001_pkg::*;
(
  input  cc_t    cc,
  input  flags_t flags,
  output logic   store
);

  logic c, v, n, z;
  assign {c, v, n, z} = flags;

  always_comb begin
    unique case (cc)
      CC_CC: store = ~c;
      CC_CS: store = c;
      CC_VC: store = ~v;
      CC_VS: store = v;
      CC_PL: store = ~n;
      CC_MI: store = n;
      CC_NE: store = ~z;
      CC_EQ: store = z;
      CC_HI: store = ~c & ~z;
      CC_LS: store = c | z;
      CC_GE: store = (n & v) | (~n & ~v);
      CC_LT: store = (n & ~v) | (~n & v);
      CC_GT: store = (n & v & ~z) | (~n & ~v & ~z);
      CC_LE: store = z | (n & ~v) | (~n & v);
      CC_T:  store = 1'b1;
      CC_F:  store = 1'b0;
      default: store = 1'b0;
    endcase
  end

endmodule
