// fm9001_store_cc_tb: exhaustive check of the store-condition unit, all 16
// conditions against all 16 flag combinations, compared with conditions
// written as comparisons (GE as N == V, and so on).
module fm9001_store_cc_tb;
  import fm9001_pkg::*;
  import fm9001_ref_pkg::*;

  logic [3:0] cc;
  flags_t     f;
  logic       st;
  int checks = 0, failures = 0;

  fm9001_store_cc dut (.cc(cc_t'(cc)), .flags(f), .store(st));

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        logic exp;
        cc = 4'(i); f = flags_t'(4'(j));
        #1;
        exp = fm9001_ref::cond(cc, f.c, f.v, f.n, f.z);
        checks++;
        if (st !== exp) begin
          failures++;
          $display("FAIL cc=%0d cvnz=%b store=%b expected %b", cc, f, st, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
