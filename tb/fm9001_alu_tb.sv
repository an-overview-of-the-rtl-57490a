// fm9001_alu_tb: checks every op-code of the ALU against the integer
// reference model, on corner operands (0, 1, all ones, the two sign
// boundaries) and on random operands, with carry in 0 and 1. Checks the
// result, all four flags and the separate zero output.
module fm9001_alu_tb;
  import fm9001_pkg::*;
  import fm9001_ref_pkg::*;

  logic [3:0]  op;
  logic [31:0] a, b, r;
  logic        cin, zero;
  flags_t      f;
  int checks = 0, failures = 0;

  fm9001_alu dut (.op(op_t'(op)), .a(a), .b(b), .c_in(cin), .result(r), .flags(f), .zero(zero));

  task automatic check_one();
    logic [31:0] er;
    logic ec, ev;
    #1;
    fm9001_ref::alu(op, a, b, cin, er, ec, ev);
    checks++;
    if (r !== er || f.c !== ec || f.v !== ev || f.n !== er[31] || f.z !== (er == 0) || zero !== f.z) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%h b=%h c=%b: r=%h cvnz=%b expected r=%h c=%b v=%b",
                 op, a, b, cin, r, f, er, ec, ev);
    end
  endtask

  logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h8000_0001};

  initial begin
    for (int o = 0; o < 16; o++)
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          for (int k = 0; k < 2; k++) begin
            op = 4'(o); a = corners[i]; b = corners[j]; cin = k[0];
            check_one();
          end
    for (int t = 0; t < 20000; t++) begin
      op = 4'($urandom); a = $urandom; b = $urandom; cin = 1'($urandom);
      if (t % 7 == 0) b = a;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
