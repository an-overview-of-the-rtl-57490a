// fm9001_operand_ea_tb: checks the operand unit for the four register modes
// and the immediate datum (positive and negative, with the mode bits set to
// every value) on directed and random register values.
module fm9001_operand_ea_tb;
  import fm9001_pkg::*;

  logic [1:0]  mode;
  logic [31:0] rv, value, ea, rnext;
  logic        imm, mem_read, reg_we;
  logic [8:0]  imm9;
  int checks = 0, failures = 0;

  fm9001_operand_ea dut (.mode(mode_t'(mode)), .reg_val(rv), .imm(imm), .imm9(imm9),
                         .value(value), .mem_read(mem_read), .ea(ea),
                         .reg_we(reg_we), .reg_next(rnext));

  task automatic check_one();
    logic [31:0] e_val, e_ea, e_next;
    logic e_mem, e_we;
    #1;
    e_val = rv; e_ea = rv; e_next = rv; e_mem = 0; e_we = 0;
    if (imm) e_val = imm9[8] ? (32'hFFFF_FE00 | 32'(imm9)) : 32'(imm9);
    else case (mode)
      2'd1: e_mem = 1;
      2'd2: begin e_mem = 1; e_we = 1; e_next = rv - 1; e_ea = rv - 1; end
      2'd3: begin e_mem = 1; e_we = 1; e_next = rv + 1; end
      default: ;
    endcase
    checks++;
    if (mem_read !== e_mem || reg_we !== e_we || (!e_mem && value !== e_val) ||
        (e_mem && ea !== e_ea) || (e_we && rnext !== e_next)) begin
      failures++;
      if (failures < 10)
        $display("FAIL mode=%0d imm=%b imm9=%h rv=%h: val=%h mem=%b ea=%h we=%b next=%h",
                 mode, imm, imm9, rv, value, mem_read, ea, reg_we, rnext);
    end
  endtask

  initial begin
    for (int m = 0; m < 4; m++)
      foreach (dir[k]) begin
        mode = 2'(m); rv = dir[k]; imm = 0; imm9 = '0; check_one();
        imm = 1; imm9 = 9'h100; check_one();
        imm9 = 9'h0FF; check_one();
        imm9 = 9'h1FF; check_one();
      end
    for (int t = 0; t < 5000; t++) begin
      mode = 2'($urandom); rv = $urandom; imm = 1'($urandom); imm9 = 9'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] dir [4] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
