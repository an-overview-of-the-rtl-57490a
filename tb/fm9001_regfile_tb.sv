// fm9001_regfile_tb: random writes and reads of the 16 x 32 register file
// against an array model, including a read of the register being written
// (old value expected), writes blocked by DISABLE-REGFILE- and writes forced
// by TEST-REGFILE-.
module fm9001_regfile_tb;
  logic        clk = 0;
  logic        we, test_n, dis_n;
  logic [3:0]  waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [16];
  int checks = 0, failures = 0, forced = 0, blocked = 0;

  fm9001_regfile dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr),
                      .rdata(rdata), .test_regfile_n(test_n), .disable_regfile_n(dis_n));

  always #5 clk = ~clk;

  initial begin
    we = 0; test_n = 1; dis_n = 1; waddr = 0; wdata = 0; raddr = 0;
    // Fill every register.
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); we = 1; waddr = 4'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = $urandom; raddr = 4'($urandom);
      if (t % 5 == 0) raddr = waddr;
      dis_n  = ($urandom % 8) != 0;
      test_n = ($urandom % 8) != 0;
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL read r%0d = %h expected %h", raddr, rdata, model[raddr]);
      end
      if ((we || !test_n) && dis_n) begin
        model[waddr] = wdata;
        if (!we) forced++;
      end else if (we) blocked++;
    end
    @(negedge clk); we = 0; test_n = 1; dis_n = 1;
    for (int i = 0; i < 16; i++) begin
      raddr = 4'(i); #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL final r%0d = %h expected %h", i, rdata, model[i]);
      end
    end
    checks++;
    if (forced == 0 || blocked == 0) failures++;
    $display("forced writes %0d, blocked writes %0d", forced, blocked);
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
