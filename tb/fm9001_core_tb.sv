// fm9001_core_tb: runs the sequencer/datapath with a register-file model and
// the memory model on random instruction streams (every 32-bit word is an
// FM9001 instruction) and compares, at every instruction boundary, all 16
// registers and the flags with the instruction-level reference model, and the
// number of clock cycles the instruction took with the number predicted from
// its bus accesses: 4 + accesses * (1 + memory wait cycles). At the end the
// whole memory is compared. Also checks that the reset sequence clears all
// registers and that execution starts at address 0.
module fm9001_core_tb;
  import fm9001_pkg::*;
  import fm9001_ref_pkg::*;

  localparam int AW = 10;
  localparam int NINSTR = 3000;

  logic        clk = 0;
  logic        reset_n, hold_n, dtack_n, te_n, ti, to;
  logic [3:0]  pc_reg_in, i_reg, wait_cycles;
  logic [31:0] address, cpu_dout, mem_dout;
  logic        strobe_n, rw_n, data_oe, bus_oe, hdack_n, timing;
  logic        rf_we;
  logic [3:0]  rf_waddr, rf_raddr;
  logic [31:0] rf_wdata, rf_rdata;
  state_t      st;
  flags_t      fl;
  int unsigned n_reads, n_writes;
  logic [31:0] rf [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fm9001_core dut (
    .clk(clk), .reset_n(reset_n), .hold_n(hold_n), .dtack_n(dtack_n), .pc_reg_in(pc_reg_in),
    .data_in(mem_dout), .address(address), .data_out(cpu_dout), .strobe_n(strobe_n),
    .rw_n(rw_n), .data_oe(data_oe), .bus_oe(bus_oe), .hdack_n(hdack_n),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata), .rf_raddr(rf_raddr),
    .rf_rdata(rf_rdata), .te_n(te_n), .ti(ti), .to(to), .cntl_state(st), .flags(fl),
    .i_reg(i_reg), .timing(timing));

  assign rf_rdata = rf[rf_raddr];
  always @(posedge clk) if (rf_we) rf[rf_waddr] <= rf_wdata;

  fm9001_mem_model #(.AW(AW)) mem (
    .clk(clk), .address(address), .address_oe(bus_oe), .strobe_n(strobe_n), .rw_n(rw_n),
    .data_in(cpu_dout), .data_oe(data_oe), .data_out(mem_dout), .dtack_n(dtack_n),
    .wait_cycles(wait_cycles), .n_reads(n_reads), .n_writes(n_writes));

  fm9001_ref ref_m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    int cyc, rsq;
    ref_m = new(AW);
    reset_n = 0; hold_n = 1; te_n = 1; ti = 0; pc_reg_in = 4'd15; wait_cycles = 0;
    foreach (rf[i]) rf[i] = $urandom;
    for (int i = 0; i < (1 << AW); i++) begin
      logic [31:0] w;
      w = $urandom;
      mem.mem[i] = w;
      ref_m.mem[i] = w;
    end
    repeat (3) @(posedge clk);
    #1 check(st == S_RESET, "reset state while RESET- low");
    @(negedge clk) reset_n = 1;
    rsq = 0;
    while (st != S_FETCH0) begin
      @(posedge clk); #1;
      if (st == S_RSEQ) rsq++;
    end
    check(rsq == 16, $sformatf("reset sequence length %0d", rsq));
    foreach (rf[i]) check(rf[i] == 0, $sformatf("r%0d cleared by reset", i));
    check(fl == '0, "flags cleared by reset");

    for (int k = 0; k < NINSTR; k++) begin
      int exp_cyc;
      // At FETCH0 now. Predict.
      if (k % 500 == 0) wait_cycles = 4'(k / 500);
      ref_m.step();
      exp_cyc = 4 + int'(ref_m.last_reads + ref_m.last_writes) * (1 + int'(wait_cycles));
      cyc = 0;
      do begin
        @(posedge clk); #1; cyc++;
      end while (st != S_FETCH0 && cyc < 100);
      check(cyc == exp_cyc, $sformatf("instr %0d took %0d cycles, expected %0d", k, cyc, exp_cyc));
      for (int i = 0; i < 16; i++)
        check(rf[i] == ref_m.regs[i],
              $sformatf("instr %0d r%0d=%h expected %h", k, i, rf[i], ref_m.regs[i]));
      check(fl == {ref_m.c, ref_m.v, ref_m.n, ref_m.z},
            $sformatf("instr %0d flags %b expected %b", k, fl, {ref_m.c, ref_m.v, ref_m.n, ref_m.z}));
    end
    for (int i = 0; i < (1 << AW); i++)
      check(mem.mem[i] == ref_m.mem[i], $sformatf("mem[%0d]", i));
    $display("bus reads %0d writes %0d", n_reads, n_writes);
    check(n_writes > 0, "some memory stores happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
