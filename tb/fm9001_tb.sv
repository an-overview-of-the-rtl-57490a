// fm9001_tb: end-to-end test of the FM9001 chip at its default size, with
// the external memory model on its bus and the instruction-level reference
// model alongside. After every instruction all 16 registers and the flags
// are compared with the model and the cycle count with 4 + accesses * (1 +
// wait cycles); memory is compared at the end of each phase.
//   Phase 1: a directed program built from the architecture's own idioms:
//     a counting loop closed by a conditional jump (a store into the PC),
//     a compare (non-storing SUB that sets all four flags), a "jump if carry
//     clear" that skips an instruction, and stores through (Rn)+ and -(Rn).
//   Phase 2: memory reloaded with random words (every word is an
//     instruction), then a reset, then a random instruction stream with
//     varying memory wait states, interrupted by hold requests that switch
//     the program-counter register, by resets in mid-instruction (some with a
//     hold request arriving during the clear sequence) and by scan
//     tests that shift the whole state out and back in through TO/TI, with a
//     forced register-file write through TEST-REGFILE- and the writes blocked
//     by DISABLE-REGFILE-.
// Each mechanism is counted and must have happened at least once. Pin
// behaviour is checked along the way: bus enables off while HDACK- is low,
// data bus driven only for writes, TIMING equal to the ALU zero output and
// I-REG equal to the top four bits of the instruction.
module fm9001_tb;
  import fm9001_pkg::*;
  import fm9001_ref_pkg::*;

  localparam int AW = 10;
  localparam int NRANDOM = 4000;

  logic        clk = 0;
  logic        reset_n, hold_n, dtack_n, te_n, ti, to, timing;
  logic        test_regfile_n, disable_regfile_n;
  logic [3:0]  pc_reg_in, i_reg, flags, wait_cycles;
  logic [4:0]  cntl_state;
  logic [31:0] address, data_in, data_out;
  logic        address_oe, data_oe, hdack_n, rw_n, strobe_n;
  int unsigned n_reads, n_writes;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fm9001 dut (
    .clk(clk), .reset_n(reset_n), .hold_n(hold_n), .dtack_n(dtack_n), .pc_reg_in(pc_reg_in),
    .address(address), .address_oe(address_oe), .data_in(data_in), .data_out(data_out),
    .data_oe(data_oe), .hdack_n(hdack_n), .rw_n(rw_n), .strobe_n(strobe_n),
    .te_n(te_n), .ti(ti), .test_regfile_n(test_regfile_n), .disable_regfile_n(disable_regfile_n),
    .cntl_state(cntl_state), .flags(flags), .to(to), .timing(timing), .i_reg(i_reg));

  fm9001_mem_model #(.AW(AW)) mem (
    .clk(clk), .address(address), .address_oe(address_oe), .strobe_n(strobe_n), .rw_n(rw_n),
    .data_in(data_out), .data_oe(data_oe), .data_out(data_in), .dtack_n(dtack_n),
    .wait_cycles(wait_cycles), .n_reads(n_reads), .n_writes(n_writes));

  fm9001_ref ref_m;

  // Mechanism counters.
  int n_reset_seq = 0, n_hold = 0, n_pc_switch = 0, n_scan = 0, n_forced_rf = 0;
  int n_blocked_rf = 0, n_wait = 0, n_store = 0, n_nostore = 0, n_memstore = 0, n_jump = 0;
  int n_mode_a [5] = '{0, 0, 0, 0, 0};
  int n_mode_b [4] = '{0, 0, 0, 0};
  int n_timing = 0, n_ireg = 0;
  bit first_fetch = 0;
  int n_hold_in_reset = 0;  // the next instruction is the first after a reset

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Compare the architectural state with the model.
  task automatic compare_state(string tag);
    for (int i = 0; i < 16; i++)
      check(dut.u_regfile.regs[i] == ref_m.regs[i],
            $sformatf("%s r%0d=%h expected %h", tag, i, dut.u_regfile.regs[i], ref_m.regs[i]));
    check(flags == {ref_m.c, ref_m.v, ref_m.n, ref_m.z},
          $sformatf("%s flags %b expected %b", tag, flags, {ref_m.c, ref_m.v, ref_m.n, ref_m.z}));
  endtask

  task automatic compare_mem(string tag);
    for (int i = 0; i < (1 << AW); i++)
      check(mem.mem[i] == ref_m.mem[i], $sformatf("%s mem[%0d]=%h expected %h", tag, i, mem.mem[i], ref_m.mem[i]));
  endtask

  // Reset: hold RESET- low for `cycles`, then wait for the first fetch.
  // With hold_during set, HOLD- is raised during the clear sequence: the hold
  // must be taken at its end, before the first fetch.
  task automatic do_reset(int cycles, bit hold_during = 0);
    int rsq = 0, hq = 0;
    @(negedge clk) reset_n = 0;
    repeat (cycles) @(negedge clk);
    check(cntl_state == 5'(S_RESET), "RESET state while RESET- is low");
    reset_n = 1;
    ref_m.regs = '{default: '0};
    {ref_m.c, ref_m.v, ref_m.n, ref_m.z} = '0;
    ref_m.pcr = pc_reg_in;
    while (cntl_state != 5'(S_FETCH0)) begin
      @(posedge clk); #1;
      if (cntl_state == 5'(S_RSEQ)) begin
        rsq++;
        if (hold_during && rsq == 8) hold_n = 0;
      end
      if (cntl_state == 5'(S_HOLD)) begin
        hq++;
        check(rsq == 16, "hold taken only after the clear sequence");
        check(!hdack_n && !address_oe, "bus floated in hold after reset");
        if (hq == 2) hold_n = 1;
      end
    end
    check(rsq == 16, $sformatf("reset sequence %0d cycles", rsq));
    if (hold_during) begin
      check(hq == 2, "hold during the reset sequence acknowledged");
      n_hold_in_reset++;
    end
    n_reset_seq++;
    compare_mem("at reset");
    compare_state("after reset");
    first_fetch = 1;
  endtask

  // Scan test at an instruction boundary: shift the whole state out of TO
  // and straight back into TI, so it is unchanged afterwards. One cycle in
  // the middle forces a register-file write through TEST-REGFILE-; for the
  // rest DISABLE-REGFILE- is low.
  task automatic do_scan();
    int w = $bits(dut.u_core.r);
    logic [31:0] before_regs [16];
    @(negedge clk);
    before_regs = dut.u_regfile.regs;
    te_n = 0;
    disable_regfile_n = 0;
    for (int i = 0; i < w; i++) begin
      ti = to;
      if (i == w / 2) begin
        disable_regfile_n = 1;
        test_regfile_n = 0;
        #1;
        ref_m.regs[dut.u_regfile.waddr] = dut.u_regfile.wdata;
        n_forced_rf++;
      end else if (dut.u_core.rf_we_raw) begin
        n_blocked_rf++;
      end
      @(negedge clk);
      test_regfile_n = 1;
      disable_regfile_n = 0;
    end
    te_n = 1;
    disable_regfile_n = 1;
    check(cntl_state == 5'(S_FETCH0), "state restored after scan loop-back");
    n_scan++;
  endtask

  // Run one instruction from FETCH0 to the next FETCH0. hold_at > 0 raises a
  // hold request on that cycle of the instruction; new_pcr is then loaded
  // during the hold.
  task automatic run_instr(int k, int hold_at, logic [3:0] new_pcr);
    int cyc = 0, hcyc = 0, exp_cyc;
    logic [31:0] ins;
    logic [3:0] pcr;
    pcr = ref_m.pcr;
    ins = ref_m.rd(ref_m.regs[pcr]);
    ref_m.step();
    exp_cyc = 4 + int'(ref_m.last_reads + ref_m.last_writes) * (1 + int'(wait_cycles));
    // Coverage of the instruction's features.
    if (ins[9]) n_mode_a[4]++; else n_mode_a[int'(ins[5:4])]++;
    n_mode_b[ins[15:14]]++;
    if (ref_m.last_store) n_store++; else n_nostore++;
    if (ref_m.last_store && ins[15:14] == 0 && ins[13:10] == pcr) n_jump++;
    if (ref_m.last_writes != 0) n_memstore++;
    do begin
      @(posedge clk); #1;
      if (cntl_state == 5'(S_HOLD)) begin
        hcyc++;
        check(!hdack_n && !address_oe && !data_oe, "bus floated while HDACK- is low");
        if (hcyc == 1) check(cyc + 1 == exp_cyc, "hold taken only at the instruction boundary");
        if (hcyc == 2) pc_reg_in = new_pcr;
        if (hcyc == 3) hold_n = 1;
      end else begin
        cyc++;
        check(hdack_n, "HDACK- high outside hold");
        if (cyc == 1 && first_fetch) begin
          // Execution starts at address 0.
          check(!strobe_n && address == 0, $sformatf("first fetch from %h", address));
          first_fetch = 0;
        end
        if (cyc == hold_at) hold_n = 0;
        if (!strobe_n && dtack_n) n_wait++;
        check(data_oe == (!strobe_n && !rw_n), "data bus driven only for writes");
        if (cntl_state == 5'(S_REGA)) begin
          check(i_reg == ins[31:28], "I-REG shows IR[31:28]");
          n_ireg++;
        end
        if (cntl_state == 5'(S_UPDATE)) begin
          check(timing == (dut.u_core.alu_result == 0), "TIMING is the ALU zero output");
          n_timing++;
        end
      end
    end while (cntl_state != 5'(S_FETCH0) && cyc < 200);
    check(cyc == exp_cyc, $sformatf("instr %0d (%h) took %0d cycles, expected %0d", k, ins, cyc, exp_cyc));
    if (hcyc > 0) begin
      n_hold++;
      ref_m.pcr = new_pcr;
      if (new_pcr != pcr) n_pc_switch++;
    end
    compare_state($sformatf("instr %0d (%h)", k, ins));
  endtask

  initial begin
    logic [31:0] prog [12];
    ref_m = new(AW);
    reset_n = 0; hold_n = 1; te_n = 1; ti = 0; pc_reg_in = 4'd15; wait_cycles = 0;
    test_regfile_n = 1; disable_regfile_n = 1;
    for (int i = 0; i < (1 << AW); i++) begin
      mem.mem[i] = '0;
      ref_m.mem[i] = '0;
    end

    // ---- Phase 1: directed program ----
    prog[0]  = insi(4'(OP_MOVE), 4'(CC_T),  4'b0000, 2'd0, 4'd0, 9'd10);   // R0 <- 10
    prog[1]  = insi(4'(OP_MOVE), 4'(CC_T),  4'b0000, 2'd0, 4'd1, 9'd0);    // R1 <- 0
    prog[2]  = ins2(4'(OP_ADD),  4'(CC_T),  4'b0000, 2'd0, 4'd1, 2'd0, 4'd0); // R1 <- R1 + R0
    prog[3]  = ins2(4'(OP_DEC),  4'(CC_T),  4'b0001, 2'd0, 4'd0, 2'd0, 4'd0); // R0 <- R0 - 1, Z
    prog[4]  = insi(4'(OP_MOVE), 4'(CC_NE), 4'b0000, 2'd0, 4'd15, 9'd2);   // if !Z: PC <- 2
    prog[5]  = insi(4'(OP_SUB),  4'(CC_F),  4'b1111, 2'd0, 4'd1, 9'd55);   // compare R1, 55
    prog[6]  = insi(4'(OP_MOVE), 4'(CC_CC), 4'b0000, 2'd0, 4'd15, 9'd8);   // if !C: PC <- 8
    prog[7]  = insi(4'(OP_MOVE), 4'(CC_T),  4'b0000, 2'd0, 4'd2, 9'h1FF);  // skipped: R2 <- -1
    prog[8]  = insi(4'(OP_MOVE), 4'(CC_T),  4'b0000, 2'd0, 4'd4, 9'd100);  // R4 <- 100
    prog[9]  = ins2(4'(OP_MOVE), 4'(CC_T),  4'b0000, 2'd3, 4'd4, 2'd0, 4'd1); // (R4)+ <- R1
    prog[10] = ins2(4'(OP_NOT),  4'(CC_T),  4'b0000, 2'd2, 4'd4, 2'd0, 4'd1); // -(R4) <- ~R1
    prog[11] = insi(4'(OP_MOVE), 4'(CC_T),  4'b0000, 2'd0, 4'd15, 9'd11);  // PC <- 11 (halt loop)
    for (int i = 0; i < 12; i++) begin
      mem.mem[i] = prog[i];
      ref_m.mem[i] = prog[i];
    end
    repeat (2) @(posedge clk);
    do_reset(2);
    for (int k = 0; k < 60; k++) run_instr(k, 0, 4'd15);
    check(dut.u_regfile.regs[1] == 32'd55, "loop sum 1..10 = 55");
    check(dut.u_regfile.regs[0] == 32'd0, "loop counter ran to 0");
    check(dut.u_regfile.regs[2] == 32'd0, "instruction skipped by jump-if-carry-clear");
    check(dut.u_regfile.regs[4] == 32'd100, "post-increment then pre-decrement of R4");
    check(mem.mem[100] == ~32'd55, "memory store through -(R4)");
    check(dut.u_regfile.regs[15] == 32'd11, "program parked in its halt loop");
    compare_mem("directed");

    // ---- Phase 2: random instruction stream ----
    for (int i = 0; i < (1 << AW); i++) begin
      logic [31:0] w;
      w = $urandom;
      mem.mem[i] = w;
      ref_m.mem[i] = w;
    end
    pc_reg_in = 4'(15);
    do_reset(1);
    for (int k = 0; k < NRANDOM; k++) begin
      int r;
      if (k % 400 == 0) wait_cycles = 4'($urandom % 4);
      r = $urandom % 100;
      if (k > 0 && k % 97 == 0) begin
        // Reset in mid-instruction: it is abandoned before any memory write.
        @(posedge clk); @(negedge clk);
        do_reset(1 + $urandom % 3, (k % 3) == 0);
        continue;
      end
      if (k % 53 == 0) do_scan();
      if (r < 3) run_instr(k, 1 + $urandom % 4, 4'($urandom));
      else       run_instr(k, 0, pc_reg_in);
    end
    compare_mem("random");

    $display("hold during reset sequence: %0d", n_hold_in_reset);
    $display("mechanisms: reset_seq=%0d hold=%0d pc_switch=%0d scan=%0d forced_rf=%0d blocked_rf=%0d",
             n_reset_seq, n_hold, n_pc_switch, n_scan, n_forced_rf, n_blocked_rf);
    $display("  wait_cycles=%0d store=%0d nostore=%0d memstore=%0d jump=%0d timing=%0d ireg=%0d",
             n_wait, n_store, n_nostore, n_memstore, n_jump, n_timing, n_ireg);
    $display("  modeA imm/dir/ind/pre/post = %0d/%0d/%0d/%0d/%0d  modeB dir/ind/pre/post = %0d/%0d/%0d/%0d",
             n_mode_a[4], n_mode_a[0], n_mode_a[1], n_mode_a[2], n_mode_a[3],
             n_mode_b[0], n_mode_b[1], n_mode_b[2], n_mode_b[3]);
    check(n_reset_seq > 2, "reset sequences");
    check(n_hold > 0, "hold acknowledged");
    check(n_hold_in_reset > 0, "hold requested during the reset sequence");
    check(n_pc_switch > 0, "PC register switched during hold");
    check(n_scan > 0, "scan loop-back");
    check(n_forced_rf > 0, "forced register-file write");
    check(n_blocked_rf > 0, "register-file writes blocked during scan");
    check(n_wait > 0, "memory wait states");
    check(n_store > 0 && n_nostore > 0, "store condition true and false");
    check(n_memstore > 0, "memory stores");
    check(n_jump > 0, "jumps (stores into the PC)");
    for (int i = 0; i < 5; i++) check(n_mode_a[i] > 0, $sformatf("operand A mode %0d used", i));
    for (int i = 0; i < 4; i++) check(n_mode_b[i] > 0, $sformatf("operand B mode %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
