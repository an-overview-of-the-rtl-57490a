// fm9001_core: control sequencer and datapath registers of the FM9001.
//
// A multi-cycle machine that executes one instruction at a time:
//   FETCH0  the program counter (the register whose number was read from the
//           PC-REG-IN pins) is read and latched as the bus address;
//   FETCH1  the instruction read strobe is held until DTACK- is seen low; on
//           that edge the word is loaded into IR and PC <- PC + 1;
//   REGA    operand A: the sign-extended immediate, a register, or for a
//           memory mode the effective address, with the pre-decrement or
//           post-increment written back to the register in the same cycle;
//   READA   operand A memory read strobe, until DTACK-;
//   REGB    the same for operand B;
//   READB   operand B memory read, only when the op-code uses B;
//   UPDATE  the ALU runs on A, B and the carry; the flags whose enable bit is
//           set in the instruction are updated; if the store condition holds
//           on the flags as they were before this update, the result goes to
//           register B (mode 00) or, for a memory mode, on to
//   WRITE   memory write strobe with RW- low and the data bus driven.
// The order of these steps (PC incremented before operand A's address is
// formed, A's side effects completed before B's address is formed) and the
// instruction set are the FM9001's; the state list, its encoding on
// CNTL-STATE and the cycle counts are this design's own. With a memory that
// acknowledges in the first strobe cycle an instruction takes 5 cycles with
// both operands in registers and up to 8 with both in memory and a memory
// store; every wait cycle of the memory adds one.
//
// Reset: RESET- is sampled on the clock. While it is low the core sits in
// the RESET state; when it rises, a 16-cycle sequence clears register 0 to
// 15 through the register-file write port, the flags having been cleared and
// the PC number loaded from PC-REG-IN. Execution then starts at address 0.
// Hold: HOLD- is sampled only at an instruction boundary (after UPDATE or
// WRITE, and at the end of the reset sequence). If low, the core enters HOLD,
// where HDACK- is low, the bus is floated and the PC number is reloaded from
// PC-REG-IN every cycle, until HOLD- rises.
// Scan: every flip-flop of the core sits in one fm9001_scan_reg; with TE low
// the state shifts from TI to TO instead of advancing, register-file writes
// requested by the sequencer are suppressed and no bus cycle is started.
module fm9001_core
  import fm9001_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  input  logic        hold_n,
  input  logic        dtack_n,
  input  logic [3:0]  pc_reg_in,
  input  logic [31:0] data_in,
  // memory bus, before the pads
  output logic [31:0] address,
  output logic [31:0] data_out,
  output logic        strobe_n,
  output logic        rw_n,
  output logic        data_oe,
  output logic        bus_oe,     // 0 while hold is acknowledged
  output logic        hdack_n,
  // register file
  output logic        rf_we,
  output logic [3:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic [3:0]  rf_raddr,
  input  logic [31:0] rf_rdata,
  // test and observation
  input  logic        te_n,
  input  logic        ti,
  output logic        to,
  output state_t      cntl_state,
  output flags_t      flags,
  output logic [3:0]  i_reg,
  output logic        timing
);

  typedef struct packed {
    state_t      st;
    instr_t      ir;
    logic [3:0]  pc_reg;
    flags_t      flags;
    logic [31:0] a;
    logic [31:0] b;      // operand B, then the result for a memory store
    logic [31:0] addr;   // bus address
    logic [3:0]  rcnt;   // reset-sequence register counter
  } regs_t;

  localparam int unsigned SCAN_W = $bits(regs_t);

  regs_t r, n;

  fm9001_scan_reg #(.W(SCAN_W)) u_state (
    .clk  (clk),
    .te_n (te_n),
    .ti   (ti),
    .d    (n),
    .q    (r),
    .so_o (to)
  );

  // Shared operand unit: operand A in REGA, operand B in REGB.
  logic        ea_is_b;
  logic [31:0] ea_value, ea_addr, ea_reg_next;
  logic        ea_mem, ea_reg_we;

  assign ea_is_b = (r.st == S_REGB);

  fm9001_operand_ea u_ea (
    .mode     (ea_is_b ? r.ir.mode_b : r.ir.mode_a),
    .reg_val  (rf_rdata),
    .imm      (!ea_is_b && r.ir.imm),
    .imm9     ({r.ir.unused_lo, r.ir.mode_a, r.ir.reg_a}),
    .value    (ea_value),
    .mem_read (ea_mem),
    .ea       (ea_addr),
    .reg_we   (ea_reg_we),
    .reg_next (ea_reg_next)
  );

  logic [31:0] alu_result;
  flags_t      alu_flags;
  logic        alu_zero;

  fm9001_alu u_alu (
    .op     (r.ir.op),
    .a      (r.a),
    .b      (r.b),
    .c_in   (r.flags.c),
    .result (alu_result),
    .flags  (alu_flags),
    .zero   (alu_zero)
  );

  logic store;

  fm9001_store_cc u_cc (
    .cc    (r.ir.store_cc),
    .flags (r.flags),
    .store (store)
  );

  logic   rf_we_raw;
  state_t boundary;  // where an instruction ends: next fetch, or hold

  always_comb begin
    boundary  = hold_n ? S_FETCH0 : S_HOLD;
    n         = r;
    rf_we_raw = 1'b0;
    rf_waddr  = r.ir.reg_b;
    rf_wdata  = alu_result;
    unique case (r.st)
      S_REGA:  rf_raddr = r.ir.reg_a;
      S_REGB:  rf_raddr = r.ir.reg_b;
      default: rf_raddr = r.pc_reg;
    endcase

    unique case (r.st)
      S_RESET: n.st = S_RSEQ;
      S_RSEQ: begin
        rf_we_raw = 1'b1;
        rf_waddr  = r.rcnt;
        rf_wdata  = '0;
        n.pc_reg  = pc_reg_in;
        n.rcnt    = r.rcnt + 4'd1;
        if (r.rcnt == 4'd15) n.st = boundary;
      end
      S_HOLD: begin
        n.pc_reg = pc_reg_in;
        if (hold_n) n.st = S_FETCH0;
      end
      S_FETCH0: begin
        n.addr = rf_rdata;
        n.st   = S_FETCH1;
      end
      S_FETCH1: begin
        if (!dtack_n) begin
          n.ir      = instr_t'(data_in);
          rf_we_raw = 1'b1;
          rf_waddr  = r.pc_reg;
          rf_wdata  = r.addr + 32'd1;
          n.st      = S_REGA;
        end
      end
      S_REGA, S_REGB: begin
        rf_waddr = ea_is_b ? r.ir.reg_b : r.ir.reg_a;
        rf_wdata = ea_reg_next;
        if (ea_mem) begin
          n.addr    = ea_addr;
          rf_we_raw = ea_reg_we;
        end
        if (!ea_is_b) begin
          n.a  = ea_value;
          n.st = ea_mem ? S_READA : S_REGB;
        end else begin
          n.b  = ea_value;
          n.st = !ea_mem ? S_UPDATE : (op_reads_b(r.ir.op) ? S_READB : S_UPDATE);
        end
      end
      S_READA: begin
        if (!dtack_n) begin
          n.a  = data_in;
          n.st = S_REGB;
        end
      end
      S_READB: begin
        if (!dtack_n) begin
          n.b  = data_in;
          n.st = S_UPDATE;
        end
      end
      S_UPDATE: begin
        n.flags.c = r.ir.set_flags.c ? alu_flags.c : r.flags.c;
        n.flags.v = r.ir.set_flags.v ? alu_flags.v : r.flags.v;
        n.flags.n = r.ir.set_flags.n ? alu_flags.n : r.flags.n;
        n.flags.z = r.ir.set_flags.z ? alu_flags.z : r.flags.z;
        n.st = boundary;
        if (store) begin
          if (r.ir.mode_b == MODE_DIRECT) begin
            rf_we_raw = 1'b1;
          end else begin
            n.b  = alu_result;
            n.st = S_WRITE;
          end
        end
      end
      S_WRITE: begin
        if (!dtack_n) n.st = boundary;
      end
      default: n.st = S_RESET;
    endcase

    if (!reset_n) begin
      n        = '0;
      n.st     = S_RESET;
      n.pc_reg = pc_reg_in;
    end
  end

  assign rf_we = rf_we_raw && te_n;

  // Bus controls are decoded from the state flip-flops. While the scan
  // chain shifts (TE low) the state bits take arbitrary values, so strobe,
  // write and data drive are held inactive to keep the memory untouched.
  assign strobe_n   = !(te_n && r.st inside {S_FETCH1, S_READA, S_READB, S_WRITE});
  assign rw_n       = !(te_n && r.st == S_WRITE);
  assign data_oe    = te_n && (r.st == S_WRITE);
  assign bus_oe     = (r.st != S_HOLD);
  assign hdack_n    = (r.st != S_HOLD);
  assign address    = r.addr;
  assign data_out   = r.b;
  assign cntl_state = r.st;
  assign flags      = r.flags;
  assign i_reg      = r.ir.unused_hi;
  assign timing     = alu_zero;

  // The data bus is only driven during a write strobe.
  a_write_has_strobe: assert property (@(posedge clk) data_oe |-> !strobe_n);
  // Hold acknowledge and a bus cycle never overlap.
  a_hold_no_bus: assert property (@(posedge clk) !hdack_n |-> (strobe_n && !data_oe));

endmodule
