// fm9001: top level of the FM9001 32-bit microprocessor, pin for pin.
//
// The FM9001 is a two-address machine: every instruction reads operand A
// (five addressing modes, one of them a 9-bit signed immediate) and operand
// B (four modes), computes one of fifteen ALU operations, updates any chosen
// subset of the C, V, N and Z flags, and writes the result back to operand B
// only if its 4-bit store condition holds. There are no separate branch
// instructions: a jump is a conditional store into whichever register serves
// as program counter, and that register is chosen from outside through the
// PC-REG-IN pins at reset and during hold.
//
// This module holds the sequencer/datapath (fm9001_core) and the 16 x 32-bit
// register file (fm9001_regfile) and brings out the chip's signal groups.
// The memory is external. Tri-state pins are given as a driver value plus an
// output enable, to be joined to pad cells: ADDRESS, STROBE- and RW- are
// enabled except while hold is acknowledged (address_oe); DATA is driven only
// during a memory write (data_oe). RESET-, HOLD- and DTACK- are sampled on
// the rising clock edge. A read or write cycle keeps STROBE- low until DTACK-
// is sampled low; read data is taken on that same edge. The parametric test
// output PO and the supply pins have no logic function and are not modelled.
module fm9001
  import fm9001_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  input  logic        hold_n,
  input  logic        dtack_n,
  input  logic [3:0]  pc_reg_in,
  output logic [31:0] address,
  output logic        address_oe,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  output logic        data_oe,
  output logic        hdack_n,
  output logic        rw_n,
  output logic        strobe_n,
  input  logic        te_n,
  input  logic        ti,
  input  logic        test_regfile_n,
  input  logic        disable_regfile_n,
  output logic [4:0]  cntl_state,
  output logic [3:0]  flags,
  output logic        to,
  output logic        timing,
  output logic [3:0]  i_reg
);

  logic        rf_we;
  logic [3:0]  rf_waddr, rf_raddr;
  logic [31:0] rf_wdata, rf_rdata;
  state_t      st;
  flags_t      fl;

  fm9001_core u_core (
    .clk        (clk),
    .reset_n    (reset_n),
    .hold_n     (hold_n),
    .dtack_n    (dtack_n),
    .pc_reg_in  (pc_reg_in),
    .data_in    (data_in),
    .address    (address),
    .data_out   (data_out),
    .strobe_n   (strobe_n),
    .rw_n       (rw_n),
    .data_oe    (data_oe),
    .bus_oe     (address_oe),
    .hdack_n    (hdack_n),
    .rf_we      (rf_we),
    .rf_waddr   (rf_waddr),
    .rf_wdata   (rf_wdata),
    .rf_raddr   (rf_raddr),
    .rf_rdata   (rf_rdata),
    .te_n       (te_n),
    .ti         (ti),
    .to         (to),
    .cntl_state (st),
    .flags      (fl),
    .i_reg      (i_reg),
    .timing     (timing)
  );

  fm9001_regfile u_regfile (
    .clk               (clk),
    .we                (rf_we),
    .waddr             (rf_waddr),
    .wdata             (rf_wdata),
    .raddr             (rf_raddr),
    .rdata             (rf_rdata),
    .test_regfile_n    (test_regfile_n),
    .disable_regfile_n (disable_regfile_n)
  );

  assign cntl_state = st;
  assign flags      = fl;

endmodule
