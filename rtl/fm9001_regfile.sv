// fm9001_regfile: the FM9001's sixteen 32-bit general-purpose registers.
//
// One combinational read port and one write port written on the rising
// clock edge; a write and a read of the same register in one cycle return the
// old value. Which register serves as the program counter is decided outside,
// by the core. The register file is outside the scan chain and has two
// dedicated, active-low test pins instead. The architecture names them but
// does not define them; here
//   disable_regfile_n = 0  blocks every write, so that scan testing of the
//                          rest of the chip cannot disturb the registers;
//   test_regfile_n    = 0  forces a write every clock, whatever the control
//                          asks, so that a tester can write the register
//                          named on the write address with the write data
//                          while the rest of the chip is held in scan mode.
// disable_regfile_n has priority over test_regfile_n.
// The registers have no reset: the processor's reset sequence clears them
// one at a time through the write port.
module fm9001_regfile #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 32
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  input  logic [$clog2(N)-1:0] raddr,
  output logic [W-1:0]         rdata,
  input  logic                 test_regfile_n,
  input  logic                 disable_regfile_n
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if ((we || !test_regfile_n) && disable_regfile_n) regs[waddr] <= wdata;
  end

  assign rdata = regs[raddr];

endmodule
