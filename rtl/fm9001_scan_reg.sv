// fm9001_scan_reg: a W-bit state register whose flip-flops form a scan chain.
//
// In normal operation (te_n = 1) it loads d on every rising clock edge. With
// the test enable active (te_n = 0) it instead shifts by one bit per clock:
// ti enters bit 0, every bit moves one place up and bit W-1 is visible on
// the scan output so_o. W clocks in test mode therefore unload the whole
// state while loading a new one. All of the processor's flip-flops outside
// the register file sit in one such register, as the chip's scan design
// requires; the bit order of the chain is this design's choice (the packing
// order of the core's state structure, most significant field nearest so_o).
module fm9001_scan_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         te_n,
  input  logic         ti,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         so_o
);

  always_ff @(posedge clk) begin
    if (!te_n) q <= {q[W-2:0], ti};
    else       q <= d;
  end

  assign so_o = q[W-1];

endmodule
