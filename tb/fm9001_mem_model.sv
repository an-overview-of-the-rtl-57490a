// fm9001_mem_model: behavioural model of the external word memory on the
// FM9001 bus, for the testbenches. 2^AW words; higher address bits are
// ignored. A cycle starts when STROBE- is low with the address driven; after
// wait_cycles further clocks the model pulls DTACK- low in the same cycle
// (combinationally), presenting read data on data_out, and a write is
// stored on that clock edge. The counter restarts whenever STROBE- is high
// or an acknowledge has been given.
module fm9001_mem_model #(
  parameter int unsigned AW = 12
) (
  input  logic        clk,
  input  logic [31:0] address,
  input  logic        address_oe,
  input  logic        strobe_n,
  input  logic        rw_n,
  input  logic [31:0] data_in,     // from the processor
  input  logic        data_oe,
  output logic [31:0] data_out,    // to the processor
  output logic        dtack_n,
  input  logic [3:0]  wait_cycles,
  output int unsigned n_reads,
  output int unsigned n_writes
);

  logic [31:0] mem [1 << AW];
  logic [3:0]  cnt = '0;
  logic        active;

  assign active   = address_oe && !strobe_n;
  assign dtack_n  = !(active && cnt >= wait_cycles);
  assign data_out = mem[address[AW-1:0]];

  initial begin
    n_reads  = 0;
    n_writes = 0;
  end

  always @(posedge clk) begin
    if (!active || !dtack_n) cnt <= '0;
    else                     cnt <= cnt + 4'd1;
    if (active && !dtack_n) begin
      if (!rw_n) begin
        if (!data_oe) $error("memory write without data bus drive");
        mem[address[AW-1:0]] <= data_in;
        n_writes <= n_writes + 1;
      end else begin
        n_reads <= n_reads + 1;
      end
    end
  end

endmodule
