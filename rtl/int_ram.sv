// int_ram: single-port on-chip RAM, one embedded array block.
//
// A word is written at a rising edge with we high. Reads are synchronous and
// take two cycles: the address is registered at one rising edge and the
// word is registered on dout at the next, so the data of an address
// presented in cycle t can be used in cycle t+2. This matches the batch read
// and write waveforms of the vendor RAM the system was built with; writing
// it as a plain array, and the 256 x 8 default size (one 2,048-bit block),
// are this design's choices. Neither the array nor the read registers are
// reset.
module int_ram #(
  parameter int DATA_W = 8,
  parameter int DEPTH  = 256,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     addr_q;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    addr_q <= addr;
    dout   <= mem[addr_q];
  end

endmodule
