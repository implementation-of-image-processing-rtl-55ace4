// ext_ram_read: reads one byte from an external asynchronous SRAM/NVRAM or
// flash with a fixed seven-cycle protocol.
//
//   cycle 1  address driven out
//   cycle 2  chip and output enable asserted (low)
//   cycle 3-5 wait
//   cycle 6  data pins latched into rdata at the end of the cycle
//   cycle 7  chip and output enable released; done = 1, rdata valid
//
// At 50 MHz this gives 120 ns from address to data latch and suits a 70 ns
// part with margin for pad delays; the protocol holds at 50 MHz and below.
// The cycle table is the published read protocol; asserting chip enable
// together with output enable is this design's choice.
//
// Interface: start is taken when ready is high (idle or in cycle 7, so that
// reads can follow each other every seven cycles); addr is sampled with
// start. rdata keeps its value until the next read's cycle 6.
module ext_ram_read #(
  parameter int ADDR_W = 15,
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] addr,
  output logic              ready,
  output logic              done,
  output logic [DATA_W-1:0] rdata,
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_ce_n,
  output logic              mem_oe_n,
  input  logic [DATA_W-1:0] mem_dq
);

  logic [2:0] phase;   // 0 idle, 1..7 protocol cycle

  assign ready = (phase == 3'd0) || (phase == 3'd7);
  assign done  = (phase == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= 3'd0;
      mem_addr <= '0;
      mem_ce_n <= 1'b1;
      mem_oe_n <= 1'b1;
      rdata    <= '0;
    end else begin
      if (ready && start) begin
        phase    <= 3'd1;
        mem_addr <= addr;
      end else if (phase == 3'd7) begin
        phase    <= 3'd0;
      end else if (phase != 3'd0) begin
        phase    <= phase + 3'd1;
      end
      // enables are registered: low during cycles 2..6
      mem_ce_n <= !(phase >= 3'd1 && phase <= 3'd5);
      mem_oe_n <= !(phase >= 3'd1 && phase <= 3'd5);
      if (phase == 3'd6) rdata <= mem_dq;
    end
  end

endmodule
