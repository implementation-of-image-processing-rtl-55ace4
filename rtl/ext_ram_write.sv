// ext_ram_write: writes one byte to an external asynchronous NVRAM with a
// fixed seven-cycle protocol.
//
//   cycle 1  address driven out
//   cycle 2  chip enable and write enable asserted (low)
//   cycle 3  wait
//   cycle 4  data driven onto the pins
//   cycle 5  wait
//   cycle 6  write enable and chip enable released (the write happens here)
//   cycle 7  data pins released (high impedance); done = 1
//
// At 50 MHz the write pulse is 80 ns and data is set up 40 ns before write
// enable rises and held for one cycle after it. The cycle table is the
// published write protocol; splitting the bidirectional pins into
// mem_dq_out and an enable mem_dq_oe for the pad buffer, and moving chip
// enable with write enable, are this design's choices.
//
// Interface: start is taken when ready is high (idle or cycle 7); addr and
// wdata are sampled with start and the address stays on the pins until the
// next write starts.
module ext_ram_write #(
  parameter int ADDR_W = 15,
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic              ready,
  output logic              done,
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_ce_n,
  output logic              mem_we_n,
  output logic [DATA_W-1:0] mem_dq_out,
  output logic              mem_dq_oe
);

  logic [2:0]        phase;   // 0 idle, 1..7 protocol cycle
  logic [DATA_W-1:0] wdata_q;

  assign ready = (phase == 3'd0) || (phase == 3'd7);
  assign done  = (phase == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= 3'd0;
      mem_addr   <= '0;
      wdata_q    <= '0;
      mem_ce_n   <= 1'b1;
      mem_we_n   <= 1'b1;
      mem_dq_out <= '0;
      mem_dq_oe  <= 1'b0;
    end else begin
      if (ready && start) begin
        phase    <= 3'd1;
        mem_addr <= addr;
        wdata_q  <= wdata;
      end else if (phase == 3'd7) begin
        phase    <= 3'd0;
      end else if (phase != 3'd0) begin
        phase    <= phase + 3'd1;
      end
      // registered pin controls, decoded from the cycle that is ending:
      // write enable low in cycles 2..5, data driven in cycles 4..6
      mem_ce_n   <= !(phase >= 3'd1 && phase <= 3'd4);
      mem_we_n   <= !(phase >= 3'd1 && phase <= 3'd4);
      mem_dq_oe  <=  (phase >= 3'd3 && phase <= 3'd5);
      if (phase == 3'd3) mem_dq_out <= wdata_q;
    end
  end

endmodule
