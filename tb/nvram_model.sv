// nvram_model: behavioural model of a 32K x 8 asynchronous battery-backed
// SRAM of the 70 ns class (used here for both the source image memory and
// the result memory). Not synthesizable.
//
// Read: the data pins carry the addressed byte only when chip enable and
// output enable are low, the address has been stable for at least T_ACC and
// output enable has been low for at least T_OE; otherwise they carry random
// bytes, so that a controller that samples too early reads garbage.
// Write: the byte on dq_in is stored when write enable rises while chip
// enable is (or was, one sample earlier) low. The model counts protocol violations: data not driven or
// not stable for T_DS before the rising edge, write pulse shorter than T_WP,
// address changing while write enable is low, and the FPGA driving the pins
// while the memory drives them. Signals are sampled every STEP.
module nvram_model #(
  parameter int ADDR_W = 15,
  parameter int T_ACC  = 70,
  parameter int T_OE   = 35,
  parameter int T_WP   = 55,
  parameter int T_DS   = 30,
  parameter int STEP   = 5
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic              ce_n,
  input  logic              oe_n,
  input  logic              we_n,
  input  logic [7:0]        dq_in,
  input  logic              dq_in_en,
  output logic [7:0]        dq_out,
  output int                violations,
  output int                writes
);
  timeunit 1ns;
  timeprecision 1ns;

  logic [7:0] mem [2**ADDR_W];

  time t_addr, t_oe, t_we, t_din;
  logic [ADDR_W-1:0] addr_q;
  logic              oe_q, we_q, en_q, ce_q;
  logic [7:0]        din_q;

  initial begin
    violations = 0;
    writes     = 0;
    t_addr = 0; t_oe = 0; t_we = 0; t_din = 0;
    addr_q = '0; oe_q = 1'b1; we_q = 1'b1; ce_q = 1'b1; en_q = 1'b0; din_q = '0;
    dq_out = '0;
  end

  always #(STEP) begin
    if (addr !== addr_q) begin
      if (!we_q && !ce_n) violations++;
      t_addr = $time;
    end
    if (oe_n == 1'b0 && oe_q == 1'b1) t_oe = $time;
    if (we_n == 1'b0 && we_q == 1'b1) t_we = $time;
    if (dq_in !== din_q || dq_in_en !== en_q) t_din = $time;
    // write on the rising edge of write enable
    if (we_n == 1'b1 && we_q == 1'b0 && (!ce_n || !ce_q)) begin
      if (!dq_in_en || ($time - t_din) < T_DS) violations++;
      if (($time - t_we) < T_WP) violations++;
      mem[addr] = dq_in;
      writes++;
    end
    if (!ce_n && !oe_n && dq_in_en) violations++;
    if (!ce_n && !oe_n && we_n && ($time - t_addr) >= T_ACC && ($time - t_oe) >= T_OE)
      dq_out = mem[addr];
    else
      dq_out = 8'($urandom);
    addr_q = addr; ce_q = ce_n; oe_q = oe_n; we_q = we_n; din_q = dq_in; en_q = dq_in_en;
  end

endmodule
