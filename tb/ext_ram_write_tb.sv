// ext_ram_write_tb: self-checking test of the seven-cycle external write.
//
// Writes random bytes to random addresses of a behavioural NVRAM at 50 MHz,
// single and back to back, then compares the memory with a shadow copy.
// Checks the pins in every cycle (address from cycle 1, write enable low in
// cycles 2-5, data driven in cycles 4-6 and released in cycle 7, done in
// cycle 7) and that the memory saw no set-up or pulse-width violation.
module ext_ram_write_tb;
  timeunit 1ns;
  timeprecision 1ns;

  localparam int AW = 15;
  logic clk = 1'b0;
  logic rst_n, start, ready, done;
  logic [AW-1:0] addr, mem_addr;
  logic [7:0] wdata, mem_dq_out, rd_unused;
  logic mem_ce_n, mem_we_n, mem_dq_oe;
  int viol, nwr;
  int checks = 0, failures = 0;
  logic [7:0] shadow [logic [AW-1:0]];

  ext_ram_write #(.ADDR_W(AW), .DATA_W(8)) dut (.*);

  nvram_model #(.ADDR_W(AW)) u_mem (
    .addr(mem_addr), .ce_n(mem_ce_n), .oe_n(1'b1), .we_n(mem_we_n),
    .dq_in(mem_dq_out), .dq_in_en(mem_dq_oe), .dq_out(rd_unused),
    .violations(viol), .writes(nwr)
  );

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic do_write(input logic [AW-1:0] a, input logic [7:0] d);
    start = 1'b1; addr = a; wdata = d;
    shadow[a] = d;
    @(posedge clk); #1;
    start = 1'b0; addr = '0; wdata = 8'($urandom);
    for (int cyc = 1; cyc <= 7; cyc++) begin
      chk(mem_addr == a, $sformatf("address held in cycle %0d", cyc));
      chk(mem_we_n == !(cyc >= 2 && cyc <= 5), $sformatf("we_n in cycle %0d", cyc));
      chk(mem_dq_oe == (cyc >= 4 && cyc <= 6), $sformatf("data drive in cycle %0d", cyc));
      if (cyc >= 4 && cyc <= 6) chk(mem_dq_out == d, $sformatf("data on pins in cycle %0d", cyc));
      chk(done == (cyc == 7), $sformatf("done in cycle %0d", cyc));
      if (cyc < 7) begin
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    rst_n = 1'b1;  // falling reset edge before the memory model samples the pins
    #1 rst_n = 1'b0; start = 1'b0; addr = '0; wdata = '0;
    #1;
    for (int i = 0; i < 2**AW; i++) u_mem.mem[i] = 8'h00;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    chk(ready && mem_we_n && !mem_dq_oe, "idle after reset");
    for (int i = 0; i < 300; i++) begin
      do_write(AW'($urandom), 8'($urandom_range(1, 255)));
      if ($urandom_range(0, 1) == 0) begin
        @(posedge clk); #1;
      end
    end
    repeat (3) @(posedge clk);
    foreach (shadow[a]) chk(u_mem.mem[a] == shadow[a], $sformatf("memory byte %0h", a));
    chk(nwr == 300, "one memory write per request");
    chk(viol == 0, "no timing violation seen by the memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
