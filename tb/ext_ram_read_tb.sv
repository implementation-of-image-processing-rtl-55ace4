// ext_ram_read_tb: self-checking test of the seven-cycle external read.
//
// A behavioural 70 ns NVRAM holds random bytes; it returns garbage unless
// the address and output enable have been stable long enough. The test runs
// single and back-to-back reads at 50 MHz, checks every byte, checks the pin
// sequence of each cycle (address in cycle 1, enables low in cycles 2-6 and
// released in cycle 7, done in cycle 7) and that a read takes seven cycles.
module ext_ram_read_tb;
  timeunit 1ns;
  timeprecision 1ns;

  localparam int AW = 15;
  logic clk = 1'b0;
  logic rst_n, start, ready, done;
  logic [AW-1:0] addr, mem_addr;
  logic [7:0] rdata, mem_dq;
  logic mem_ce_n, mem_oe_n;
  int viol, nwr;
  int checks = 0, failures = 0;

  ext_ram_read #(.ADDR_W(AW), .DATA_W(8)) dut (.*);

  nvram_model #(.ADDR_W(AW)) u_mem (
    .addr(mem_addr), .ce_n(mem_ce_n), .oe_n(mem_oe_n), .we_n(1'b1),
    .dq_in(8'h00), .dq_in_en(1'b0), .dq_out(mem_dq), .violations(viol), .writes(nwr)
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

  // one read; when back_to_back, the next start is given in cycle 7
  task automatic do_read(input logic [AW-1:0] a);
    start = 1'b1; addr = a;
    @(posedge clk); #1;
    start = 1'b0; addr = 'x;
    for (int cyc = 1; cyc <= 7; cyc++) begin
      chk(mem_addr == a, $sformatf("address held in cycle %0d", cyc));
      chk(mem_oe_n == !(cyc >= 2 && cyc <= 6), $sformatf("oe_n in cycle %0d", cyc));
      chk(mem_ce_n == !(cyc >= 2 && cyc <= 6), $sformatf("ce_n in cycle %0d", cyc));
      chk(done == (cyc == 7), $sformatf("done in cycle %0d", cyc));
      chk(ready == (cyc == 7), $sformatf("ready in cycle %0d", cyc));
      if (cyc == 7) chk(rdata == u_mem.mem[a], $sformatf("data of address %0h", a));
      if (cyc < 7) begin
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    rst_n = 1'b1;  // falling reset edge before the memory model samples the pins
    #1 rst_n = 1'b0; start = 1'b0; addr = '0;
    #1;
    for (int i = 0; i < 2**AW; i++) u_mem.mem[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    chk(ready && mem_ce_n && mem_oe_n, "idle after reset");
    for (int i = 0; i < 200; i++) begin
      do_read(AW'($urandom));
      // back-to-back: start again in cycle 7, or leave an idle cycle
      if ($urandom_range(0, 1) == 0) begin
        @(posedge clk); #1;
      end
    end
    chk(viol == 0, "no bus contention seen by the memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
