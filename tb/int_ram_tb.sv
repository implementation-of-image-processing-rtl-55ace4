// int_ram_tb: self-checking test of the on-chip RAM: batch writes, then
// back-to-back reads whose data must appear exactly two cycles after the
// address, compared with a shadow array.
module int_ram_tb;
  timeunit 1ns;
  timeprecision 1ns;

  localparam int DEPTH = 256;
  logic clk = 1'b0;
  logic we;
  logic [7:0] addr, din, dout;
  logic [7:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  int_ram #(.DATA_W(8), .DEPTH(DEPTH)) dut (.clk, .we, .addr, .din, .dout);

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] a_hist [$];

  initial begin
    we = 1'b0; addr = '0; din = '0;
    @(posedge clk); #1;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1'b1; addr = 8'(i); din = 8'($urandom); shadow[i] = din;
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < 600; i++) begin
        addr = 8'($urandom);
        a_hist.push_back(addr);
        // occasionally write the address being read (the read then sees
        // the new word); never one whose read is still in flight
        if (i % 7 == 3 && (a_hist.size() < 2 || a_hist[0] != addr)) begin
          we = 1'b1; din = 8'($urandom); shadow[addr] = din;
        end else we = 1'b0;
        @(posedge clk); #1;
        if (a_hist.size() == 2) begin
          logic [7:0] a;
          a = a_hist.pop_front();
          checks++;
          if (dout !== shadow[a]) begin
            failures++;
            $display("FAIL read of %0d: got %0h expected %0h", a, dout, shadow[a]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
