// median_core_tb: self-checking test of the pipelined median core.
//
// Feeds sets of three pixels with the enable randomly interrupted and checks
// that after the n-th enabled edge the output equals the median (computed by
// sorting) of the sets taken at edges n-9, n-8 and n-7, i.e. the result of a
// window appears exactly 10 enabled edges after its oldest set is taken.
// Also checks the worked 3x3 example (10 30 5 / 20 200 20 / 15 10 30 gives
// 20), that the output holds while the enable is low, and values at the ends
// of the range and with repeats.
module median_core_tb;
  import median_pkg::*;
  import median_ref_pkg::*;

  timeunit 1ns;
  timeprecision 1ns;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         en;
  pixel_t [2:0] p_in;
  pixel_t       median;

  int checks = 0, failures = 0;

  median_core dut (.clk, .rst_n, .en, .p_in, .median);

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte_t sets [$][3];
  byte_t s3 [3];

  task automatic check(input byte_t exp, input string what);
    checks++;
    if (median !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, median, exp);
    end
  endtask

  // take one set on one enabled edge, then check the output
  task automatic step(input byte_t a, input byte_t b, input byte_t c);
    byte_t prev;
    int n;
    prev = median;
    p_in[0] = a; p_in[1] = b; p_in[2] = c;
    en = 1'b1;
    @(posedge clk);
    #1;
    en = 1'b0;
    s3[0] = a; s3[1] = b; s3[2] = c;
    sets.push_back(s3);
    n = sets.size();
    if (n >= 10)
      check(med_sets(sets[n-10], sets[n-9], sets[n-8]), $sformatf("window ending at set %0d", n));
  endtask

  byte_t hold;

  initial begin
    rst_n = 1'b0; en = 1'b0; p_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // worked example: rows (10 30 5) (20 200 20) (15 10 30), one set per mask
    // column; seven more sets bring the result to the output
    step(10, 20, 15);
    step(30, 200, 10);
    step(5, 20, 30);
    for (int i = 0; i < 6; i++) step(0, 0, 0);
    checks++;
    if (median === 8'd20) begin
      failures++;   // must not be there one edge early
      $display("FAIL result one edge early");
    end
    step(0, 0, 0);
    check(8'd20, "worked example after 10 enabled edges");

    // random sets, with gaps in the enable
    for (int i = 0; i < 3000; i++) begin
      byte_t a, b, c;
      if (i % 3 == 0) begin
        a = 8'($urandom_range(0, 3)) * 85; b = 8'($urandom_range(0, 3)) * 85;
        c = 8'($urandom_range(0, 3)) * 85;
      end else begin
        a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      end
      step(a, b, c);
      if ($urandom_range(0, 3) == 0) begin
        hold = median;
        p_in[0] = 8'($urandom); p_in[1] = 8'($urandom); p_in[2] = 8'($urandom);
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
        check(hold, "output holds while en is low");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
