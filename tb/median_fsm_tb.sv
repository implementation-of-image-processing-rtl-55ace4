// median_fsm_tb: self-checking test of the median block's controller.
//
// Replays the single-input and batch-input waveforms (en and shift_out one
// cycle after shift_in, new_row_out high only in the cycle after new_row_in)
// and then drives random inputs, comparing every cycle with a reference
// written from the state transition table.
module median_fsm_tb;
  import median_pkg::*;

  timeunit 1ns;
  timeprecision 1ns;

  logic clk = 1'b0;
  logic rst_n, shift_in, new_row_in, en, shift_out, new_row_out;
  int checks = 0, failures = 0;

  median_fsm dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: 0 idle, 1 clock enable, 2 initiate
  int ref_st;

  task automatic expect_out(input logic e, input logic nr, input string what);
    checks++;
    if (en !== e || shift_out !== e || new_row_out !== nr) begin
      failures++;
      $display("FAIL %s: en=%0b shift_out=%0b new_row_out=%0b expected %0b %0b %0b",
               what, en, shift_out, new_row_out, e, e, nr);
    end
  endtask

  task automatic cycle(input logic s, input logic n);
    shift_in = s; new_row_in = n;
    @(posedge clk);
    unique case (ref_st)
      0: ref_st = (s && n) ? 2 : (s ? 1 : 0);
      default: ref_st = (s && !n) ? 1 : 0;
    endcase
    #1;
    expect_out(ref_st != 0, ref_st == 2, $sformatf("after inputs %0b%0b", s, n));
  endtask

  int n_init, n_ce, n_err;

  initial begin
    rst_n = 1'b0; shift_in = 1'b0; new_row_in = 1'b0; ref_st = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_out(1'b0, 1'b0, "idle after reset");

    // single input: one shift with new row
    cycle(1, 1); cycle(0, 0); cycle(0, 0);
    // batch input: four shifts, the first with new row
    cycle(1, 1); cycle(1, 0); cycle(1, 0); cycle(1, 0); cycle(0, 0); cycle(0, 0);

    n_init = 0; n_ce = 0; n_err = 0;
    for (int i = 0; i < 5000; i++) begin
      logic s, n;
      int prev;
      prev = ref_st;
      s = 1'($urandom_range(0, 3) != 0);
      n = 1'($urandom_range(0, 4) == 0);
      cycle(s, n);
      if (ref_st == 2) n_init++;
      if (ref_st == 1) n_ce++;
      if (prev != 0 && n) n_err++;
    end
    checks++;
    if (n_init == 0 || n_ce == 0 || n_err == 0) begin
      failures++;
      $display("FAIL coverage init=%0d ce=%0d err=%0d", n_init, n_ce, n_err);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
