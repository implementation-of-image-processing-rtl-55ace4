// write_block_tb: self-checking test of the write stage.
//
// Plays the part of the median stage: enabled cycles (shift_in) in rows of
// W+2 with new_row_in on the first, random idle cycles, eight flush cycles at
// the end, and a new random value on the median output after every enabled
// edge. A row is only started while wr_room is high. The expected image is
// worked out from the pipeline depth alone: the result of row r, column c is
// the value that followed enabled edge (start of row r) + 9 + c. The test
// then compares the result NVRAM (header and pixels) with it, checks done,
// the number of memory writes and the memory's timing checks. A small FIFO
// makes the room signal go low.
module write_block_tb;
  import median_pkg::*;

  timeunit 1ns;
  timeprecision 1ns;

  localparam int AW = 15;
  localparam int FD = 32;
  logic clk = 1'b0;
  logic rst_n, shift_in, new_row_in, hdr_valid, wr_room, done;
  pixel_t median;
  dim_t img_h, img_w;
  logic [AW-1:0] dst_addr;
  logic dst_ce_n, dst_we_n, dst_dq_oe;
  pixel_t dst_dq_out, rd_unused;
  int viol, nwr;
  int checks = 0, failures = 0;

  write_block #(.ADDR_W(AW), .FIFO_DEPTH(FD)) dut (.*);

  nvram_model #(.ADDR_W(AW)) u_dst (
    .addr(dst_addr), .ce_n(dst_ce_n), .oe_n(1'b1), .we_n(dst_we_n),
    .dq_in(dst_dq_out), .dq_in_en(dst_dq_oe), .dq_out(rd_unused),
    .violations(viol), .writes(nwr)
  );

  always #10 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  pixel_t val [$];      // value after each enabled edge
  int     starts [$];   // enabled-edge index of each row's first set
  int     n_noroom;

  task automatic cyc(input logic s, input logic n);
    shift_in = s; new_row_in = n;
    if (s && n) starts.push_back(val.size());
    @(posedge clk);
    #1;
    if (s) begin
      median = 8'($urandom);
      val.push_back(median);
    end
  endtask

  task automatic run(int h, int w);
    int nwr0;
    nwr0 = nwr;
    val.delete(); starts.delete();
    rst_n = 1'b0; shift_in = 1'b0; new_row_in = 1'b0; median = '0;
    hdr_valid = 1'b0; img_h = dim_t'(h); img_w = dim_t'(w);
    for (int i = 0; i < 4 + h * w + 8; i++) u_dst.mem[i] = 8'h00;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) cyc(0, 0);
    hdr_valid = 1'b1;
    for (int r = 0; r <= h; r++) begin
      while (!wr_room) begin
        n_noroom++;
        cyc(0, 0);
      end
      cyc(0, 0);
      if (r < h) begin
        for (int k = 0; k < w + 2; k++) cyc(1, k == 0);
      end else begin
        for (int k = 0; k < FLUSH_SETS; k++) cyc(1, 0);
      end
      repeat ($urandom_range(0, 30)) cyc(0, 0);
    end
    while (!done) cyc(0, 0);
    repeat (3) cyc(0, 0);
    chk(u_dst.mem[0] == 8'(h) && u_dst.mem[1] == 8'(h >> 8) &&
        u_dst.mem[2] == 8'(w) && u_dst.mem[3] == 8'(w >> 8), "header written");
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        chk(u_dst.mem[4 + r * w + c] == val[starts[r] + MED_LATENCY - 1 + c],
            $sformatf("%0dx%0d pixel (%0d,%0d)", h, w, r, c));
    chk(nwr - nwr0 == 4 + h * w, $sformatf("%0d writes for %0dx%0d", nwr - nwr0, h, w));
    chk(viol == 0, "no memory timing violation");
  endtask

  initial begin
    rst_n = 1'b1;  // falling reset edge before the memory model samples the pins
    #1;
    n_noroom = 0;
    run(3, 4);
    run(1, 1);
    run(6, 20);
    run(4, 5);
    chk(n_noroom > 0, "room went low at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
