// fetch_block_tb: self-checking test of the fetch stage.
//
// Puts images (header + raw pixels) into a behavioural source NVRAM, lets
// the write stage's room signal come and go at random, and records every set
// the fetch stage sends (pixels taken one cycle after shift_out). Checks the
// header outputs, the exact sequence of sets (W+2 per row, zero padding at
// the left/right columns and above/below the image, the first set of each
// row flagged new_row_out, eight zero sets at the end), that no row starts
// without room, that no new row follows a set without an idle cycle, and
// that unsupported headers raise err and send nothing. Sizes include 1xN,
// Nx1 and a full 256-pixel-wide row.
module fetch_block_tb;
  import median_pkg::*;

  timeunit 1ns;
  timeprecision 1ns;

  localparam int AW = 15;
  logic clk = 1'b0;
  logic rst_n;
  logic [AW-1:0] src_addr;
  logic src_ce_n, src_oe_n;
  pixel_t src_dq;
  logic shift_out, new_row_out, wr_room, hdr_valid, err, done;
  pixel_t [2:0] p_out;
  dim_t img_h, img_w;
  int viol, nwr;
  int checks = 0, failures = 0;

  fetch_block #(.ADDR_W(AW), .MAX_W(256)) dut (.*);

  nvram_model #(.ADDR_W(AW)) u_src (
    .addr(src_addr), .ce_n(src_ce_n), .oe_n(src_oe_n), .we_n(1'b1),
    .dq_in(8'h00), .dq_in_en(1'b0), .dq_out(src_dq), .violations(viol), .writes(nwr)
  );

  always #10 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  int H, W;
  function automatic pixel_t px(int r, int c);
    if (r < 0 || r >= H || c < 0 || c >= W) return 8'd0;
    return u_src.mem[4 + r * W + c];
  endfunction

  typedef struct { logic nr; pixel_t d[3]; } set_t;

  task automatic run(int h, int w, logic expect_err);
    set_t got [$];
    set_t s;
    logic prev_shift, prev_nr, pend;
    logic room_hist[3];
    int cyc, idx, n_stall;
    H = h; W = w;
    rst_n = 1'b0;
    u_src.mem[0] = 8'(h); u_src.mem[1] = 8'(h >> 8);
    u_src.mem[2] = 8'(w); u_src.mem[3] = 8'(w >> 8);
    if (!expect_err)
      for (int i = 0; i < h * w; i++) u_src.mem[4 + i] = 8'($urandom_range(1, 255));
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    prev_shift = 1'b0; prev_nr = 1'b0; pend = 1'b0;
    room_hist = '{1'b0, 1'b0, 1'b0};
    cyc = 0; n_stall = 0;
    while (!(done || err) || pend || shift_out) begin
      #1;
      wr_room = ($urandom_range(0, 3) != 0);
      if (pend) begin
        s.d[0] = p_out[0]; s.d[1] = p_out[1]; s.d[2] = p_out[2];
        got.push_back(s);
      end
      pend = shift_out;
      if (shift_out) s.nr = new_row_out;
      // a row (or the flush) begins only after room was reported
      if (shift_out && !prev_shift) chk(room_hist[1], "stream started with room");
      if (shift_out && new_row_out) chk(!prev_shift, "idle cycle before a new row");
      if (!shift_out) chk(!new_row_out, "new_row_out only with shift_out");
      if (!wr_room && !shift_out && !(done || err) && hdr_valid) n_stall++;
      prev_shift = shift_out;
      room_hist[1] = room_hist[0]; room_hist[0] = wr_room;
      @(posedge clk);
      cyc++;
    end
    if (expect_err) begin
      chk(err && !hdr_valid && got.size() == 0, $sformatf("error for %0dx%0d", h, w));
      return;
    end
    chk(!err && hdr_valid && img_h == dim_t'(h) && img_w == dim_t'(w), "header outputs");
    chk(got.size() == h * (w + 2) + FLUSH_SETS,
        $sformatf("%0dx%0d: %0d sets", h, w, got.size()));
    idx = 0;
    for (int r = 0; r < h; r++)
      for (int k = 0; k < w + 2; k++) begin
        if (idx < got.size()) begin
          s = got[idx];
          chk(s.nr == (k == 0), $sformatf("new_row flag row %0d set %0d", r, k));
          for (int l = 0; l < 3; l++)
            chk(s.d[l] == px(r - 1 + l, k - 1),
                $sformatf("%0dx%0d row %0d set %0d lane %0d: %0d vs %0d", h, w, r, k, l,
                          s.d[l], px(r - 1 + l, k - 1)));
        end
        idx++;
      end
    for (int k = 0; k < FLUSH_SETS; k++)
      if (idx < got.size()) begin
        s = got[idx++];
        chk(!s.nr && s.d[0] == 0 && s.d[1] == 0 && s.d[2] == 0, "flush set");
      end
    chk(viol == 0, "no bus contention");
    chk(n_stall > 0, "fetch waited for room at least once");
  endtask

  initial begin
    rst_n = 1'b1;  // falling reset edge before the memory models sample the pins
    #1 rst_n = 1'b0; wr_room = 1'b1;
    run(5, 7, 1'b0);
    run(1, 6, 1'b0);
    run(4, 1, 1'b0);
    run(2, 3, 1'b0);
    run(3, 256, 1'b0);
    run(2, 257, 1'b1);
    run(4, 0, 1'b1);
    run(0, 5, 1'b1);
    run(200, 200, 1'b1);   // 40,004 bytes do not fit 32 KiB
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
