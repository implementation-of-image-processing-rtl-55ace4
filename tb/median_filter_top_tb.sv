// median_filter_top_tb: end-to-end test of the whole filter system.
//
// Source and result memories are behavioural 70 ns NVRAMs at 50 MHz. Several
// images with salt-and-pepper noise (including 1-row, 1-column and
// non-square ones) are written into the source memory in the raw format
// (height, width, pixels), the system is reset and runs until led_done; the
// result memory must then hold the header and the 3x3 median of every pixel
// with the border padded by zeros, computed here by sorting. A header with
// an unsupported width must light led_err and write nothing.
//
// The result buffer is reduced to 32 entries so that the fetch stage has to
// wait for room. The test counts, and requires at least once: a row start
// through the controller's INITIATE state, continuous enabled cycles, idle
// cycles of the median pipeline between rows, a wait of the fetch stage for
// room, zero-padded sets, the flush at the end of an image, a memory write
// while the fetch stage is still reading (the stages running at the same
// time) and the error indication.
module median_filter_top_tb;
  import median_pkg::*;
  import median_ref_pkg::*;

  timeunit 1ns;
  timeprecision 1ns;

  localparam int AW = 15;
  logic clk = 1'b0;
  logic rst_n;
  logic [AW-1:0] src_addr, dst_addr;
  logic src_ce_n, src_oe_n, dst_ce_n, dst_oe_n, dst_we_n, dst_dq_oe, led_done, led_err;
  pixel_t src_dq, dst_dq_out, dst_rd;
  int sviol, snwr, dviol, dnwr;
  int checks = 0, failures = 0;

  median_filter_top #(.ADDR_W(AW), .MAX_W(256), .FIFO_DEPTH(32)) dut (.*);

  nvram_model #(.ADDR_W(AW)) u_src (
    .addr(src_addr), .ce_n(src_ce_n), .oe_n(src_oe_n), .we_n(1'b1),
    .dq_in(8'h00), .dq_in_en(1'b0), .dq_out(src_dq), .violations(sviol), .writes(snwr)
  );
  nvram_model #(.ADDR_W(AW)) u_dst (
    .addr(dst_addr), .ce_n(dst_ce_n), .oe_n(dst_oe_n), .we_n(dst_we_n),
    .dq_in(dst_dq_out), .dq_in_en(dst_dq_oe), .dq_out(dst_rd),
    .violations(dviol), .writes(dnwr)
  );

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (3000000) @(posedge clk);
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

  // mechanism counters
  int n_initiate, n_clock_enable, n_idle_between, n_room_wait, n_pad_sets, n_flush,
      n_overlap, n_err;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_median.u_fsm.state == ST_INITIATE) n_initiate++;
    if (dut.u_median.u_fsm.state == ST_CLOCK_ENABLE) n_clock_enable++;
    if (dut.u_median.u_fsm.state == ST_IDLE && dut.u_fetch.state == dut.u_fetch.F_LOAD &&
        dut.u_fetch.row != '0) n_idle_between++;
    if (dut.u_fetch.state == dut.u_fetch.F_WAIT && !dut.wr_room) n_room_wait++;
    if (dut.u_fetch.state == dut.u_fetch.F_STREAM && dut.u_fetch.pad_col) n_pad_sets++;
    if (dut.u_fetch.state == dut.u_fetch.F_FLUSH) n_flush++;
    if (!dst_we_n && !src_oe_n) n_overlap++;
  end

  int H, W;
  function automatic byte_t px(int r, int c);
    if (r < 0 || r >= H || c < 0 || c >= W) return 8'd0;
    return u_src.mem[4 + r * W + c];
  endfunction

  function automatic byte_t ref_med(int r, int c);
    byte_t v[9];
    int k = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) v[k++] = px(r + dr, c + dc);
    return med9(v);
  endfunction

  task automatic run(int h, int w, logic expect_err);
    int n, nw0, bad;
    H = h; W = w;
    rst_n = 1'b0;
    nw0 = dnwr;
    u_src.mem[0] = 8'(h); u_src.mem[1] = 8'(h >> 8);
    u_src.mem[2] = 8'(w); u_src.mem[3] = 8'(w >> 8);
    if (!expect_err)
      for (int i = 0; i < h * w; i++)
        // smooth background with 10 % salt-and-pepper noise
        u_src.mem[4 + i] = ($urandom_range(0, 9) == 0) ? 8'($urandom_range(0, 1) * 255)
                         : 8'(100 + (i % w) + $urandom_range(0, 20));
    for (int i = 0; i < 4 + h * w; i++) u_dst.mem[i] = 8'h5a;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    n = 0;
    while (!led_done && !led_err && n < 1000000) begin
      @(posedge clk);
      n++;
    end
    repeat (10) @(posedge clk);
    if (expect_err) begin
      chk(led_err && !led_done && dnwr == nw0, $sformatf("error LED for %0dx%0d", h, w));
      if (led_err) n_err++;
      return;
    end
    chk(led_done && !led_err, $sformatf("done LED for %0dx%0d", h, w));
    chk(u_dst.mem[0] == 8'(h) && u_dst.mem[1] == 8'(h >> 8) &&
        u_dst.mem[2] == 8'(w) && u_dst.mem[3] == 8'(w >> 8), "result header");
    bad = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        checks++;
        if (u_dst.mem[4 + r * w + c] != ref_med(r, c)) begin
          failures++;
          if (bad++ < 10)
            $display("FAIL %0dx%0d pixel (%0d,%0d): got %0d expected %0d", h, w, r, c,
                     u_dst.mem[4 + r * w + c], ref_med(r, c));
        end
      end
    chk(dnwr - nw0 == 4 + h * w, "one write per result byte");
    chk(sviol == 0 && dviol == 0, "no memory timing violation");
    $display("image %0dx%0d filtered in %0d cycles", h, w, n);
  endtask

  initial begin
    {n_initiate, n_clock_enable, n_idle_between, n_room_wait, n_pad_sets, n_flush,
     n_overlap, n_err} = '0;
    rst_n = 1'b1;  // falling reset edge before the memory models sample the pins
    #1 rst_n = 1'b0;
    // the 3x4 example image of the storage format
    u_src.mem[4] = 51; u_src.mem[5] = 74; u_src.mem[6] = 4; u_src.mem[7] = 152;
    u_src.mem[8] = 7; u_src.mem[9] = 111; u_src.mem[10] = 255; u_src.mem[11] = 55;
    u_src.mem[12] = 97; u_src.mem[13] = 79; u_src.mem[14] = 23; u_src.mem[15] = 3;
    H = 3; W = 4;
    begin
      // run it without overwriting the pixels
      u_src.mem[0] = 3; u_src.mem[1] = 0; u_src.mem[2] = 4; u_src.mem[3] = 0;
      for (int i = 0; i < 16; i++) u_dst.mem[i] = 8'h5a;
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1;
      while (!led_done && !led_err) @(posedge clk);
      repeat (10) @(posedge clk);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 4; c++)
          chk(u_dst.mem[4 + r * 4 + c] == ref_med(r, c), $sformatf("3x4 example (%0d,%0d)", r, c));
      // worked by hand: (0,0) sees five zeros -> 0; (0,1) -> 7; (1,1) -> 74
      chk(u_dst.mem[4] == 0 && u_dst.mem[5] == 7 && u_dst.mem[9] == 74, "3x4 example values");
    end
    run(6, 9, 1'b0);
    run(1, 12, 1'b0);
    run(7, 1, 1'b0);
    run(12, 20, 1'b0);
    run(3, 300, 1'b1);
    $display("mechanisms: initiate=%0d clock_enable=%0d idle_between_rows=%0d room_wait=%0d pad_sets=%0d flush=%0d overlap=%0d error=%0d",
             n_initiate, n_clock_enable, n_idle_between, n_room_wait, n_pad_sets, n_flush,
             n_overlap, n_err);
    chk(n_initiate > 0, "row start (INITIATE) seen");
    chk(n_clock_enable > 0, "enabled pipeline seen");
    chk(n_idle_between > 0, "idle pipeline between rows seen");
    chk(n_room_wait > 0, "fetch waited for room");
    chk(n_pad_sets > 0, "padding sets seen");
    chk(n_flush > 0, "flush seen");
    chk(n_overlap > 0, "fetch and write stages ran at the same time");
    chk(n_err > 0, "error indication seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
