// median_filter_full_tb: the whole system at its default sizes on the
// largest image it can hold.
//
// With a 32K x 8 source memory and 256-pixel line buffers the largest image
// of full width is 127 rows x 256 columns (4 + 127*256 = 32,516 bytes). The
// test fills the source memory with such an image (a gradient with 10 %
// salt-and-pepper noise), runs the unmodified top at 50 MHz until led_done
// and compares every result pixel with the zero-padded 3x3 median computed
// here by sorting. It also checks that the noise is gone: away from the
// border, fewer than one in fifty of the input's 0 and 255 pixels survive. The cycle count is printed.
module median_filter_full_tb;
  import median_pkg::*;
  import median_ref_pkg::*;

  timeunit 1ns;
  timeprecision 1ns;

  localparam int AW = 15;
  localparam int H = 127, W = 256;
  logic clk = 1'b0;
  logic rst_n;
  logic [AW-1:0] src_addr, dst_addr;
  logic src_ce_n, src_oe_n, dst_ce_n, dst_oe_n, dst_we_n, dst_dq_oe, led_done, led_err;
  pixel_t src_dq, dst_dq_out, dst_rd;
  int sviol, snwr, dviol, dnwr;
  int checks = 0, failures = 0;

  median_filter_top dut (.*);

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

  int cycles = 0;
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  initial begin
    int bad, noisy, noisy_in;
    rst_n = 1'b1;  // falling reset edge before the memory models sample the pins
    #1 rst_n = 1'b0;
    #1;
    u_src.mem[0] = 8'(H); u_src.mem[1] = 8'(H >> 8);
    u_src.mem[2] = 8'(W); u_src.mem[3] = 8'(W >> 8);
    for (int i = 0; i < H * W; i++)
      u_src.mem[4 + i] = ($urandom_range(0, 9) == 0) ? 8'($urandom_range(0, 1) * 255)
                       : 8'(40 + (i % W) / 2 + (i / W) / 2 + $urandom_range(0, 10));
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!led_done && !led_err) begin
      @(posedge clk);
      cycles++;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (!led_done || led_err) begin
      failures++;
      $display("FAIL did not finish");
    end
    checks++;
    if (u_dst.mem[0] != 8'(H) || u_dst.mem[1] != 8'(H >> 8) ||
        u_dst.mem[2] != 8'(W) || u_dst.mem[3] != 8'(W >> 8)) begin
      failures++;
      $display("FAIL result header");
    end
    bad = 0; noisy = 0; noisy_in = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (u_dst.mem[4 + r * W + c] != ref_med(r, c)) begin
          failures++;
          if (bad++ < 10)
            $display("FAIL pixel (%0d,%0d): got %0d expected %0d", r, c,
                     u_dst.mem[4 + r * W + c], ref_med(r, c));
        end
        if (r > 0 && r < H - 1 && c > 0 && c < W - 1) begin
          if (u_dst.mem[4 + r * W + c] == 0 || u_dst.mem[4 + r * W + c] == 255) noisy++;
          if (px(r, c) == 0 || px(r, c) == 255) noisy_in++;
        end
      end
    checks++;
    if (noisy * 50 > noisy_in || sviol != 0 || dviol != 0 || dnwr != 4 + H * W) begin
      failures++;
      $display("FAIL noisy=%0d of %0d, violations=%0d/%0d writes=%0d", noisy, noisy_in, sviol, dviol, dnwr);
    end
    $display("impulse pixels: %0d in, %0d out", noisy_in, noisy);
    $display("%0dx%0d image filtered in %0d cycles (%0.2f ms at 50 MHz)", H, W, cycles,
             real'(cycles) / 50000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
