// median_block_tb: self-checking test of the median block (controller and
// core together).
//
// Streams small random images row by row as the fetch stage does: W+2 sets
// per row (zero padding column at both ends, rows outside the image zero),
// shift_in/new_row_in one cycle ahead of the pixels, idle gaps between rows
// and eight zero sets at the end. Checks that shift_out and new_row_out
// follow the inputs one cycle later and that every median of the image,
// taken 10 enabled cycles after the first set of its window, equals the
// sorted-middle value of the 3x3 zero-padded neighbourhood.
module median_block_tb;
  import median_pkg::*;
  import median_ref_pkg::*;

  timeunit 1ns;
  timeprecision 1ns;

  logic         clk = 1'b0;
  logic         rst_n, shift_in, new_row_in, shift_out, new_row_out;
  pixel_t [2:0] p_in;
  pixel_t       median;
  int checks = 0, failures = 0;

  median_block dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int MAXD = 16;
  byte_t img [MAXD][MAXD];
  int H, W;

  function automatic byte_t px(int r, int c);
    if (r < 0 || r >= H || c < 0 || c >= W) return 8'd0;
    return img[r][c];
  endfunction

  function automatic byte_t ref_med(int r, int c);
    byte_t v[9];
    int k = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) v[k++] = px(r + dr, c + dc);
    return med9(v);
  endfunction

  // stimulus queue: one entry per cycle
  typedef struct { logic s; logic n; byte_t d[3]; } cyc_t;
  cyc_t stim [$];

  // what the pipeline took: per enabled edge, (row, centre col) of the
  // window whose oldest set it is, or -1
  int row_of [$];
  int col_of [$];
  int got, new_rows;

  task automatic run_image(int h, int w);
    cyc_t c;
    H = h; W = w;
    for (int r = 0; r < H; r++)
      for (int cc = 0; cc < W; cc++)
        img[r][cc] = ($urandom_range(0, 9) == 0) ? 8'($urandom_range(0, 1) * 255) : 8'($urandom);
    stim.delete();
    for (int r = 0; r < H; r++) begin
      for (int k = 0; k < W + 2; k++) begin
        c.s = 1'b1; c.n = (k == 0);
        for (int l = 0; l < 3; l++) c.d[l] = px(r - 1 + l, k - 1);
        stim.push_back(c);
      end
      repeat ($urandom_range(1, 4)) begin
        c.s = 1'b0; c.n = 1'b0; c.d = '{0, 0, 0};
        stim.push_back(c);
      end
    end
    for (int k = 0; k < FLUSH_SETS; k++) begin
      c.s = 1'b1; c.n = 1'b0; c.d = '{0, 0, 0};
      stim.push_back(c);
    end
    c.s = 1'b0; c.n = 1'b0; stim.push_back(c); stim.push_back(c);
  endtask

  initial begin
    int en_cnt;
    int starts [$];
    cyc_t prev, cur, idle;
    idle.s = 1'b0; idle.n = 1'b0; idle.d = '{0, 0, 0};
    rst_n = 1'b0; shift_in = 1'b0; new_row_in = 1'b0; p_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int t = 0; t < 6; t++) begin
      int h, w;
      h = (t == 0) ? 1 : $urandom_range(2, 9);
      w = (t == 1) ? 1 : $urandom_range(2, 12);
      run_image(h, w);
      got = 0; new_rows = 0; en_cnt = 0; starts.delete();
      prev = idle;
      while (stim.size() > 0 || prev.s) begin
        cur = (stim.size() > 0) ? stim.pop_front() : idle;
        // one clock cycle: announce cur, present the pixels of prev
        shift_in = cur.s; new_row_in = cur.n;
        for (int l = 0; l < 3; l++) p_in[l] = prev.d[l];
        #1;
        checks++;
        if (shift_out !== prev.s || new_row_out !== prev.n) begin
          failures++;
          $display("FAIL control: shift_out=%0b new_row_out=%0b expected %0b %0b",
                   shift_out, new_row_out, prev.s, prev.n);
        end
        if (shift_out && new_row_out) begin
          starts.push_back(en_cnt);
          new_rows++;
        end
        @(posedge clk);
        #1;
        if (prev.s) begin
          en_cnt++;
          // after the 10th enabled edge of a row: centre column 0, and so on
          for (int rr = 0; rr < starts.size(); rr++)
          if (en_cnt - starts[rr] - MED_LATENCY >= 0 && en_cnt - starts[rr] - MED_LATENCY < W) begin
            int cc;
            cc = en_cnt - starts[rr] - MED_LATENCY;
            checks++;
            got++;
            if (median !== ref_med(rr, cc)) begin
              failures++;
              $display("FAIL %0dx%0d pixel (%0d,%0d): got %0d expected %0d",
                       H, W, rr, cc, median, ref_med(rr, cc));
            end
          end
        end
        prev = cur;
      end
      checks++;
      if (got != H * W || new_rows != H) begin
        failures++;
        $display("FAIL %0dx%0d: %0d medians, %0d new rows", H, W, got, new_rows);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
