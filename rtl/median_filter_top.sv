// median_filter_top: 3x3 median filter for 8-bit gray-level images,
// between a source image memory and a result NVRAM.
//
// The system removes impulse (salt-and-pepper) noise from images such as
// blood smear micrographs by replacing every pixel with the median of its
// 3x3 neighbourhood, the border padded with zeros. It is a three-stage
// pipeline whose stages run at the same time:
//   fetch_block   reads the image (header, then rows) from the source memory
//                 into line buffers and streams sets of three vertically
//                 adjacent pixels, one per clock within a row;
//   median_block  a Moore controller and a ten-stage pipelined median core
//                 that turns three consecutive sets into one median;
//   write_block   picks the image's medians out of the pipeline output,
//                 buffers them and writes the filtered image to the result
//                 NVRAM.
// Both memories are 32K x 8 asynchronous parts driven with seven-cycle read
// and write protocols, meant for clocks up to 50 MHz (the reference board
// runs at 25.175 MHz).
//
// Ports: rst_n is the reset switch (active low, asynchronous). src_* go to
// the source memory (flash or NVRAM, read only). dst_* go to the result
// NVRAM; dst_dq_out must reach the data pins through a tri-state buffer
// enabled by dst_dq_oe, and dst_oe_n is held high because the result memory
// is only written. led_done lights when the whole image has been written,
// led_err when the header gives a size the hardware cannot process.
// The three-block split, the memories and the LED/reset connections are the
// published system; the meaning given to the two LEDs is this design's
// choice.
module median_filter_top
  import median_pkg::*;
#(
  parameter int ADDR_W     = 15,
  parameter int MAX_W      = 256,
  parameter int FIFO_DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // source image memory
  output logic [ADDR_W-1:0] src_addr,
  output logic              src_ce_n,
  output logic              src_oe_n,
  input  pixel_t            src_dq,
  // result memory
  output logic [ADDR_W-1:0] dst_addr,
  output logic              dst_ce_n,
  output logic              dst_oe_n,
  output logic              dst_we_n,
  output pixel_t            dst_dq_out,
  output logic              dst_dq_oe,
  // LED indicators
  output logic              led_done,
  output logic              led_err
);

  logic         f_shift, f_new_row, m_shift, m_new_row;
  pixel_t [2:0] f_set;
  pixel_t       m_median;
  logic         wr_room, hdr_valid, f_done, f_err, w_done;
  dim_t         img_h, img_w;

  fetch_block #(.ADDR_W(ADDR_W), .MAX_W(MAX_W)) u_fetch (
    .clk, .rst_n,
    .src_addr, .src_ce_n, .src_oe_n, .src_dq,
    .shift_out(f_shift), .new_row_out(f_new_row), .p_out(f_set),
    .wr_room, .img_h, .img_w, .hdr_valid,
    .err(f_err), .done(f_done)
  );

  median_block u_median (
    .clk, .rst_n,
    .shift_in(f_shift), .new_row_in(f_new_row), .p_in(f_set),
    .median(m_median), .shift_out(m_shift), .new_row_out(m_new_row)
  );

  write_block #(.ADDR_W(ADDR_W), .FIFO_DEPTH(FIFO_DEPTH)) u_write (
    .clk, .rst_n,
    .median(m_median), .shift_in(m_shift), .new_row_in(m_new_row),
    .img_h, .img_w, .hdr_valid, .wr_room,
    .dst_addr, .dst_ce_n, .dst_we_n, .dst_dq_out, .dst_dq_oe,
    .done(w_done)
  );

  assign dst_oe_n = 1'b1;
  assign led_done = w_done && f_done;
  assign led_err  = f_err;

endmodule
