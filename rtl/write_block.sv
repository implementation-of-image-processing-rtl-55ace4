// write_block: the write stage of the median filter system.
//
// Saves the filtered image to the result NVRAM in the same format as the
// source image: height (2 bytes, low first), width (2 bytes), then the
// pixels row by row from address 4. Each byte is written with the
// seven-cycle protocol of ext_ram_write.
//
// How it works: the median pipeline advances only when the median stage's
// shift_in (its shift_out) is high, and its output is the median of the
// window whose oldest set entered MED_LATENCY enabled edges earlier. A
// MED_LATENCY-deep shift register, shifted with shift_in and fed with
// new_row_in, therefore marks the enabled edge after which the median of the
// first window of a row (centre column 0) is in the output register; the
// next W-1 enabled edges give centre columns 1..W-1, and everything else
// (windows spanning two rows, flush) is discarded. Kept results go into a
// FIFO in the cycle after their edge, because they arrive up to one per
// clock while a memory write takes seven. wr_room tells the fetch stage
// that the FIFO can take a whole row (W + MED_LATENCY results).
//
// The header bytes are written as soon as hdr_valid is seen, the pixels as
// they come out of the FIFO; done is raised when the last pixel's write has
// finished. Saving the filtered image to RAM is the published task of this
// stage; the result format, the FIFO and the way results are picked out are
// this design's choices.
module write_block
  import median_pkg::*;
#(
  parameter int ADDR_W     = 15,
  parameter int FIFO_DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the median stage
  input  pixel_t            median,
  input  logic              shift_in,
  input  logic              new_row_in,
  // from / to the fetch stage
  input  dim_t              img_h,
  input  dim_t              img_w,
  input  logic              hdr_valid,
  output logic              wr_room,
  // result memory pins
  output logic [ADDR_W-1:0] dst_addr,
  output logic              dst_ce_n,
  output logic              dst_we_n,
  output pixel_t            dst_dq_out,
  output logic              dst_dq_oe,
  // status
  output logic              done
);

  localparam int CW = $clog2(FIFO_DEPTH + 1);

  // ------------------------------------------------------------------
  // pick the image's results out of the median output
  logic [MED_LATENCY-2:0] tag;      // tag_nx without its oldest bit
  logic [MED_LATENCY-1:0] tag_nx;
  logic                   active, take;
  dim_t                   out_col;

  assign tag_nx = {tag, new_row_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag     <= '0;
      active  <= 1'b0;
      take    <= 1'b0;
      out_col <= '0;
    end else begin
      take <= 1'b0;
      if (shift_in) begin
        tag <= tag_nx[MED_LATENCY-2:0];
        if (tag_nx[MED_LATENCY-1]) begin
          out_col <= '0;
          active  <= 1'b1;
          take    <= 1'b1;
        end else if (active && out_col < img_w - 1'b1) begin
          out_col <= out_col + 1'b1;
          take    <= 1'b1;
        end else begin
          active  <= 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // result buffer
  logic          f_pop, f_empty, f_full;
  pixel_t        f_dout;
  logic [CW-1:0] f_count;

  pixel_fifo #(.DATA_W(PIX_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(take), .din(median),
    .pop(f_pop), .dout(f_dout), .empty(f_empty), .full(f_full),
    .count(f_count)
  );

  logic [DIM_W+1:0] room;
  assign room    = (DIM_W+2)'(FIFO_DEPTH) - (DIM_W+2)'(f_count);
  assign wr_room = room >= (DIM_W+2)'(img_w) + (DIM_W+2)'(MED_LATENCY);

  // ------------------------------------------------------------------
  // memory writer
  typedef enum logic [2:0] { W_WAIT_HDR, W_HDR, W_POP, W_DATA, W_LAST, W_DONE } wstate_t;

  wstate_t           state;
  logic              wr_start, wr_ready, wr_done;
  logic [ADDR_W-1:0] wr_addr;
  pixel_t            wr_data;
  logic [1:0]        hdr_idx;
  dim_t              pix_row, pix_col;

  ext_ram_write #(.ADDR_W(ADDR_W), .DATA_W(PIX_W)) u_wr (
    .clk, .rst_n,
    .start(wr_start), .addr(wr_addr), .wdata(wr_data),
    .ready(wr_ready), .done(wr_done),
    .mem_addr(dst_addr), .mem_ce_n(dst_ce_n), .mem_we_n(dst_we_n),
    .mem_dq_out(dst_dq_out), .mem_dq_oe(dst_dq_oe)
  );

  always_comb begin
    unique case (hdr_idx)
      2'd0: wr_data = img_h[7:0];
      2'd1: wr_data = img_h[15:8];
      2'd2: wr_data = img_w[7:0];
      2'd3: wr_data = img_w[15:8];
    endcase
    if (state == W_DATA) wr_data = f_dout;
  end

  assign wr_start = wr_ready && ((state == W_HDR) || (state == W_DATA));
  assign f_pop    = (state == W_POP) && !f_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= W_WAIT_HDR;
      wr_addr <= '0;
      hdr_idx <= '0;
      pix_row <= '0;
      pix_col <= '0;
      done    <= 1'b0;
    end else begin
      unique case (state)
        W_WAIT_HDR: if (hdr_valid) state <= W_HDR;
        W_HDR: if (wr_start) begin
          wr_addr <= wr_addr + 1'b1;
          hdr_idx <= hdr_idx + 1'b1;
          if (hdr_idx == 2'd3) state <= W_POP;
        end
        W_POP: if (f_pop) state <= W_DATA;
        W_DATA: if (wr_start) begin
          wr_addr <= wr_addr + 1'b1;
          if (pix_col == img_w - 1'b1) begin
            pix_col <= '0;
            pix_row <= pix_row + 1'b1;
            state   <= (pix_row == img_h - 1'b1) ? W_LAST : W_POP;
          end else begin
            pix_col <= pix_col + 1'b1;
            state   <= W_POP;
          end
        end
        W_LAST: if (wr_done) begin
          done  <= 1'b1;
          state <= W_DONE;
        end
        W_DONE: ;
        default: state <= W_DONE;
      endcase
    end
  end

  // the fetch stage never lets the buffer overflow
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(take && f_full));

endmodule
