// fetch_block: the fetch stage of the median filter system.
//
// Reads a raw 8-bit gray-level image from the source memory and presents it
// to the median stage as sets of three vertically adjacent pixels, sliding
// the 3x3 mask along each row, with the image border padded by zeros.
//
// Image format in the source memory: bytes 0-1 hold the height H and bytes
// 2-3 the width W (low byte first), followed by the pixels row by row from
// address 4. Every byte is read with the seven-cycle protocol of
// ext_ram_read.
//
// How it works: after the header has been read and checked, rows are
// loaded into three line buffers (int_ram, one block each) that are used in
// rotation. For output row r the buffers hold rows r-1, r and r+1; the row is
// streamed as W+2 sets, one per clock: a zero padding column, columns
// 0..W-1 and a second padding column, with rows -1 and H also replaced by
// zeros. Then row r+2 is loaded into the buffer of row r-1 and the next row
// is streamed. After the last row FLUSH_SETS zero sets are streamed so that
// the last medians leave the pipeline. A row (and the flush) starts only
// when the write stage reports room (wr_room) for its results, and at least
// one idle cycle separates two streamed rows.
//
// Handshake to the median stage: shift_out (and new_row_out with the first
// set of a row) is high one cycle before the set's pixels are on p_out,
// which is the cycle in which the median stage's pipeline takes them.
// p_out[0] is row r-1, p_out[1] row r, p_out[2] row r+1.
//
// img_h, img_w and hdr_valid give the header to the write stage; err is
// raised (and the stage stops) for a header the hardware cannot process:
// W = 0, W > MAX_W, H = 0, or an image that does not fit the address space.
// done is raised after the flush.
//
// The tasks of this stage (read the image, pad with zeros, keep track of the
// image position) and the header format are the published ones; the line
// buffer organisation, the flush and the wr_room handshake are this design's
// choices.
module fetch_block
  import median_pkg::*;
#(
  parameter int ADDR_W = 15,
  parameter int MAX_W  = 256,
  localparam int CAW   = $clog2(MAX_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // source memory pins
  output logic [ADDR_W-1:0] src_addr,
  output logic              src_ce_n,
  output logic              src_oe_n,
  input  pixel_t            src_dq,
  // to the median stage
  output logic              shift_out,
  output logic              new_row_out,
  output pixel_t [2:0]      p_out,
  // to / from the write stage
  input  logic              wr_room,
  output dim_t              img_h,
  output dim_t              img_w,
  output logic              hdr_valid,
  // status
  output logic              err,
  output logic              done
);

  typedef enum logic [3:0] {
    F_HDR, F_CHECK, F_LOAD, F_WAIT, F_STREAM, F_NEXT, F_FLUSH, F_DONE, F_ERR
  } fstate_t;

  fstate_t state;

  // ------------------------------------------------------------------
  // source memory reader
  logic              rd_start, rd_ready, rd_done;
  pixel_t            rd_data;
  logic [ADDR_W-1:0] rd_addr;       // next source address to read

  ext_ram_read #(.ADDR_W(ADDR_W), .DATA_W(PIX_W)) u_rd (
    .clk, .rst_n,
    .start(rd_start), .addr(rd_addr), .ready(rd_ready), .done(rd_done),
    .rdata(rd_data),
    .mem_addr(src_addr), .mem_ce_n(src_ce_n), .mem_oe_n(src_oe_n),
    .mem_dq(src_dq)
  );

  // bytes to read in the current header/row load, issued and received
  logic [DIM_W:0] n_total, n_issued, n_rcvd;
  logic           loading;

  assign loading  = (state == F_HDR) || (state == F_LOAD);
  assign rd_start = loading && rd_ready && (n_issued < n_total);

  // ------------------------------------------------------------------
  // line buffers
  logic [2:0]     lb_we;
  logic [CAW-1:0] lb_addr;
  pixel_t [2:0]   lb_dout;
  logic [1:0]     slot_mid;        // buffer holding row r
  logic [1:0]     slot_ld;         // buffer being loaded

  for (genvar i = 0; i < 3; i++) begin : g_lb
    int_ram #(.DATA_W(PIX_W), .DEPTH(MAX_W)) u_lb (
      .clk, .we(lb_we[i]), .addr(lb_addr), .din(rd_data), .dout(lb_dout[i])
    );
  end

  function automatic logic [1:0] slot_inc(input logic [1:0] s);
    return (s == 2'd2) ? 2'd0 : s + 2'd1;
  endfunction

  // ------------------------------------------------------------------
  // position
  dim_t           row;             // output row being streamed
  dim_t           rows_loaded;     // rows read into line buffers so far
  logic [DIM_W:0] col;             // streamed set index 0 .. W+1
  logic [3:0]     flush_cnt;

  // the set streamed now: column col-1; padding columns are col 0 and W+1
  logic           pad_col, pad_top, pad_bot;
  assign pad_col = (col == '0) || (col == {1'b0, img_w} + 1'b1);
  assign pad_top = (row == '0);
  assign pad_bot = (row == img_h - 1'b1);

  always_comb begin
    lb_we   = '0;
    lb_addr = '0;
    if (state == F_LOAD) begin
      lb_we[slot_ld] = rd_done;
      lb_addr        = CAW'(n_rcvd);
    end else if (state == F_STREAM && !pad_col) begin
      lb_addr        = CAW'(col - 1'b1);
    end
  end

  // ------------------------------------------------------------------
  // control
  logic [DIM_W*2:0] img_bytes;
  assign img_bytes = (DIM_W*2+1)'(img_h) * (DIM_W*2+1)'(img_w) + (DIM_W*2+1)'(4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= F_HDR;
      rd_addr     <= '0;
      n_total     <= (DIM_W+1)'(4);
      n_issued    <= '0;
      n_rcvd      <= '0;
      img_h       <= '0;
      img_w       <= '0;
      hdr_valid   <= 1'b0;
      err         <= 1'b0;
      done        <= 1'b0;
      row         <= '0;
      rows_loaded <= '0;
      col         <= '0;
      flush_cnt   <= '0;
      slot_mid    <= 2'd0;
      slot_ld     <= 2'd0;
    end else begin
      if (rd_start) begin
        rd_addr  <= rd_addr + 1'b1;
        n_issued <= n_issued + 1'b1;
      end
      if (loading && rd_done) n_rcvd <= n_rcvd + 1'b1;

      unique case (state)
        F_HDR: begin
          if (rd_done) begin
            unique case (n_rcvd[1:0])
              2'd0: img_h[7:0]  <= rd_data;
              2'd1: img_h[15:8] <= rd_data;
              2'd2: img_w[7:0]  <= rd_data;
              2'd3: img_w[15:8] <= rd_data;
            endcase
            if (n_rcvd == (DIM_W+1)'(3)) state <= F_CHECK;
          end
        end

        F_CHECK: begin
          if (img_w == '0 || img_w > dim_t'(MAX_W) || img_h == '0 ||
              img_bytes > (DIM_W*2+1)'(2**ADDR_W)) begin
            err   <= 1'b1;
            state <= F_ERR;
          end else begin
            hdr_valid <= 1'b1;
            n_total   <= {1'b0, img_w};
            n_issued  <= '0;
            n_rcvd    <= '0;
            slot_ld   <= 2'd0;
            state     <= F_LOAD;
          end
        end

        F_LOAD: begin
          if (rd_done && n_rcvd == n_total - 1'b1) begin
            rows_loaded <= rows_loaded + 1'b1;
            n_issued    <= '0;
            n_rcvd      <= '0;
            // rows 0 and 1 are loaded before row 0 is streamed
            if (rows_loaded == '0 && img_h > dim_t'(1)) begin
              slot_ld <= slot_inc(slot_ld);
            end else begin
              state <= F_WAIT;
            end
          end
        end

        F_WAIT: begin
          col <= '0;
          if (wr_room) state <= (row == img_h) ? F_FLUSH : F_STREAM;
        end

        F_STREAM: begin
          if (col == {1'b0, img_w} + 1'b1) state <= F_NEXT;
          else                             col   <= col + 1'b1;
        end

        F_NEXT: begin
          // row r is done; row r+2 goes into the buffer of row r-1
          row      <= row + 1'b1;
          slot_mid <= slot_inc(slot_mid);
          if (rows_loaded < img_h) begin
            slot_ld <= slot_inc(slot_inc(slot_mid));
            state   <= F_LOAD;
          end else begin
            state   <= F_WAIT;
          end
        end

        F_FLUSH: begin
          flush_cnt <= flush_cnt + 1'b1;
          if (flush_cnt == 4'(FLUSH_SETS - 1)) begin
            done  <= 1'b1;
            state <= F_DONE;
          end
        end

        F_DONE, F_ERR: ;

        default: state <= F_ERR;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // output timing: shift/new_row one cycle after the set's address cycle,
  // pixels two cycles after it (line buffer read latency)
  logic       shift_q, new_row_q;
  logic [2:0] zero_d1, zero_d2;     // per lane: replace by 0
  logic [1:0] top_d1, mid_d1, bot_d1, top_d2, mid_d2, bot_d2;
  logic       streaming, flushing;

  assign streaming = (state == F_STREAM);
  assign flushing  = (state == F_FLUSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q   <= 1'b0;
      new_row_q <= 1'b0;
      zero_d1   <= '1;
      zero_d2   <= '1;
      {top_d1, mid_d1, bot_d1, top_d2, mid_d2, bot_d2} <= '0;
    end else begin
      shift_q   <= streaming || flushing;
      new_row_q <= streaming && (col == '0);
      zero_d1   <= flushing ? 3'b111
                 : {pad_col || pad_bot, pad_col, pad_col || pad_top};
      top_d1    <= slot_inc(slot_inc(slot_mid));
      mid_d1    <= slot_mid;
      bot_d1    <= slot_inc(slot_mid);
      zero_d2   <= zero_d1;
      top_d2    <= top_d1;
      mid_d2    <= mid_d1;
      bot_d2    <= bot_d1;
    end
  end

  assign shift_out   = shift_q;
  assign new_row_out = new_row_q;
  assign p_out[0]    = zero_d2[0] ? '0 : lb_dout[top_d2];
  assign p_out[1]    = zero_d2[1] ? '0 : lb_dout[mid_d2];
  assign p_out[2]    = zero_d2[2] ? '0 : lb_dout[bot_d2];

endmodule
