// median_core: ten-stage pipelined median of a 3x3 window.
//
// Each enabled clock edge takes one set of three pixels (one image column of
// the 3x3 mask) on p_in. Stages arrange1..arrange3 sort the set into low,
// middle and high. Stage arrange4 delays the sorted set by one step, so that
// arrange5 and arrange6 can combine three consecutive sorted sets into the
// largest of the three lows, the three middles (as a partial sort) and the
// smallest of the three highs. Arrange7 finishes the median of the middles,
// and arrange8..arrange10 take the median of (max low, median middle,
// min high), which is the median of all nine pixels. Every compare node
// sends the lower value left and the higher right. The network and the stage
// names follow the published pipelined median structure; reset and the
// enable port are this design's choices.
//
// Interface: p_in[0..2] are lanes P1..P3; en advances all stages together;
// median is the arrange10 register.
// Timing: the median of sets k-1, k, k+1 is in `median` after the 10th
// enabled edge counted from (and including) the edge that took set k-1,
// i.e. 8 enabled edges after the edge that took set k+1. When en is low every
// stage holds its value.
module median_core
  import median_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  pixel_t [2:0]    p_in,
  output pixel_t          median
);

  function automatic pixel_t lo(input pixel_t a, input pixel_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic pixel_t hi(input pixel_t a, input pixel_t b);
    return (a < b) ? b : a;
  endfunction

  // Stage registers, named after the stage outputs (out1, out2, out3,
  // out21, out22) of each arrange stage.
  pixel_t a1_o1, a1_o2, a1_o3;
  pixel_t a2_o1, a2_o2, a2_o3;
  pixel_t a3_o1, a3_o2, a3_o3;            // s3a, s3b, s3c: sorted L, M, H
  pixel_t a4_o1, a4_o2, a4_o3;            // previous sorted set
  pixel_t a5_o1, a5_o21, a5_o22, a5_o3;
  pixel_t a6_o1, a6_o21, a6_o22, a6_o3;
  pixel_t a7_o1, a7_o2, a7_o3;
  pixel_t a8_o1, a8_o2, a8_o3;
  pixel_t a9_o2, a9_o3;
  pixel_t a10_med;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {a1_o1, a1_o2, a1_o3} <= '0;
      {a2_o1, a2_o2, a2_o3} <= '0;
      {a3_o1, a3_o2, a3_o3} <= '0;
      {a4_o1, a4_o2, a4_o3} <= '0;
      {a5_o1, a5_o21, a5_o22, a5_o3} <= '0;
      {a6_o1, a6_o21, a6_o22, a6_o3} <= '0;
      {a7_o1, a7_o2, a7_o3} <= '0;
      {a8_o1, a8_o2, a8_o3} <= '0;
      {a9_o2, a9_o3} <= '0;
      a10_med <= '0;
    end else if (en) begin
      // arrange1: order lanes 2 and 3
      a1_o1  <= p_in[0];
      a1_o2  <= lo(p_in[1], p_in[2]);
      a1_o3  <= hi(p_in[1], p_in[2]);
      // arrange2: order lanes 1 and 2
      a2_o1  <= lo(a1_o1, a1_o2);
      a2_o2  <= hi(a1_o1, a1_o2);
      a2_o3  <= a1_o3;
      // arrange3: order lanes 2 and 3; the set is now sorted L <= M <= H
      a3_o1  <= a2_o1;
      a3_o2  <= lo(a2_o2, a2_o3);
      a3_o3  <= hi(a2_o2, a2_o3);
      // arrange4: keep the previous sorted set
      a4_o1  <= a3_o1;
      a4_o2  <= a3_o2;
      a4_o3  <= a3_o3;
      // arrange5: previous set against current set
      a5_o1  <= hi(a3_o1, a4_o1);
      a5_o21 <= lo(a3_o2, a4_o2);
      a5_o22 <= hi(a3_o2, a4_o2);
      a5_o3  <= lo(a3_o3, a4_o3);
      // arrange6: bring in the next sorted set
      a6_o1  <= hi(a5_o1, a3_o1);         // max of three lows
      a6_o21 <= hi(a5_o21, a3_o2);
      a6_o22 <= a5_o22;
      a6_o3  <= lo(a5_o3, a3_o3);         // min of three highs
      // arrange7: median of the three middles
      a7_o1  <= a6_o1;
      a7_o2  <= lo(a6_o21, a6_o22);
      a7_o3  <= a6_o3;
      // arrange8..arrange10: median of (max low, mid median, min high)
      a8_o1  <= a7_o1;
      a8_o2  <= lo(a7_o2, a7_o3);
      a8_o3  <= hi(a7_o2, a7_o3);
      a9_o2  <= hi(a8_o1, a8_o2);
      a9_o3  <= a8_o3;
      a10_med <= lo(a9_o2, a9_o3);
    end
  end

  assign median = a10_med;

endmodule
