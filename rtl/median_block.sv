// median_block: the median stage of the filter system.
//
// Joins the median state machine (median_fsm) and the pipelined median core
// processor (median_core): the controller's pipeline enable drives the core,
// and its shift_out/new_row_out are passed on to the write stage so that it
// can tell which results belong to the image.
//
// Interface and timing: shift_in/new_row_in announce a set of three pixels;
// the set must be on p_in during the following cycle, in which shift_out is
// high and at whose end the pipeline advances. median is valid as described
// in median_core (10 enabled edges after the oldest set of a window). This
// split into core and controller follows the published block diagram.
module median_block
  import median_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_in,
  input  logic         new_row_in,
  input  pixel_t [2:0] p_in,
  output pixel_t       median,
  output logic         shift_out,
  output logic         new_row_out
);

  logic en;

  median_fsm u_fsm (
    .clk, .rst_n, .shift_in, .new_row_in,
    .en, .shift_out, .new_row_out
  );

  median_core u_core (
    .clk, .rst_n, .en, .p_in, .median
  );

endmodule
