// median_fsm: Moore controller of the median block.
//
// Three states: IDLE holds the median pipeline; CLOCK_ENABLE and INITIATE
// both let it advance, INITIATE marking that the set now entering is the
// first set of an image row. The upstream fetch stage raises shift_in (and
// new_row_in for the first set of a row) one cycle before the set's pixels
// are at the pipeline input; the controller answers in the following cycle
// with en = shift_out = 1, so the pixels are taken at the end of that cycle.
//
// Transitions (inputs written shift_in,new_row_in):
//   IDLE:         0,0 -> IDLE    1,0 -> CLOCK_ENABLE   1,1 -> INITIATE
//   CLOCK_ENABLE: 1,0 -> stay    0,0 -> IDLE
//   INITIATE:     1,0 -> CLOCK_ENABLE                  0,0 -> IDLE
//   any other input pair is an error and returns to IDLE.
// Outputs depend on the state only: en = shift_out = 1 in CLOCK_ENABLE and
// INITIATE; new_row_out = 1 in INITIATE. The state graph and the en and
// shift_out values follow the published controller. The published state
// drawing lists new_row_out = 0 in INITIATE while its waveforms show
// new_row_out high for the cycle after new_row_in; this design follows the
// waveforms. Reset (asynchronous, active low, to IDLE) is this design's
// choice.
module median_fsm
  import median_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift_in,
  input  logic new_row_in,
  output logic en,
  output logic shift_out,
  output logic new_row_out
);

  med_state_t state, state_nx;

  always_comb begin
    state_nx = ST_IDLE;
    unique case (state)
      ST_IDLE: begin
        if (shift_in && new_row_in)       state_nx = ST_INITIATE;
        else if (shift_in && !new_row_in) state_nx = ST_CLOCK_ENABLE;
        else                              state_nx = ST_IDLE;
      end
      ST_CLOCK_ENABLE, ST_INITIATE: begin
        if (shift_in && !new_row_in) state_nx = ST_CLOCK_ENABLE;
        else                         state_nx = ST_IDLE;
      end
      default: state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= state_nx;
  end

  assign en          = (state == ST_CLOCK_ENABLE) || (state == ST_INITIATE);
  assign shift_out   = en;
  assign new_row_out = (state == ST_INITIATE);

endmodule
