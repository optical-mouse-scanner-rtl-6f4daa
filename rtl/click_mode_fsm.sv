// click_mode_fsm: the three operating modes selected by the mouse buttons.
//
// Inputs are the synchronised, active-high button states: reset_btn is the
// right button, scan_btn the left one.  From any state, {reset,scan} = 1x goes
// to RESET (the right button wins), 01 goes to SCAN and 00 goes to IDLE, as in
// the design's click state diagram.  The mode is registered: it changes one
// clock after the buttons do.  The mode resets to IDLE (own choice).
module click_mode_fsm
  import scan_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       reset_btn,
  input  logic       scan_btn,
  output scan_mode_e mode
);
  always_ff @(posedge clk) begin
    if (rst)            mode <= MODE_IDLE;
    else if (reset_btn) mode <= MODE_RESET;
    else if (scan_btn)  mode <= MODE_SCAN;
    else                mode <= MODE_IDLE;
  end
endmodule
