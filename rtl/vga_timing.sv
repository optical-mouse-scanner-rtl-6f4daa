// vga_timing: horizontal and vertical counters of a 640x480 raster at
// 60 Hz (800 x 525 pixel clocks per frame).
//
// The counters advance on clocks where pix_ce is high (one pixel clock).
// Each line starts with the sync pulse, then the back porch, the 640 active
// pixels and the front porch; the frame likewise in lines.  The outputs are
// decoded from the counters and so describe the pixel the counters hold now:
//   hsync/vsync  high during the sync pulse (the pins are active low),
//   active       inside the 640x480 picture,
//   x (10 bits), y (9 bits) the picture coordinates, valid while active.
// eol/eof flag the last pixel of a line and the last pixel of a frame.
// Timing numbers are the design's (scan_pkg); the decoding is own.
module vga_timing
  import scan_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       pix_ce,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync,
  output logic       vsync,
  output logic       active,
  output logic [9:0] x,
  output logic [8:0] y,
  output logic       eol,
  output logic       eof
);
  localparam int H_START = H_SYNC + H_BACK;   // first active pixel
  localparam int V_START = V_SYNC + V_BACK;   // first active line

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_ce) begin
      if (eol) begin
        hcount <= '0;
        vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  assign eol    = (hcount == 10'(H_TOTAL - 1));
  assign eof    = eol && (vcount == 10'(V_TOTAL - 1));
  assign hsync  = (hcount < 10'(H_SYNC));
  assign vsync  = (vcount < 10'(V_SYNC));
  assign active = (hcount >= 10'(H_START)) && (hcount < 10'(H_START + H_ACTIVE)) &&
                  (vcount >= 10'(V_START)) && (vcount < 10'(V_START + V_ACTIVE));
  assign x      = hcount - 10'(H_START);
  assign y      = 9'(vcount - 10'(V_START));
endmodule
