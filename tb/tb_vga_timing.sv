// tb_vga_timing: runs the raster for two frames with a pixel enable on every
// other clock and checks the line length (800), the sync width (96 pixels,
// 2 lines), the picture size (640 x 480 active pixels per frame), the frame
// length (800 x 525) and the picture coordinates.
module tb_vga_timing;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, pix_ce = 0;
  logic [9:0] hcount, vcount, x;
  logic [8:0] y;
  logic hsync, vsync, active, eol, eof;
  int checks = 0, failures = 0;

  vga_timing dut (.clk, .rst, .pix_ce, .hcount, .vcount, .hsync, .vsync, .active,
                  .x, .y, .eol, .eof);

  always @(posedge clk) pix_ce <= rst ? 1'b0 : ~pix_ce;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int pix, act, hs, vs_lines, lines, bad_xy, frames, line_len, bad_len;
    int ex, ey;
    repeat (3) @(posedge clk);
    rst = 0;
    frames = 0; bad_len = 0;
    // wait for the frame start
    while (!(pix_ce && eof)) @(posedge clk);
    @(posedge clk);
    repeat (2) begin
      pix = 0; act = 0; hs = 0; vs_lines = 0; lines = 0; bad_xy = 0; line_len = 0;
      ex = 0; ey = 0;
      do begin
        @(negedge clk);
        if (pix_ce) begin
          pix++;
          line_len++;
          if (active) begin
            if (x != 10'(ex) || y != 9'(ey)) bad_xy++;
            act++;
            ex++;
            if (ex == 640) begin ex = 0; ey++; end
          end
          if (hsync && lines == 0) hs++;
          if (eol) begin
            if (line_len != 800) bad_len++;
            line_len = 0;
            lines++;
            if (vsync) vs_lines++;
          end
        end
        @(posedge clk);
      end while (!(pix_ce && eof));
      check(pix == 800 * 525, $sformatf("frame length %0d", pix));
      check(act == 640 * 480, $sformatf("active pixels %0d", act));
      check(hs == 96, $sformatf("hsync width %0d", hs));
      check(vs_lines == 2, $sformatf("vsync lines %0d", vs_lines));
      check(lines == 525, $sformatf("lines %0d", lines));
      check(bad_xy == 0, $sformatf("%0d wrong coordinates", bad_xy));
      check(bad_len == 0, "line length 800");
      frames++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
