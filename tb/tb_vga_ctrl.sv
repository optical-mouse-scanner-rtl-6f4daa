// tb_vga_ctrl: the display side against a reference model of the screen.
//
// A stand-in for the sample buffer answers the controller's sample reads
// with pixel values computed from (entry, address), one clock later.  The
// test pastes samples at several corners through the register port, clears
// the image by register and by the RESET button mode, and after each step
// captures a whole frame from the VGA pins and compares every active pixel
// with the colour the reference gives: pixel-doubled aggregate, highlight
// box outline in the chosen colour, pixel-doubled inset, white elsewhere.
// It also checks the sync widths, the 640x480 picture, the read-back
// registers and that the copy pass takes 257 pixel clocks.
module tb_vga_ctrl;
  import scan_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1;
  logic cs = 0, rd = 0, wr = 0;
  logic [3:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [3:0] rd_sel;
  smp_addr_t smp_rd_addr;
  pixel_t smp_pixel;
  scan_mode_e mode = MODE_IDLE;
  logic VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK, VGA_SYNC;
  logic [9:0] VGA_R, VGA_G, VGA_B;
  int checks = 0, failures = 0;

  vga_ctrl dut (.clk, .rst, .chipselect(cs), .read(rd), .write(wr), .address(addr),
    .writedata(wdata), .readdata(rdata), .rd_sel, .smp_rd_addr, .smp_pixel, .mode,
    .VGA_CLK, .VGA_HS, .VGA_VS, .VGA_BLANK, .VGA_SYNC, .VGA_R, .VGA_G, .VGA_B);

  function automatic int entry_of(logic [3:0] sel);
    case (sel)
      4'b0001: return 0;
      4'b0010: return 1;
      4'b0100: return 2;
      4'b1000: return 3;
      default: return -1;
    endcase
  endfunction

  function automatic int spv(int e, int a);
    if (e < 0) return 0;
    return (a * 7 + e * 13 + 5) % 64;
  endfunction

  always @(posedge clk) smp_pixel <= 6'(spv(entry_of(rd_sel), int'(smp_rd_addr)));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic reg_wr(int a, int d);
    @(negedge clk);
    cs = 1; wr = 1; addr = 4'(a); wdata = 16'(d);
    @(negedge clk);
    cs = 0; wr = 0;
  endtask

  task automatic reg_rd(int a, output int d);
    @(negedge clk);
    cs = 1; rd = 1; addr = 4'(a);
    @(negedge clk);
    cs = 0; rd = 0;
    d = int'(rdata);
  endtask

  // ---------------- reference screen ----------------
  int agg [16384];
  int ref_start = 0, ref_box = 0, ref_sel = 0;

  function automatic int grey(int g);
    return g * 16 + g % 16;
  endfunction

  function automatic int expected(int px, int py);   // {R,G,B} as 30 bits
    int cr, rb, a, dc, dr, g, col, row;
    if (px >= 100 && px < 356 && py >= 100 && py < 356) begin
      cr = 127 - (px - 100) / 2;
      rb = 127 - (py - 100) / 2;
      a  = cr * 128 + rb;
      dc = (cr - ref_start / 128 + 128) % 128;
      dr = (rb - ref_start % 128 + 128) % 128;
      if (dc < 16 && dr < 16 && (dc == 0 || dc == 15 || dr == 0 || dr == 15)) begin
        if (ref_box == 0) return (1023 << 20) | (1023 << 10);
        if (ref_box == 1) return 1023 << 10;
        return 1023 << 20;
      end
      g = grey(agg[a]);
      return (g << 20) | (g << 10) | g;
    end
    if (px >= 498 && px < 530 && py >= 220 && py < 252) begin
      col = 15 - (px - 498) / 2;
      row = 15 - (py - 220) / 2;
      g = grey(spv(ref_sel, col * 16 + row));
      return (g << 20) | (g << 10) | g;
    end
    return (1 << 30) - 1;
  endfunction

  // ---------------- frame capture ----------------
  int px = 0, py = 0, mism = 0, act = 0, hs_w = 0, hs_w_last = 0;
  bit capturing = 0, blank_q = 0;
  always @(posedge VGA_CLK) begin
    if (!VGA_HS) hs_w++;
    else if (hs_w != 0) begin hs_w_last = hs_w; hs_w = 0; end
    if (!VGA_VS) begin px = 0; py = 0; end
    else if (VGA_BLANK) begin
      if (capturing) begin
        act++;
        if ({VGA_R, VGA_G, VGA_B} != 30'(expected(px, py))) begin
          mism++;
          if (mism < 5) $display("  pixel %0d,%0d got %h exp %h", px, py,
                                 {VGA_R, VGA_G, VGA_B}, 30'(expected(px, py)));
        end
      end
      px++;
    end else if (blank_q) begin
      py++;
      px = 0;
    end
    blank_q = VGA_BLANK;
  end

  task automatic check_frame(string what);
    @(negedge VGA_VS);
    mism = 0; act = 0;
    capturing = 1;
    @(negedge VGA_VS);
    capturing = 0;
    check(act == 640 * 480, $sformatf("%s: %0d active pixels", what, act));
    check(mism == 0, $sformatf("%s: %0d pixels differ", what, mism));
    check(hs_w_last == 96, $sformatf("hsync width %0d", hs_w_last));
  endtask

  // paste entry e at corner s and update the reference
  task automatic paste(int s, int e, int box);
    int st, t0;
    reg_wr(3, s);
    reg_wr(4, 1 << e);
    reg_wr(6, box);
    reg_wr(5, 1);
    t0 = 0;
    do begin reg_rd(3, st); t0++; end while (!st[1] && t0 < 100);
    check(st[1] == 1, "copy pass running");
    reg_wr(5, 0);
    t0 = 0;
    do begin reg_rd(3, st); t0++; end while (st[1] && t0 < 1000);
    check(st[1] == 0, "copy pass ended");
    for (int a = 0; a < 256; a++)
      agg[(s + (a / 16) * 128 + a % 16) % 16384] = spv(e, a);
    ref_start = s; ref_box = box; ref_sel = e;
  endtask

  task automatic wait_clear();
    int st, t0;
    t0 = 0;
    do begin reg_rd(3, st); t0++; end while (st[0] && t0 < 20000);
    check(st[0] == 0, "clear finished");
    foreach (agg[i]) agg[i] = 0;
  endtask

  // copy pass length in clocks, seen on the aggregate write enable
  int we_first = -1, we_last = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.agg_we && !dut.clr_busy) begin
      if (we_first < 0) we_first = cyc;
      we_last = cyc;
    end
  end

  initial begin
    int d;
    foreach (agg[i]) agg[i] = 0;
    repeat (4) @(posedge clk);
    rst = 0;
    check_frame("empty aggregate, yellow box at 0");
    check(VGA_SYNC == 0, "sync on green off");

    paste(20 * 128 + 30, 2, 1);
    check(we_last - we_first + 1 == 511, $sformatf("first copy pass wrote over %0d clocks", we_last - we_first + 1));
    reg_rd(1, d);  check(d == 20 * 128 + 30, "start address read back");
    reg_rd(2, d);  check(d == 4'b0100, "read select read back");
    check_frame("one sample, green box");

    paste(112 * 128 + 112, 0, 2);
    paste(3 * 128 + 5, 3, 0);
    check_frame("three samples, yellow box");

    paste(50 * 128 + 60, 1, 2);
    check_frame("four samples, red box");

    reg_wr(7, 1);
    repeat (100) @(posedge clk);
    reg_wr(7, 0);
    wait_clear();
    check_frame("cleared by register");

    paste(60 * 128 + 10, 2, 1);
    mode = MODE_RESET;
    repeat (50) @(posedge clk);
    mode = MODE_IDLE;
    wait_clear();
    check_frame("cleared by the RESET mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (12000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
