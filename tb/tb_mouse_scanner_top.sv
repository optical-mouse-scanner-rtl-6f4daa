// tb_mouse_scanner_top: end-to-end test of the scanner at its real timing
// (default parameters: SCLK half period 33 clocks, 8192-clock read wait,
// 2^18-clock power-up, 65535-clock power-on reset).
//
// The sensor model sits on the mouse pins.  The testbench plays the
// processor's software through the two register ports: it waits for a new
// sequence number in the select number, selects that entry, reads dx and
// dy, turns them into an absolute position (x -= dx, y += dy, kept within
// 0..112), writes the copy corner and box colour, and runs the copy.  A
// reference image built from the sensor's pixel values is compared with
// whole frames captured from the VGA pins.
//
// Each mechanism is counted and the test fails if any never happened: PD
// power-up pulse, no polling in idle mode, motion polls with no motion,
// dumps, not-ready pixel re-reads, buffer wrap-around, copy passes, clear
// by register, clear by the right button, polling stopping on release,
// all three box colours on screen, the live inset on screen, and the
// seven-segment displays following the selected dx/dy.
module tb_mouse_scanner_top;
  import scan_pkg::*;
  logic clk = 0;
  always #10 clk = ~clk;           // 50 MHz
  logic rst_n = 0;
  logic gpio_cs = 0, gpio_read = 0, vga_cs = 0, vga_read = 0, vga_write = 0;
  logic [3:0] gpio_address = 0, vga_address = 0;
  logic [15:0] gpio_readdata, vga_readdata, vga_writedata = 0;
  logic mouse_sclk, mouse_sdio_o, mouse_sdio_oe, mouse_sdio_i, mouse_pd;
  logic mouse_left_n = 1, mouse_right_n = 1;
  logic VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK, VGA_SYNC;
  logic [9:0] VGA_R, VGA_G, VGA_B;
  logic [7:0] LEDG, LEDR;
  logic [6:0] HEX0, HEX1, HEX4, HEX5;
  logic sens_d, sens_oe;
  int checks = 0, failures = 0;

  mouse_scanner_top dut (.*);

  assign mouse_sdio_i = mouse_sdio_oe ? mouse_sdio_o : sens_d;

  adns2051_model sensor (.sclk(mouse_sclk), .sdio_in(mouse_sdio_i), .sdio_drive(sens_d),
                         .sensor_oe(sens_oe), .pd(mouse_pd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- processor bus ----------------
  task automatic gpio_rd(int a, output int d);
    @(negedge clk);
    gpio_cs = 1; gpio_read = 1; gpio_address = 4'(a);
    @(negedge clk);
    gpio_cs = 0; gpio_read = 0;
    d = int'(gpio_readdata);
  endtask

  task automatic vga_rd(int a, output int d);
    @(negedge clk);
    vga_cs = 1; vga_read = 1; vga_address = 4'(a);
    @(negedge clk);
    vga_cs = 0; vga_read = 0;
    d = int'(vga_readdata);
  endtask

  task automatic vga_wr(int a, int d);
    @(negedge clk);
    vga_cs = 1; vga_write = 1; vga_address = 4'(a); vga_writedata = 16'(d);
    @(negedge clk);
    vga_cs = 0; vga_write = 0;
  endtask

  // ---------------- reference screen ----------------
  int agg [16384];
  int ref_start = 0, ref_box = 0, ref_frame = 0;
  bit ref_inset_blank = 1;     // no sample selected yet: inset reads zero

  function automatic int grey(int g);
    return g * 16 + g % 16;
  endfunction

  function automatic int expected(int px, int py);
    int cr, rb, dc, dr, g;
    if (px >= 100 && px < 356 && py >= 100 && py < 356) begin
      cr = 127 - (px - 100) / 2;
      rb = 127 - (py - 100) / 2;
      dc = (cr - ref_start / 128 + 128) % 128;
      dr = (rb - ref_start % 128 + 128) % 128;
      if (dc < 16 && dr < 16 && (dc == 0 || dc == 15 || dr == 0 || dr == 15)) begin
        if (ref_box == 0) return (1023 << 20) | (1023 << 10);
        if (ref_box == 1) return 1023 << 10;
        return 1023 << 20;
      end
      g = grey(agg[cr * 128 + rb]);
      return (g << 20) | (g << 10) | g;
    end
    if (px >= 498 && px < 530 && py >= 220 && py < 252) begin
      g = ref_inset_blank ? 0 :
          grey(int'(sensor.pix_value(ref_frame, (15 - (px - 498) / 2) * 16 + 15 - (py - 220) / 2)));
      return (g << 20) | (g << 10) | g;
    end
    return (1 << 30) - 1;
  endfunction

  int px = 0, py = 0, mism = 0, act = 0, n_yellow = 0, n_green = 0, n_red = 0, n_inset = 0;
  bit capturing = 0, blank_q = 0;
  always @(posedge VGA_CLK) begin
    if (!VGA_VS) begin px = 0; py = 0; end
    else if (VGA_BLANK) begin
      if (capturing) begin
        act++;
        if ({VGA_R, VGA_G, VGA_B} != 30'(expected(px, py))) begin
          mism++;
          if (mism < 5) $display("  pixel %0d,%0d got %h exp %h", px, py,
                                 {VGA_R, VGA_G, VGA_B}, 30'(expected(px, py)));
        end
        if ({VGA_R, VGA_G, VGA_B} == {10'h3FF, 10'h3FF, 10'h0}) n_yellow++;
        if ({VGA_R, VGA_G, VGA_B} == {10'h0, 10'h3FF, 10'h0}) n_green++;
        if ({VGA_R, VGA_G, VGA_B} == {10'h3FF, 10'h0, 10'h0}) n_red++;
        if (px >= 498 && px < 530 && py >= 220 && py < 252 && VGA_R != 0) n_inset++;
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
  endtask

  // ---------------- software ----------------
  int pos_x = 56, pos_y = 56, seq = 0, n_pass = 0, n_wrap = 0, n_hex_ok = 0;

  function automatic int clampi(int v);
    return v < 0 ? 0 : (v > 112 ? 112 : v);
  endfunction

  function automatic int s8(int v);
    return v >= 128 ? v - 256 : v;
  endfunction

  // seven-segment pattern, active low, bit 0 = segment a
  function automatic logic [6:0] seg(logic [3:0] d);
    logic [6:0] on;
    case (d)
      4'h0: on = 7'b0111111; 4'h1: on = 7'b0000110; 4'h2: on = 7'b1011011;
      4'h3: on = 7'b1001111; 4'h4: on = 7'b1100110; 4'h5: on = 7'b1101101;
      4'h6: on = 7'b1111101; 4'h7: on = 7'b0000111; 4'h8: on = 7'b1111111;
      4'h9: on = 7'b1100111; 4'hA: on = 7'b1110111; 4'hB: on = 7'b1111100;
      4'hC: on = 7'b0111001; 4'hD: on = 7'b1011110; 4'hE: on = 7'b1111001;
      default: on = 7'b1110001;
    endcase
    return ~on;
  endfunction

  task automatic one_sample(logic [7:0] mx, logic [7:0] my, int box);
    int sn, e, d, dx, dy, t, st, s;
    seq++;
    sensor.move(mx, my);
    e = -1;
    t = 0;
    while (e < 0 && t < 20000) begin
      repeat (500) @(posedge clk);
      gpio_rd(4, sn);
      for (int i = 0; i < 4; i++) if (sn[4*i +: 4] == 4'(seq)) e = i;
      t++;
    end
    check(e >= 0, $sformatf("sample %0d reached the buffer", seq));
    if (e < 0) return;
    if (seq > 4 && e == (seq - 1) % 4) n_wrap++;
    vga_wr(4, 1 << e);
    gpio_rd(2, dx);
    gpio_rd(3, dy);
    check(dx == int'(mx) && dy == int'(my), $sformatf("sample %0d deltas %0h %0h", seq, dx, dy));
    @(negedge clk);
    if (LEDG == mx && LEDR == my && HEX0 == seg(mx[3:0]) && HEX1 == seg(mx[7:4]) &&
        HEX4 == seg(my[3:0]) && HEX5 == seg(my[7:4])) n_hex_ok++;
    pos_x = clampi(pos_x - s8(dx));
    pos_y = clampi(pos_y + s8(dy));
    s = pos_y + pos_x * 128;
    vga_wr(3, s);
    vga_wr(6, box);
    vga_wr(5, 1);
    t = 0;
    do begin vga_rd(3, st); t++; end while (!st[1] && t < 100);
    vga_wr(5, 0);
    t = 0;
    do begin vga_rd(3, st); t++; end while (st[1] && t < 2000);
    if (t < 2000) n_pass++;
    for (int a = 0; a < 256; a++)
      agg[(s + (a / 16) * 128 + a % 16) % 16384] = int'(sensor.pix_value(sensor.frame, a));
    ref_start = s; ref_box = box; ref_frame = sensor.frame; ref_inset_blank = 0;
  endtask

  task automatic wait_clear(output bit ok);
    int st, t;
    t = 0;
    do begin vga_rd(3, st); t++; end while (st[0] && t < 20000);
    ok = (st[0] == 0);
    foreach (agg[i]) agg[i] = 0;
  endtask

  int n_idle_quiet = 0, n_stop = 0, n_clr_reg = 0, n_clr_btn = 0;

  initial begin
    int d, r0;
    bit ok;
    foreach (agg[i]) agg[i] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // power-up: wait for the sensor to be ready, buttons untouched
    d = 0;
    while (!d[2]) begin repeat (1000) @(posedge clk); gpio_rd(5, d); end
    check(d[1:0] == MODE_IDLE, "idle after power-up");
    repeat (50000) @(posedge clk);
    if (sensor.n_reads == 0 && sensor.n_writes == 0) n_idle_quiet++;
    check_frame("after power-up: empty image, yellow box, blank inset");

    // scan: hold the left button
    mouse_left_n = 0;
    while (sensor.n_mot0 < 3) @(posedge clk);
    one_sample(8'd4, 8'd3, 1);
    one_sample(8'hFA, 8'd10, 1);
    one_sample(8'd2, 8'hF8, 1);
    check_frame("three samples, green box");
    one_sample(8'd20, 8'd20, 2);
    one_sample(8'hF3, 8'd5, 2);
    one_sample(8'd1, 8'hFF, 2);
    check_frame("six samples, red box");

    // release: polling stops
    mouse_left_n = 1;
    repeat (20000) @(posedge clk);
    r0 = sensor.n_reads + sensor.n_writes;
    sensor.move(8'd7, 8'd7);
    repeat (100000) @(posedge clk);
    if (sensor.n_reads + sensor.n_writes == r0) n_stop++;
    sensor.move(8'd0, 8'd0);

    // clear by register
    vga_wr(7, 1);
    vga_wr(7, 0);
    wait_clear(ok);
    if (ok) n_clr_reg++;
    mouse_left_n = 0;
    one_sample(8'd3, 8'd3, 0);
    mouse_left_n = 1;
    check_frame("cleared, one sample, yellow box");

    // clear by the right button
    mouse_right_n = 0;
    repeat (100) @(posedge clk);
    gpio_rd(5, d);
    check(d[1:0] == MODE_RESET, "right button gives reset mode");
    mouse_right_n = 1;
    wait_clear(ok);
    if (ok) n_clr_btn++;
    check_frame("cleared by the button");

    $display("mechanisms: pd=%0d idle_quiet=%0d mot0=%0d dumps=%0d busy=%0d wrap=%0d passes=%0d",
             sensor.n_pd_pulses, n_idle_quiet, sensor.n_mot0, sensor.n_dumps, sensor.n_busy,
             n_wrap, n_pass);
    $display("mechanisms: stop=%0d clr_reg=%0d clr_btn=%0d yellow=%0d green=%0d red=%0d inset=%0d hex=%0d",
             n_stop, n_clr_reg, n_clr_btn, n_yellow, n_green, n_red, n_inset, n_hex_ok);
    check(sensor.n_pd_pulses == 1, "PD power-up pulse");
    check(n_idle_quiet == 1, "no polling in idle mode");
    check(sensor.n_mot0 > 0, "motion polls with no motion");
    check(sensor.n_dumps == 7, "seven dumps");
    check(sensor.n_busy > 0, "not-ready pixel re-reads");
    check(n_wrap == 3, "buffer wrap-around");
    check(n_pass == 7, "copy passes");
    check(n_stop == 1, "polling stops on release");
    check(n_clr_reg == 1, "clear by register");
    check(n_clr_btn == 1, "clear by the right button");
    check(n_yellow > 0 && n_green > 0 && n_red > 0, "all box colours shown");
    check(n_inset > 0, "live inset shown");
    check(n_hex_ok == 7, "seven-segment displays follow the selected deltas");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
