// tb_gpio_ctrl: the sensor side of the system with the sensor model, short
// SCLK and wait times, driven only through the buttons, the register port
// and the sample read port, as the software would use it.
//
// Checks: the mode register follows the buttons (idle, scan, reset); no
// serial traffic while idle; in scan mode each motion gives a new sequence
// number in the select-number register, in entries 0,1,2,3,0,1 in turn;
// dx, dy, button levels and all 256 pixels read back for a chosen entry
// match the sensor; the LEDs show the selected entry's dx and dy; older
// entries keep their data until overwritten; polling stops when the left
// button is released.
module tb_gpio_ctrl;
  import scan_pkg::*;
  localparam int H = 4, TW = 12, TP = 60;   // H > 2: SDIO goes through a 2-flop synchroniser
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, cs = 0, rd = 0, left_n = 1, right_n = 1;
  logic [3:0] addr = 0;
  logic [15:0] rdata;
  logic [3:0] rd_sel = 4'b0001;
  smp_addr_t rd_addr = 0;
  pixel_t rd_pixel;
  logic sclk, sdio_o, sdio_oe, sdio_line, sens_d, sens_oe, pd;
  logic [7:0] ledg, ledr;
  scan_mode_e mode;
  int checks = 0, failures = 0;

  gpio_ctrl #(.SCLK_HALF(H), .T_WAIT(TW), .T_PWR(TP)) dut (
    .clk, .rst, .chipselect(cs), .read(rd), .address(addr), .readdata(rdata),
    .rd_sel, .rd_addr, .rd_pixel, .sclk, .sdio_o, .sdio_oe, .sdio_i(sdio_line), .pd,
    .left_n, .right_n, .ledg, .ledr, .mode);

  assign sdio_line = sdio_oe ? sdio_o : sens_d;

  adns2051_model #(.BUSY_EVERY(29)) sensor (
    .sclk, .sdio_in(sdio_line), .sdio_drive(sens_d), .sensor_oe(sens_oe), .pd);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic reg_rd(int a, output int d);
    @(negedge clk);
    cs = 1; rd = 1; addr = 4'(a);
    @(negedge clk);
    cs = 0; rd = 0;
    d = int'(rdata);
  endtask

  int frame_of [16];   // sensor frame of each sequence number
  logic [7:0] dx_of [16], dy_of [16];
  logic lc_of [16];

  // one motion in scan mode; returns when the select number shows it
  task automatic sample(int seqno, logic [7:0] mx, logic [7:0] my);
    int sn, t;
    sensor.move(mx, my);
    t = 0;
    do begin
      repeat (50) @(posedge clk);
      reg_rd(4, sn);
      t++;
    end while (sn[((seqno - 1) % 4) * 4 +: 4] != 4'(seqno) && t < 2000);
    check(sn[((seqno - 1) % 4) * 4 +: 4] == 4'(seqno),
          $sformatf("select number %h shows sequence %0d", sn, seqno));
    frame_of[seqno] = sensor.frame;
    dx_of[seqno] = mx; dy_of[seqno] = my; lc_of[seqno] = left_n;
  endtask

  // read back entry e and compare it with sequence number s
  task automatic check_entry(int e, int s);
    int d, bad;
    @(negedge clk);
    rd_sel = 4'(1 << e);
    reg_rd(2, d); check(d == int'(dx_of[s]), $sformatf("entry %0d dx %0h", e, d));
    reg_rd(3, d); check(d == int'(dy_of[s]), $sformatf("entry %0d dy %0h", e, d));
    reg_rd(0, d); check(d == int'(lc_of[s]), $sformatf("entry %0d left level", e));
    reg_rd(1, d); check(d == 1, $sformatf("entry %0d right level", e));
    check(ledg == dx_of[s] && ledr == dy_of[s], "LEDs show the selected deltas");
    bad = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      rd_addr = 8'(a);
      @(negedge clk);
      if (rd_pixel != sensor.pix_value(frame_of[s], a)) bad++;
    end
    check(bad == 0, $sformatf("entry %0d: %0d pixels differ", e, bad));
  endtask

  initial begin
    int d, r0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (500) @(posedge clk);
    reg_rd(5, d);
    check(d[1:0] == MODE_IDLE && d[2] == 1, $sformatf("idle and ready after power-up (%h)", d));
    check(sensor.n_reads == 0 && sensor.n_writes == 0, "no polling while idle");
    check(sensor.n_pd_pulses == 1, "one PD pulse at power-up");

    left_n = 0;
    repeat (10) @(posedge clk);
    reg_rd(5, d);
    check(d[1:0] == MODE_SCAN, "left button gives scan mode");
    sample(1, 8'd5, 8'hFD);
    check_entry(0, 1);
    sample(2, 8'hF0, 8'd0);
    sample(3, 8'd1, 8'd1);
    sample(4, 8'd0, 8'h7F);
    sample(5, 8'h80, 8'd2);
    sample(6, 8'd9, 8'hF9);
    reg_rd(4, d);
    check(d == 16'h4365, $sformatf("select number after six samples %h", d));
    check_entry(1, 6);
    check_entry(2, 3);
    check_entry(0, 5);
    check(sensor.n_dumps == 6, "six dumps");

    left_n = 1;
    repeat (10) @(posedge clk);
    reg_rd(5, d);
    check(d[1:0] == MODE_IDLE, "release gives idle");
    repeat (200) @(posedge clk);
    r0 = sensor.n_reads + sensor.n_writes;
    sensor.move(8'd3, 8'd3);
    repeat (3000) @(posedge clk);
    check(sensor.n_reads + sensor.n_writes == r0, "no polling after release");

    right_n = 0;
    repeat (10) @(posedge clk);
    reg_rd(5, d);
    check(d[1:0] == MODE_RESET, "right button gives reset mode");
    right_n = 1;
    repeat (10) @(posedge clk);
    reg_rd(5, d);
    check(d[1:0] == MODE_IDLE, "release gives idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
