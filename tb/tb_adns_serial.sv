// tb_adns_serial: serial port master against the sensor model.  Writes the
// configuration register, reads Motion, Delta_X, Delta_Y and pixels, checks
// the data, the header bits the model saw, and the transaction length of
// 32*SCLK_HALF + T_WAIT + 1 clocks from start to done.
module tb_adns_serial;
  localparam int H = 3, TW = 25;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, start = 0, is_write = 0;
  logic [6:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic busy, done, sclk, sdio_o, sdio_oe, sdio_line, sens_d, sens_oe;
  int checks = 0, failures = 0;

  adns_serial #(.SCLK_HALF(H), .T_WAIT(TW)) dut (
    .clk, .rst, .start, .is_write, .addr, .wdata, .busy, .done, .rdata,
    .sclk, .sdio_o, .sdio_oe, .sdio_i(sdio_line));

  assign sdio_line = sdio_oe ? sdio_o : sens_d;

  // the sensor sees SCLK only after reset, so that the power-on level
  // change of SCLK is not taken for a clock edge
  adns2051_model #(.BUSY_EVERY(0)) sensor (
    .sclk(sclk | rst), .sdio_in(sdio_line), .sdio_drive(sens_d), .sensor_oe(sens_oe), .pd(1'b0));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic xfer(input bit w, input logic [6:0] a, input logic [7:0] d,
                      output logic [7:0] q);
    int n;
    @(posedge clk);
    start <= 1; is_write <= w; addr <= a; wdata <= d;
    @(posedge clk);
    start <= 0;
    n = 0;
    #1;
    while (!done) begin @(posedge clk); #1; n++; end
    q = rdata;
    check(n == 32*H + TW + 1, $sformatf("length %0d, expected %0d", n, 32*H + TW + 1));
    // SCLK idles high between transactions, master owns SDIO
    @(posedge clk);
    check(sclk && sdio_oe && !busy, "idle levels");
  endtask

  logic [7:0] q;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    xfer(1, 7'h0A, 8'h09, q);
    check(sensor.last_cfg == 8'h09, "config write 0x09 seen by sensor");
    check(sensor.n_dumps == 1, "dump started");
    sensor.move(8'd5, 8'hF3);
    xfer(0, 7'h02, 0, q);
    check(q == 8'h80, $sformatf("motion read %h", q));
    xfer(0, 7'h03, 0, q);
    check(q == 8'd5, $sformatf("dx read %h", q));
    xfer(0, 7'h04, 0, q);
    check(q == 8'hF3, $sformatf("dy read %h", q));
    xfer(0, 7'h02, 0, q);
    check(q == 8'h00, "motion cleared after deltas read");
    for (int i = 0; i < 20; i++) begin
      xfer(0, 7'h0C, 0, q);
      check(q == {2'b0, sensor.pix_value(1, i)}, $sformatf("pixel %0d read %h", i, q));
    end
    xfer(1, 7'h0A, 8'h01, q);
    check(sensor.last_cfg == 8'h01, "config write 0x01 seen by sensor");
    check(sensor.n_writes == 2 && sensor.n_reads == 24, "transaction counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
