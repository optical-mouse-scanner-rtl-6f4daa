// tb_mouse_poll_fsm: the polling state machine against the sensor model,
// with short SCLK and wait times.  Checks the power-up PD pulse and its
// length, the configuration values written, that no motion means no sample
// writes, and that a motion gives dx, dy, 256 pixels at addresses 0..255
// with the sensor's values (including re-reads of not-ready pixels), the
// button levels and sequence number 1, 2, ... in that order.
module tb_mouse_poll_fsm;
  import scan_pkg::*;
  localparam int H = 2, TW = 12, TP = 60;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, en = 0, left_n = 0, right_n = 1;
  logic sclk, sdio_o, sdio_oe, sdio_line, sens_d, sens_oe, pd, ready, dumping;
  smp_wr_e    wr_kind;
  smp_addr_t  wr_addr;
  logic [7:0] wr_data;
  int checks = 0, failures = 0;

  mouse_poll_fsm #(.SCLK_HALF(H), .T_WAIT(TW), .T_PWR(TP)) dut (
    .clk, .rst, .en, .sclk, .sdio_o, .sdio_oe, .sdio_i(sdio_line), .pd,
    .left_n, .right_n, .wr_kind, .wr_addr, .wr_data, .ready, .dumping);

  assign sdio_line = sdio_oe ? sdio_o : sens_d;

  adns2051_model #(.BUSY_EVERY(37)) sensor (
    .sclk, .sdio_in(sdio_line), .sdio_drive(sens_d), .sensor_oe(sens_oe), .pd);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // record every sample write
  smp_wr_e    log_kind [$];
  smp_addr_t  log_addr [$];
  logic [7:0] log_data [$];
  always @(posedge clk) if (!rst && wr_kind != WR_NONE) begin
    log_kind.push_back(wr_kind);
    log_addr.push_back(wr_addr);
    log_data.push_back(wr_data);
  end

  // power-up: PD low, high for TW clocks, low
  int pd_rise = -1, pd_fall = -1, cyc = 0, first_sclk_low = -1;
  always @(posedge clk) begin
    cyc++;
    if (!rst && pd && pd_rise < 0) pd_rise = cyc;
    if (!rst && !pd && pd_rise >= 0 && pd_fall < 0) pd_fall = cyc;
    if (!rst && !sclk && first_sclk_low < 0) first_sclk_low = cyc;
  end

  task automatic one_sample(input logic [7:0] mx, input logic [7:0] my, input int seqno,
                            input logic lc_lvl, input logic rc_lvl);
    int f, k, busy0;
    log_kind.delete(); log_addr.delete(); log_data.delete();
    busy0 = sensor.n_busy;
    sensor.move(mx, my);
    while (!(log_kind.size() > 0 && log_kind[log_kind.size()-1] == WR_SEQ)) @(posedge clk);
    f = sensor.frame;
    check(log_kind.size() == 2 + 256 + 3, $sformatf("write count %0d", log_kind.size()));
    check(log_kind[0] == WR_DX && log_data[0] == mx, "dx write");
    check(log_kind[1] == WR_DY && log_data[1] == my, "dy write");
    k = 0;
    for (int i = 0; i < 256; i++) begin
      if (log_kind[2+i] != WR_PIXEL || log_addr[2+i] != 8'(i) ||
          log_data[2+i] != {2'b0, sensor.pix_value(f, i)}) k++;
    end
    check(k == 0, $sformatf("%0d pixel writes wrong", k));
    check(log_kind[258] == WR_LC && log_data[258] == {7'b0, lc_lvl}, "left button level");
    check(log_kind[259] == WR_RC && log_data[259] == {7'b0, rc_lvl}, "right button level");
    check(log_kind[260] == WR_SEQ && log_data[260] == 8'(seqno), $sformatf("sequence %0d", log_data[260]));
    check(sensor.n_busy - busy0 == 7, $sformatf("not-ready re-reads %0d", sensor.n_busy - busy0));
    check(sensor.n_pixels == 256 * (seqno), "pixels read from sensor");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    while (!ready) @(posedge clk);
    check(pd_rise > 0 && pd_fall - pd_rise == TW, $sformatf("PD pulse %0d..%0d", pd_rise, pd_fall));
    check(first_sclk_low < 0, "no serial traffic during power-up");
    // disabled: no polling
    repeat (200) @(posedge clk);
    check(sensor.n_reads == 0 && sensor.n_writes == 0, "no polling while disabled");
    // enabled, no motion: config write 0x01 and Motion reads only
    en = 1;
    while (sensor.n_motion_reads < 3) @(posedge clk);
    check(sensor.last_cfg == 8'h01 && sensor.n_mot1 == 0, "idle polling writes 0x01");
    check(log_kind.size() == 0, "no sample writes without motion");
    one_sample(8'd3, 8'hFE, 1, 1'b0, 1'b1);
    check(sensor.n_dumps == 1, "one dump");
    left_n = 1; right_n = 0;
    repeat (50) @(posedge clk);
    one_sample(8'h00, 8'h07, 2, 1'b1, 1'b0);
    while (sensor.n_motion_reads < sensor.n_mot1 + 5) @(posedge clk);
    check(sensor.last_cfg == 8'h01, "dump ended by writing 0x01");
    // motion bit set but zero deltas never happens with the model; disable
    en = 0;
    repeat (2000) @(posedge clk);   // let a transaction in flight finish
    begin
      int r0;
      r0 = sensor.n_reads + sensor.n_writes;
      repeat (2000) @(posedge clk);
      check(sensor.n_reads + sensor.n_writes == r0, "no polling after disable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
