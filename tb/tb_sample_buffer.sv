// tb_sample_buffer: fills six samples (so the four entries wrap round),
// each with its own dx, dy, buttons, pixels and sequence number, and checks
// the select number, the round-robin write select, and every entry's pixels
// and fields through the read port with one clock of read latency.
module tb_sample_buffer;
  import scan_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1;
  smp_wr_e    wr_kind = WR_NONE;
  smp_addr_t  wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_data = 0;
  logic [3:0] rd_sel = 4'b0001;
  pixel_t     rd_pixel;
  logic [7:0] sel_dx, sel_dy;
  logic       sel_lc, sel_rc;
  logic [15:0] select_num;
  logic [3:0] wr_sel;
  int checks = 0, failures = 0;

  sample_buffer dut (.clk, .rst, .wr_kind, .wr_addr, .wr_data, .rd_sel, .rd_addr,
    .rd_pixel, .sel_dx, .sel_dy, .sel_lc, .sel_rc, .select_num, .wr_sel);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [5:0] pv(int smp, int a);
    return 6'((a * 3 + smp * 17) & 63);
  endfunction

  task automatic wr(smp_wr_e k, int a, logic [7:0] d);
    @(negedge clk);
    wr_kind = k; wr_addr = 8'(a); wr_data = d;
    @(negedge clk);
    wr_kind = WR_NONE;
  endtask

  // which sample number sits in each entry
  int held [4] = '{-1, -1, -1, -1};
  logic [15:0] exp_sel = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk);
    check(wr_sel == 4'b0001 && select_num == 0, "reset state");
    for (int n = 1; n <= 6; n++) begin
      int e;
      e = (n - 1) % 4;
      check(wr_sel == 4'(1 << e), $sformatf("write select %b before sample %0d", wr_sel, n));
      wr(WR_DX, 0, 8'(n * 10));
      wr(WR_DY, 0, 8'(-n));
      for (int a = 0; a < 256; a++) wr(WR_PIXEL, a, {2'b0, pv(n, a)});
      wr(WR_LC, 0, 8'(n & 1));
      wr(WR_RC, 0, 8'((n >> 1) & 1));
      wr(WR_SEQ, 0, 8'(n));
      held[e] = n;
      exp_sel[4*e +: 4] = 4'(n);
      #1;
      check(select_num == exp_sel, $sformatf("select number %h exp %h", select_num, exp_sel));
    end
    // read every entry back
    for (int e = 0; e < 4; e++) begin
      int bad;
      bad = 0;
      rd_sel = 4'(1 << e);
      #1;
      check(sel_dx == 8'(held[e] * 10) && sel_dy == 8'(-held[e]), $sformatf("entry %0d deltas", e));
      check(sel_lc == 1'(held[e] & 1) && sel_rc == 1'((held[e] >> 1) & 1), $sformatf("entry %0d buttons", e));
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        rd_addr = 8'(a);
        @(posedge clk); #1;
        if (rd_pixel != pv(held[e], a)) bad++;
      end
      check(bad == 0, $sformatf("entry %0d: %0d pixels wrong", e, bad));
    end
    rd_sel = 4'b0011;
    @(posedge clk); #1;
    check(rd_pixel == 0 && sel_dx == 0, "invalid read select reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
