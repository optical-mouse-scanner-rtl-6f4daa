// tb_click_mode_fsm: random button sequences; the mode one clock later must
// be RESET when the right button is down, else SCAN when the left one is,
// else IDLE.  Counts each of the transitions of the state diagram.
module tb_click_mode_fsm;
  import scan_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, reset_btn = 0, scan_btn = 0;
  scan_mode_e mode, prev, expect_m;
  int checks = 0, failures = 0;
  int seen [3][3];

  click_mode_fsm dut (.clk, .rst, .reset_btn, .scan_btn, .mode);

  initial begin
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) seen[i][j] = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (mode != MODE_IDLE) begin failures++; $display("FAIL reset mode"); end
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      reset_btn = 1'($urandom);
      scan_btn  = 1'($urandom);
      prev = mode;
      expect_m = reset_btn ? MODE_RESET : (scan_btn ? MODE_SCAN : MODE_IDLE);
      @(posedge clk); #1;
      checks++;
      if (mode != expect_m) begin
        failures++;
        $display("FAIL btn=%b%b mode=%0d exp=%0d", reset_btn, scan_btn, mode, expect_m);
      end
      seen[prev][mode]++;
    end
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
      checks++;
      if (seen[i][j] == 0) begin failures++; $display("FAIL transition %0d->%0d never seen", i, j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
