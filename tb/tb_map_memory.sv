// tb_map_memory: runs copy passes from several start corners, stepping on
// every other clock as the VGA controller does, and checks every
// (sample address, aggregate address) pair against column/row arithmetic,
// the pass length (257 steps: 513 or 514 clocks from run), back-to-back passes while run stays high, and
// that a pass in progress completes after run drops.
module tb_map_memory;
  import scan_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, step = 0, run = 0;
  agg_addr_t start_addr = 0, agg_addr;
  smp_addr_t smp_addr;
  logic active, pass_done;
  int checks = 0, failures = 0;

  map_memory dut (.clk, .rst, .step, .run, .start_addr, .active, .smp_addr, .agg_addr, .pass_done);

  always @(posedge clk) step <= rst ? 1'b0 : ~step;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one pass from an idle walk; counts clocks from run to pass_done
  task automatic pass(input int col, input int row, input bit keep_run);
    int steps, bad, n;
    bit seen [256];
    @(negedge clk);
    start_addr = agg_addr_t'(col * 128 + row);
    run = 1;
    steps = 1; bad = 0; n = 0;   // the first clock passes before the loop looks
    foreach (seen[i]) seen[i] = 0;
    do begin
      @(negedge clk);
      if (step) begin
        if (active) begin
          int c, r;
          c = (col + smp_addr / 16) % 128;
          r = row + smp_addr % 16;
          if (agg_addr != agg_addr_t'(c * 128 + r) && row <= 112) bad++;
          seen[smp_addr] = 1;
          n++;
        end
        if (!keep_run && active) run = 0;  // drop run mid-pass
      end
      @(posedge clk); #1;
      steps++;
    end while (!pass_done);
    check(bad == 0, $sformatf("start %0d,%0d: %0d wrong addresses", col, row, bad));
    check(n == 256, $sformatf("pixels in pass %0d", n));
    // one step to start, 256 steps to copy, a step every other clock
    check(steps == 513 || steps == 514, $sformatf("pass took %0d clocks", steps));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    pass(0, 0, 1);
    check(active, "next pass starts at once while run is high");
    run = 0;
    @(posedge clk); #1;
    while (!pass_done) begin @(posedge clk); #1; end
    repeat (4) @(posedge clk);
    check(!active, "idle after the extra pass");
    pass(5, 100, 0);
    repeat (4) @(posedge clk);
    pass(112, 112, 0);
    repeat (4) @(posedge clk);
    check(!active, "idle after run dropped");
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
