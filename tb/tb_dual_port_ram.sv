// tb_dual_port_ram: random writes and reads against an array model; checks
// the one-clock read latency and read-old-data when reading and writing the
// same address in one clock.
module tb_dual_port_ram;
  localparam int DW = 6, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];
  logic [DW-1:0] expect_q;

  dual_port_ram #(.DW(DW), .AW(AW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    for (int i = 0; i < 2**AW; i++) model[i] = '0;
    // contents start at zero
    for (int i = 0; i < 2**AW; i++) begin
      raddr <= AW'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== '0) begin failures++; $display("FAIL init %0d", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      we    <= 1'($urandom);
      waddr <= AW'($urandom);
      wdata <= DW'($urandom);
      raddr <= (n % 5 == 0) ? waddr : AW'($urandom);
      #1;
      expect_q = model[raddr];          // old data on a same-address write
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL read %0d got %0d exp %0d", raddr, rdata, expect_q);
      end
    end
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
