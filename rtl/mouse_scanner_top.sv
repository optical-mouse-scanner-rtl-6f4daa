// mouse_scanner_top: optical mouse scanner.  An ordinary optical mouse is
// swept over a page; its sensor's 16x16 grey-scale frames are pasted into a
// 128x128 aggregate image at the position the mouse reports, and the result
// is shown on a VGA monitor together with the live frame.
//
// Structure:
//   gpio_ctrl  polls the ADNS-2051 over SCLK/SDIO/PD, fills the four-entry
//              sample buffer and decodes the buttons into idle/scan/reset;
//   vga_ctrl   holds the aggregate image, copies the selected sample into it
//              at the position the processor gives, clears it, and draws the
//              screen;
//   seven_seg  x4 show dx and dy of the selected sample on HEX1:0 and HEX5:4.
// The processor that turns dx/dy into an absolute position, picks the newest
// sample and starts the copies is not part of this RTL: its two register
// ports (gpio_* and vga_*) are brought out as they would meet the bus.
//
// Reset: rst_n is synchronised, and a power-on counter keeps the design in
// reset for POR_CYCLES clocks after configuration (65535, as the design's
// board top does).  Clock: clk is the 50 MHz board clock; VGA_CLK is clk/2.
module mouse_scanner_top
  import scan_pkg::*;
#(
  parameter int unsigned SCLK_HALF  = 33,
  parameter int unsigned T_WAIT     = 8192,
  parameter int unsigned T_PWR      = 262144,
  parameter int unsigned POR_CYCLES = 65535
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor port of the mouse controller
  input  logic        gpio_cs,
  input  logic        gpio_read,
  input  logic [3:0]  gpio_address,
  output logic [15:0] gpio_readdata,
  // processor port of the VGA controller
  input  logic        vga_cs,
  input  logic        vga_read,
  input  logic        vga_write,
  input  logic [3:0]  vga_address,
  input  logic [15:0] vga_writedata,
  output logic [15:0] vga_readdata,
  // mouse: ADNS-2051 pins and buttons (active low)
  output logic        mouse_sclk,
  output logic        mouse_sdio_o,
  output logic        mouse_sdio_oe,
  input  logic        mouse_sdio_i,
  output logic        mouse_pd,
  input  logic        mouse_left_n,
  input  logic        mouse_right_n,
  // VGA DAC
  output logic        VGA_CLK,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK,
  output logic        VGA_SYNC,
  output logic [9:0]  VGA_R,
  output logic [9:0]  VGA_G,
  output logic [9:0]  VGA_B,
  // board displays
  output logic [7:0]  LEDG,
  output logic [7:0]  LEDR,
  output logic [6:0]  HEX0,
  output logic [6:0]  HEX1,
  output logic [6:0]  HEX4,
  output logic [6:0]  HEX5
);
  // ---------------- reset ----------------
  localparam int RW = $clog2(POR_CYCLES + 2);
  logic [RW-1:0] por_cnt = '0;
  logic [1:0]    rst_sync = '0;
  logic          rst;

  always_ff @(posedge clk) begin
    rst_sync <= {rst_sync[0], rst_n};
    if (por_cnt != RW'(POR_CYCLES)) por_cnt <= por_cnt + 1'b1;
  end
  assign rst = (por_cnt != RW'(POR_CYCLES)) || !rst_sync[1];

  // ---------------- blocks ----------------
  logic [N_ENTRIES-1:0] rd_sel;
  smp_addr_t            smp_rd_addr;
  pixel_t               smp_pixel;
  scan_mode_e           mode;

  gpio_ctrl #(.SCLK_HALF(SCLK_HALF), .T_WAIT(T_WAIT), .T_PWR(T_PWR)) u_gpio (
    .clk, .rst,
    .chipselect(gpio_cs), .read(gpio_read), .address(gpio_address),
    .readdata(gpio_readdata),
    .rd_sel, .rd_addr(smp_rd_addr), .rd_pixel(smp_pixel),
    .sclk(mouse_sclk), .sdio_o(mouse_sdio_o), .sdio_oe(mouse_sdio_oe),
    .sdio_i(mouse_sdio_i), .pd(mouse_pd),
    .left_n(mouse_left_n), .right_n(mouse_right_n),
    .ledg(LEDG), .ledr(LEDR), .mode
  );

  vga_ctrl u_vga (
    .clk, .rst,
    .chipselect(vga_cs), .read(vga_read), .write(vga_write),
    .address(vga_address), .writedata(vga_writedata), .readdata(vga_readdata),
    .rd_sel, .smp_rd_addr, .smp_pixel, .mode,
    .VGA_CLK, .VGA_HS, .VGA_VS, .VGA_BLANK, .VGA_SYNC, .VGA_R, .VGA_G, .VGA_B
  );

  seven_seg u_hex0 (.digit(LEDG[3:0]), .seg_n(HEX0));
  seven_seg u_hex1 (.digit(LEDG[7:4]), .seg_n(HEX1));
  seven_seg u_hex4 (.digit(LEDR[3:0]), .seg_n(HEX4));
  seven_seg u_hex5 (.digit(LEDR[7:4]), .seg_n(HEX5));
endmodule
