// vga_ctrl: the display side.  It holds the 128x128 aggregate image, copies
// image samples into it, clears it, and draws the screen: the aggregate
// pixel-doubled to 256x256, a 16x16 highlight box at the current position,
// and the selected sample pixel-doubled to 32x32 as a live inset.
//
// Clocking.  Everything runs on the 50 MHz clock.  A phase flip-flop divides
// it by two: the 25 MHz pixel clock is VGA_CLK = phase, and the raster
// counters advance on the clocks with phase = 1 (pix_ce).  Every pixel thus
// spans two clocks, and the sample buffer's single read port is shared
// between them: in the phase-0 clock it reads the inset pixel for the
// display, in the phase-1 clock it reads the next pixel for the copy.  The
// copy never stalls the display and the display never stalls the copy.
//
// Display pipeline: RAM addresses are decoded from the counters in the
// phase-0 clock, the RAMs answer in the phase-1 clock, and the colour and
// the sync pins are registered together on the pix_ce edge.  The picture is
// therefore one pixel clock behind the counters, syncs included.
//
// Screen layout (picture coordinates): aggregate window x 100..355,
// y 100..355; inset window x 498..529, y 220..251; white elsewhere in the
// picture; black in blanking.  Aggregate address of a screen pixel:
// {~cx[7:1], ~cy[7:1]} with cx, cy the offsets inside the window, since
// address 0 is the bottom-right pixel and addresses run up the columns.  The
// highlight box is the outline of the 16x16 square whose bottom-right pixel
// is start_addr; its colour comes from the box register (0 yellow, 1 green,
// other red).  Grey pixels go to all three 10-bit channels as {g, g[3:0]}.
//
// Copy (aggregation): while aggr_en is set, map_memory walks the selected
// sample and each pixel is written to start_addr + column*128 + row.
// Clear: while the clear register is set or the buttons are in RESET mode,
// and until the sweep has been through all 16384 addresses once, one
// address per clock is written with 0; clearing beats copying, and the
// aggregate window shows black meanwhile.
//
// Register port (16-bit, read data registered, valid one clock after
// chipselect & read):
//   read  0  bit 0: hsync or vsync       write 3  start address (13:0)
//   read  1  start address               write 4  read select (3:0, one-hot)
//   read  2  read select                 write 5  aggregation enable (bit 0)
//   read  3  bit 0 clear running,        write 6  box colour (5:0)
//            bit 1 copy pass running     write 7  clear (bit 0)
// The register map, windows, colours and grey expansion follow the design;
// read 3, the completing clear sweep and the shared-port schedule are this
// implementation's own.  Reset values: start 0, read select 0001, others 0.
module vga_ctrl
  import scan_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // processor register port
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [3:0]  address,
  input  logic [15:0] writedata,
  output logic [15:0] readdata,
  // sample buffer read port
  output logic [N_ENTRIES-1:0] rd_sel,
  output smp_addr_t   smp_rd_addr,
  input  pixel_t      smp_pixel,
  // operating mode from the buttons
  input  scan_mode_e  mode,
  // VGA DAC
  output logic        VGA_CLK,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK,
  output logic        VGA_SYNC,
  output logic [9:0]  VGA_R,
  output logic [9:0]  VGA_G,
  output logic [9:0]  VGA_B
);
  // ---------------- registers ----------------
  agg_addr_t  start_addr;
  logic       aggr_en, clear_reg;
  logic [5:0] box_status;
  logic       clr_busy, map_active;
  logic       hsync, vsync;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_addr <= '0;
      rd_sel     <= N_ENTRIES'(1);
      aggr_en    <= 1'b0;
      box_status <= '0;
      clear_reg  <= 1'b0;
      readdata   <= '0;
    end else if (chipselect) begin
      if (read) begin
        unique case (address)
          4'd0:    readdata <= {15'b0, hsync | vsync};
          4'd1:    readdata <= {2'b0, start_addr};
          4'd2:    readdata <= {12'b0, rd_sel};
          4'd3:    readdata <= {14'b0, map_active, clr_busy};
          default: readdata <= '0;
        endcase
      end
      if (write) begin
        unique case (address)
          4'd3:    start_addr <= writedata[AGG_AW-1:0];
          4'd4:    rd_sel     <= writedata[N_ENTRIES-1:0];
          4'd5:    aggr_en    <= writedata[0];
          4'd6:    box_status <= writedata[5:0];
          4'd7:    clear_reg  <= writedata[0];
          default: ;
        endcase
      end
    end
  end

  // ---------------- pixel clock ----------------
  logic phase;
  always_ff @(posedge clk) begin
    if (rst) phase <= 1'b0;
    else     phase <= ~phase;
  end
  wire pix_ce = phase;

  logic [9:0] x;
  logic [8:0] y;
  logic       active;

  vga_timing u_timing (
    .clk, .rst, .pix_ce,
    .hcount(), .vcount(), .hsync, .vsync, .active, .x, .y, .eol(), .eof()
  );

  // ---------------- windows and addresses ----------------
  logic [9:0] cx, ix;
  logic [8:0] cy, iy;
  logic       in_agg, in_ins;
  agg_addr_t  disp_addr;
  smp_addr_t  ins_addr;

  always_comb begin
    cx = x - 10'(AGG_X0);
    cy = y - 9'(AGG_Y0);
    ix = x - 10'(INS_X0);
    iy = y - 9'(INS_Y0);
    in_agg = active && (x >= 10'(AGG_X0)) && (x < 10'(AGG_X0 + 2*AGG_DIM)) &&
                       (y >= 9'(AGG_Y0))  && (y < 9'(AGG_Y0 + 2*AGG_DIM));
    in_ins = active && (x >= 10'(INS_X0)) && (x < 10'(INS_X0 + 2*SMP_DIM)) &&
                       (y >= 9'(INS_Y0))  && (y < 9'(INS_Y0 + 2*SMP_DIM));
    disp_addr = {~cx[7:1], ~cy[7:1]};
    ins_addr  = {~ix[4:1], ~iy[4:1]};
  end

  // highlight box: column and row offsets from the start corner (mod 128)
  logic [6:0] dcol, drow;
  logic       on_box;
  always_comb begin
    dcol   = disp_addr[13:7] - start_addr[13:7];
    drow   = disp_addr[6:0]  - start_addr[6:0];
    on_box = (dcol < 7'd16) && (drow < 7'd16) &&
             (dcol == 7'd0 || dcol == 7'd15 || drow == 7'd0 || drow == 7'd15);
  end

  // ---------------- aggregation copy ----------------
  agg_addr_t map_agg_addr;
  smp_addr_t map_smp_addr;

  map_memory u_map (
    .clk, .rst,
    .step(pix_ce), .run(aggr_en), .start_addr,
    .active(map_active), .smp_addr(map_smp_addr), .agg_addr(map_agg_addr),
    .pass_done()
  );

  // phase 0: inset read for the display; phase 1: copy read
  assign smp_rd_addr = phase ? map_smp_addr : ins_addr;

  logic      cp_pending;
  agg_addr_t cp_addr;
  always_ff @(posedge clk) begin
    if (rst) begin
      cp_pending <= 1'b0;
      cp_addr    <= '0;
    end else begin
      cp_pending <= pix_ce && map_active;
      cp_addr    <= map_agg_addr;
    end
  end

  // ---------------- clear sweep ----------------
  logic      clear_req;
  agg_addr_t clr_addr;
  assign clear_req = clear_reg || (mode == MODE_RESET);

  always_ff @(posedge clk) begin
    if (rst) begin
      clr_busy <= 1'b0;
      clr_addr <= '0;
    end else if (clr_busy) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == '1 && !clear_req) clr_busy <= 1'b0;
    end else if (clear_req) begin
      clr_busy <= 1'b1;
      clr_addr <= '0;
    end
  end

  // ---------------- aggregate RAM ----------------
  logic      agg_we;
  agg_addr_t agg_waddr;
  pixel_t    agg_wdata, agg_q;

  always_comb begin
    if (clr_busy) begin
      agg_we    = 1'b1;
      agg_waddr = clr_addr;
      agg_wdata = '0;
    end else begin
      agg_we    = cp_pending;
      agg_waddr = cp_addr;
      agg_wdata = smp_pixel;
    end
  end

  dual_port_ram #(.DW(PIX_W), .AW(AGG_AW)) u_agg (
    .clk, .we(agg_we), .waddr(agg_waddr), .wdata(agg_wdata),
    .raddr(disp_addr), .rdata(agg_q)
  );

  // ---------------- colour and sync registers ----------------
  logic [29:0] rgb;
  always_comb begin
    if (in_agg && on_box) begin
      unique case (box_status)
        6'd0:    rgb = {10'h3FF, 10'h3FF, 10'h000};
        6'd1:    rgb = {10'h000, 10'h3FF, 10'h000};
        default: rgb = {10'h3FF, 10'h000, 10'h000};
      endcase
    end else if (in_agg) begin
      rgb = clr_busy ? '0 : {3{grey_to_dac(agg_q)}};
    end else if (in_ins) begin
      rgb = {3{grey_to_dac(smp_pixel)}};
    end else if (active) begin
      rgb = '1;
    end else begin
      rgb = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {VGA_R, VGA_G, VGA_B} <= '0;
      VGA_HS    <= 1'b1;
      VGA_VS    <= 1'b1;
      VGA_BLANK <= 1'b0;
    end else if (pix_ce) begin
      {VGA_R, VGA_G, VGA_B} <= rgb;
      VGA_HS    <= ~hsync;
      VGA_VS    <= ~vsync;
      VGA_BLANK <= active;
    end
  end

  assign VGA_CLK  = phase;
  assign VGA_SYNC = 1'b0;
endmodule
