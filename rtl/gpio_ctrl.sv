// gpio_ctrl: the mouse-side controller.  It owns the sensor pins, runs the
// polling state machine, stores what it reads in the sample buffer, decodes
// the buttons into the operating mode and lets the processor read the
// results through a small register port.
//
// Pins: SCLK, SDIO (split into sdio_o / sdio_oe / sdio_i; the board-level
// tri-state buffer is outside), PD, and the two button inputs, active low.
// The buttons and sdio_i pass through two-flop synchronisers.  Polling runs
// The synchroniser delays the sensor's read data by two clocks, so
// SCLK_HALF must be at least 3 (the default is 33).  Polling runs
// only in SCAN mode: the design states that the sensor is not polled while
// neither button is pressed.
//
// Register port (16-bit, processor side, read data registered: valid one
// clock after chipselect & read):
//   0  left button level of the selected sample (bit 0, 0 = pressed)
//   1  right button level of the selected sample (bit 0, 0 = pressed)
//   2  dx of the selected sample (bits 7:0, two's complement)
//   3  dy of the selected sample
//   4  select number: the sequence numbers of the four entries
//   5  status: bits 1:0 mode, bit 2 sensor powered up, bit 3 dump running
// Registers 0-4 follow the design; register 5 is this implementation's own.
// Nothing is writable.  The selected sample is the one named by rd_sel,
// which comes from the VGA controller's read-select register.
module gpio_ctrl
  import scan_pkg::*;
#(
  parameter int unsigned SCLK_HALF = 33,
  parameter int unsigned T_WAIT    = 8192,
  parameter int unsigned T_PWR     = 262144
) (
  input  logic        clk,
  input  logic        rst,
  // processor register port
  input  logic        chipselect,
  input  logic        read,
  input  logic [3:0]  address,
  output logic [15:0] readdata,
  // sample read port for the VGA controller
  input  logic [N_ENTRIES-1:0] rd_sel,
  input  smp_addr_t   rd_addr,
  output pixel_t      rd_pixel,
  // sensor and button pins
  output logic        sclk,
  output logic        sdio_o,
  output logic        sdio_oe,
  input  logic        sdio_i,
  output logic        pd,
  input  logic        left_n,
  input  logic        right_n,
  // board outputs
  output logic [7:0]  ledg,
  output logic [7:0]  ledr,
  output scan_mode_e  mode
);
  logic [1:0] left_s, right_s, sdio_s;
  initial assert (SCLK_HALF >= 3) else $error("gpio_ctrl: SCLK_HALF must be at least 3");

  always_ff @(posedge clk) begin
    if (rst) begin
      left_s  <= '1;
      right_s <= '1;
      sdio_s  <= '1;
    end else begin
      left_s  <= {left_s[0], left_n};
      right_s <= {right_s[0], right_n};
      sdio_s  <= {sdio_s[0], sdio_i};
    end
  end

  click_mode_fsm u_click (
    .clk, .rst,
    .reset_btn(!right_s[1]),
    .scan_btn (!left_s[1]),
    .mode
  );

  smp_wr_e    wr_kind;
  smp_addr_t  wr_addr;
  logic [7:0] wr_data;
  logic       ready, dumping;

  mouse_poll_fsm #(.SCLK_HALF(SCLK_HALF), .T_WAIT(T_WAIT), .T_PWR(T_PWR)) u_psm (
    .clk, .rst,
    .en(mode == MODE_SCAN),
    .sclk, .sdio_o, .sdio_oe, .sdio_i(sdio_s[1]), .pd,
    .left_n(left_s[1]), .right_n(right_s[1]),
    .wr_kind, .wr_addr, .wr_data,
    .ready, .dumping
  );

  logic [7:0]  sel_dx, sel_dy;
  logic        sel_lc, sel_rc;
  logic [15:0] select_num;
  logic [N_ENTRIES-1:0] wr_sel;

  sample_buffer u_buf (
    .clk, .rst,
    .wr_kind, .wr_addr, .wr_data,
    .rd_sel, .rd_addr, .rd_pixel,
    .sel_dx, .sel_dy, .sel_lc, .sel_rc,
    .select_num, .wr_sel
  );

  always_ff @(posedge clk) begin
    if (rst) readdata <= '0;
    else if (chipselect && read) begin
      unique case (address)
        4'd0:    readdata <= {15'b0, sel_lc};
        4'd1:    readdata <= {15'b0, sel_rc};
        4'd2:    readdata <= {8'b0, sel_dx};
        4'd3:    readdata <= {8'b0, sel_dy};
        4'd4:    readdata <= select_num;
        4'd5:    readdata <= {12'b0, dumping, ready, mode};
        default: readdata <= '0;
      endcase
    end
  end

  assign ledg = sel_dx;
  assign ledr = sel_dy;
endmodule
