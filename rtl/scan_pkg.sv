// scan_pkg: constants and types shared by the optical mouse scanner.
//
// The scanner reads 16x16 grey-scale frames from an ADNS-2051 mouse sensor,
// keeps the last four frames in a small buffer and pastes them into a
// 128x128 aggregate image shown on a 640x480 VGA screen next to a live inset
// of the selected frame.  This package holds the sensor's register map, the
// image sizes, the VGA timing and the codes that travel between blocks.
//
// Sensor register addresses and the two Configuration_bits values
// (0x01 = stay awake, 0x09 = stay awake + pixel dump) follow the design.
// The VGA timing numbers are the standard 640x480 at 60 Hz values used by the
// design.  The enum encodings are this implementation's own.
package scan_pkg;

  // ---------------- ADNS-2051 register map ----------------
  localparam logic [6:0] REG_MOTION    = 7'h02;
  localparam logic [6:0] REG_DELTA_X   = 7'h03;
  localparam logic [6:0] REG_DELTA_Y   = 7'h04;
  localparam logic [6:0] REG_CONFIG    = 7'h0A;
  localparam logic [6:0] REG_DATA_OUT  = 7'h0C;

  localparam logic [7:0] CFG_AWAKE     = 8'h01;  // Sleep bit set: always awake
  localparam logic [7:0] CFG_PIXDUMP   = 8'h09;  // awake + PixDump (bit 3)

  localparam int MOT_BIT       = 7;  // Motion register: motion since last read
  localparam int DOUT_BUSY_BIT = 7;  // Data_Out_Lower: high while pixel invalid

  // ---------------- image geometry ----------------
  localparam int PIX_W     = 6;      // grey-scale bits per pixel
  localparam int SMP_DIM   = 16;     // sample is 16x16
  localparam int SMP_AW    = 8;      // 256 pixels
  localparam int AGG_DIM   = 128;    // aggregate is 128x128
  localparam int AGG_AW    = 14;     // 16384 pixels
  localparam int N_ENTRIES = 4;      // image samples held in the buffer

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [SMP_AW-1:0] smp_addr_t;
  typedef logic [AGG_AW-1:0] agg_addr_t;

  // What the polling state machine is writing into the sample buffer.
  typedef enum logic [2:0] {
    WR_NONE  = 3'd0,
    WR_DX    = 3'd1,
    WR_DY    = 3'd2,
    WR_PIXEL = 3'd3,
    WR_LC    = 3'd4,
    WR_RC    = 3'd5,
    WR_SEQ   = 3'd6   // sample complete: store sequence number, advance entry
  } smp_wr_e;

  // Operating mode chosen by the mouse buttons.
  typedef enum logic [1:0] {
    MODE_IDLE  = 2'd0,
    MODE_SCAN  = 2'd1,
    MODE_RESET = 2'd2
  } scan_mode_e;

  // Colour of the highlight box drawn around the current position.
  typedef enum logic [1:0] {
    BOX_YELLOW = 2'd0,   // tracking, not writing
    BOX_GREEN  = 2'd1,   // writing into the aggregate
    BOX_RED    = 2'd2    // at or beyond the edge
  } box_colour_e;

  // ---------------- VGA 640x480 timing ----------------
  localparam int H_TOTAL  = 800;
  localparam int H_SYNC   = 96;
  localparam int H_BACK   = 48;
  localparam int H_ACTIVE = 640;
  localparam int H_FRONT  = 16;
  localparam int V_TOTAL  = 525;
  localparam int V_SYNC   = 2;
  localparam int V_BACK   = 33;
  localparam int V_ACTIVE = 480;
  localparam int V_FRONT  = 10;

  // Screen windows, in active-area pixel coordinates.
  localparam int AGG_X0 = 100;  // 256x256 window: aggregate, pixel-doubled
  localparam int AGG_Y0 = 100;
  localparam int INS_X0 = 498;  // 32x32 window: live inset, pixel-doubled
  localparam int INS_Y0 = 220;

  // 6-bit grey to 10-bit DAC level: the four low bits are repeated below
  // the six given ones.
  function automatic logic [9:0] grey_to_dac(input pixel_t g);
    return {g, g[3:0]};
  endfunction

endpackage
