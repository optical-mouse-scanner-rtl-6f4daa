// mouse_poll_fsm: the polling state machine that pulls image samples out of
// the ADNS-2051 sensor.
//
// After reset it runs the sensor's power-up sequence on the PD pin: PD low
// for T_PWR clocks, high for T_WAIT clocks, low again for T_PWR clocks (the
// design's ~4 ms and ~100 us waits; at 50 MHz the defaults are 5.2 ms and
// 164 us).  It then waits in IDLE until en is high and loops:
//   CF  write Configuration_bits (0x0A): 0x01 (awake) normally, 0x09
//       (awake + PixDump) when a pixel dump is due;
//   M   read Motion (0x02); MOT (bit 7) clear -> back to IDLE;
//   DX  read Delta_X (0x03), store it in the sample being filled;
//   DY  read Delta_Y (0x04), store it; a dump is due if dx or dy is non-zero;
//       go back to CF, which now starts the dump;
//   PX  read Data_Out_Lower (0x0C) once per pixel.  Bit 7 high means the
//       pixel is not ready yet: read again.  Otherwise store the 6-bit value
//       at pixel address 0..255 (0 = bottom-right of the sensor's array);
//       after address 0xFF go on;
//   LC, RC  store the left and right button pin levels (active low);
//   N1  increment the 4-bit sample sequence number and store the new value,
//       which also completes the sample (the first sample is number 1, so
//       that it differs from the cleared select number), clear the dump flag and return to IDLE.  The
//       next CF writes 0x01 again, which ends the dump in the sensor.
// The sequence follows the design's state diagrams and acquisition flow
// chart; the one-state-per-transaction coding with a separate serial-port
// block (adns_serial) is this implementation's own.  The design skipped every
// second dump; this one dumps whenever the deltas are non-zero.
//
// Sample writes leave on wr_kind/wr_addr/wr_data as one-clock strobes.
// en is looked at only in IDLE, so a sample in progress is always finished.
module mouse_poll_fsm
  import scan_pkg::*;
#(
  parameter int unsigned SCLK_HALF = 33,
  parameter int unsigned T_WAIT    = 8192,
  parameter int unsigned T_PWR     = 262144
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  // sensor pins
  output logic      sclk,
  output logic      sdio_o,
  output logic      sdio_oe,
  input  logic      sdio_i,
  output logic      pd,
  input  logic      left_n,
  input  logic      right_n,
  // sample writes
  output smp_wr_e   wr_kind,
  output smp_addr_t wr_addr,
  output logic [7:0] wr_data,
  // status
  output logic      ready,       // power-up finished
  output logic      dumping      // pixel dump in progress
);
  typedef enum logic [3:0] {
    P_WAIT0, P_PD, P_WAIT1, IDLE, CF, M, DX, DY, PX, LC, RC, N1
  } state_e;
  state_e state;

  localparam int PW = $clog2(T_PWR + 1);

  logic [PW-1:0] pcnt;
  logic          issued;     // transaction of the current state started
  logic          pxd_en;     // pixel dump due
  smp_addr_t     px_addr;
  logic [3:0]    seq;

  // serial port
  logic       sp_start, sp_write, sp_busy, sp_done;
  logic [6:0] sp_addr;
  logic [7:0] sp_wdata, sp_rdata;

  adns_serial #(.SCLK_HALF(SCLK_HALF), .T_WAIT(T_WAIT)) u_port (
    .clk, .rst,
    .start(sp_start), .is_write(sp_write), .addr(sp_addr), .wdata(sp_wdata),
    .busy(sp_busy), .done(sp_done), .rdata(sp_rdata),
    .sclk, .sdio_o, .sdio_oe, .sdio_i
  );

  // transaction of each state
  always_comb begin
    sp_write = 1'b0;
    sp_addr  = REG_MOTION;
    sp_wdata = CFG_AWAKE;
    unique case (state)
      CF: begin
        sp_write = 1'b1;
        sp_addr  = REG_CONFIG;
        sp_wdata = pxd_en ? CFG_PIXDUMP : CFG_AWAKE;
      end
      DX:      sp_addr = REG_DELTA_X;
      DY:      sp_addr = REG_DELTA_Y;
      PX:      sp_addr = REG_DATA_OUT;
      default: sp_addr = REG_MOTION;
    endcase
  end

  assign sp_start = !issued && !sp_busy && (state inside {CF, M, DX, DY, PX});

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= P_WAIT0;
      pcnt    <= '0;
      issued  <= 1'b0;
      pxd_en  <= 1'b0;
      px_addr <= '0;
      seq     <= '0;
      pd      <= 1'b0;
      wr_kind <= WR_NONE;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      wr_kind <= WR_NONE;
      if (sp_start) issued <= 1'b1;
      unique case (state)
        P_WAIT0: begin
          pd <= 1'b0;
          if (pcnt == PW'(T_PWR - 1)) begin
            pcnt <= '0; pd <= 1'b1; state <= P_PD;
          end else pcnt <= pcnt + 1'b1;
        end
        P_PD: begin
          if (pcnt == PW'(T_WAIT - 1)) begin
            pcnt <= '0; pd <= 1'b0; state <= P_WAIT1;
          end else pcnt <= pcnt + 1'b1;
        end
        P_WAIT1: begin
          if (pcnt == PW'(T_PWR - 1)) begin
            pcnt <= '0; state <= IDLE;
          end else pcnt <= pcnt + 1'b1;
        end
        IDLE: if (en) state <= CF;
        CF: if (sp_done) begin
          issued <= 1'b0;
          if (pxd_en) begin
            px_addr <= '0;
            state   <= PX;
          end else state <= M;
        end
        M: if (sp_done) begin
          issued <= 1'b0;
          state  <= sp_rdata[MOT_BIT] ? DX : IDLE;
        end
        DX: if (sp_done) begin
          issued  <= 1'b0;
          wr_kind <= WR_DX;
          wr_addr <= '0;
          wr_data <= sp_rdata;
          pxd_en  <= (sp_rdata != 8'h00);
          state   <= DY;
        end
        DY: if (sp_done) begin
          issued  <= 1'b0;
          wr_kind <= WR_DY;
          wr_addr <= '0;
          wr_data <= sp_rdata;
          if (sp_rdata != 8'h00) pxd_en <= 1'b1;
          state   <= CF;
        end
        PX: if (sp_done) begin
          issued <= 1'b0;
          if (!sp_rdata[DOUT_BUSY_BIT]) begin
            wr_kind <= WR_PIXEL;
            wr_addr <= px_addr;
            wr_data <= {2'b00, sp_rdata[PIX_W-1:0]};
            if (px_addr == '1) state <= LC;
            else px_addr <= px_addr + 1'b1;
          end
        end
        LC: begin
          wr_kind <= WR_LC;
          wr_addr <= '0;
          wr_data <= {7'b0, left_n};
          state   <= RC;
        end
        RC: begin
          wr_kind <= WR_RC;
          wr_addr <= '0;
          wr_data <= {7'b0, right_n};
          state   <= N1;
        end
        N1: begin
          wr_kind <= WR_SEQ;
          wr_addr <= '0;
          wr_data <= {4'b0, seq + 4'd1};
          seq     <= seq + 1'b1;
          pxd_en  <= 1'b0;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign ready   = !(state inside {P_WAIT0, P_PD, P_WAIT1});
  assign dumping = (state == PX);
endmodule
