// adns_serial: master for the ADNS-2051's synchronous half-duplex serial port
// (SCLK, SDIO).
//
// One transaction is 8 bits of header, {R/W, A6..A0}, followed by 8 data
// bits, most significant bit first.  SCLK idles high.  The master changes
// SDIO while SCLK is low and the sensor samples it on the rising edge.
//   write: header bit 7 = 1, then D7..D0 from the master, then a hold-off of
//          T_WAIT clocks before the next transaction.
//   read:  header bit 7 = 0, then the master releases SDIO (sdio_oe = 0) and
//          waits T_WAIT clocks with SCLK high (the sensor's address-to-data
//          delay), then clocks 8 more cycles.  The sensor drives each bit
//          after a falling edge and the master samples it on the rising edge.
//
// SCLK is made by counting system clocks: each half period lasts SCLK_HALF
// clocks.  The defaults are the design's: the SCLK counter of the 50 MHz
// design toggles every 33 clocks (about 758 kHz), and the wait is 2**13 clocks
// (164 us, more than the 100 us the sensor needs).
//
// Handshake: pulse start for one clock while busy is low, with is_write,
// addr and wdata valid.  busy rises on the next clock; done pulses for one
// clock when the transaction, including its wait, is over, and rdata then
// holds the byte read.  A full read takes 16*2*SCLK_HALF + T_WAIT clocks,
// a write 16*2*SCLK_HALF + T_WAIT clocks as well.
module adns_serial #(
  parameter int unsigned SCLK_HALF = 33,
  parameter int unsigned T_WAIT    = 8192
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       is_write,
  input  logic [6:0] addr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       done,
  output logic [7:0] rdata,
  // pins
  output logic       sclk,
  output logic       sdio_o,
  output logic       sdio_oe,
  input  logic       sdio_i
);
  typedef enum logic [2:0] {S_IDLE, S_LOW, S_HIGH, S_WAIT, S_RLOW, S_RHIGH, S_DONE} state_e;
  state_e state;

  localparam int CW = $clog2((T_WAIT > SCLK_HALF ? T_WAIT : SCLK_HALF) + 1);

  logic [CW-1:0] cnt;
  logic [15:0]   shreg;      // header and write data, shifted out MSB first
  logic [3:0]    bits_left;  // bits still to send in this phase
  logic          wr;         // latched is_write

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      cnt       <= '0;
      shreg     <= '0;
      bits_left <= '0;
      wr        <= 1'b0;
      rdata     <= '0;
      done      <= 1'b0;
      sclk      <= 1'b1;
      sdio_o    <= 1'b1;
      sdio_oe   <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          sclk    <= 1'b1;
          sdio_oe <= 1'b1;
          if (start) begin
            wr        <= is_write;
            shreg     <= {is_write, addr, wdata};
            bits_left <= is_write ? 4'd15 : 4'd7;
            state     <= S_LOW;
            cnt       <= '0;
            sclk      <= 1'b0;
            sdio_o    <= is_write;
          end
        end
        // master-driven bit, SCLK low: SDIO already holds the bit
        S_LOW: begin
          if (cnt == CW'(SCLK_HALF - 1)) begin
            cnt   <= '0;
            sclk  <= 1'b1;            // sensor samples on this rising edge
            state <= S_HIGH;
          end else cnt <= cnt + 1'b1;
        end
        S_HIGH: begin
          if (cnt == CW'(SCLK_HALF - 1)) begin
            cnt <= '0;
            if (bits_left == 0) begin
              state <= S_WAIT;
              if (!wr) sdio_oe <= 1'b0;  // turn the line around for the read
            end else begin
              bits_left <= bits_left - 1'b1;
              shreg     <= shreg << 1;
              sdio_o    <= shreg[14];
              sclk      <= 1'b0;
              state     <= S_LOW;
            end
          end else cnt <= cnt + 1'b1;
        end
        // SCLK high, SDIO idle: address-to-data delay of a read, or the
        // hold-off after a write
        S_WAIT: begin
          if (cnt == CW'(T_WAIT - 1)) begin
            cnt <= '0;
            if (wr) begin
              state <= S_DONE;
            end else begin
              bits_left <= 4'd7;
              sclk      <= 1'b0;
              state     <= S_RLOW;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_RLOW: begin
          if (cnt == CW'(SCLK_HALF - 1)) begin
            cnt   <= '0;
            sclk  <= 1'b1;
            rdata <= {rdata[6:0], sdio_i};  // sample at the rising edge
            state <= S_RHIGH;
          end else cnt <= cnt + 1'b1;
        end
        S_RHIGH: begin
          if (cnt == CW'(SCLK_HALF - 1)) begin
            cnt <= '0;
            if (bits_left == 0) begin
              state <= S_DONE;
            end else begin
              bits_left <= bits_left - 1'b1;
              sclk      <= 1'b0;
              state     <= S_RLOW;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_DONE: begin
          sdio_oe <= 1'b1;
          sdio_o  <= 1'b1;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A new transaction may only be requested while the port is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
