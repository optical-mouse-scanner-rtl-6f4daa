// adns2051_model: behavioural model (not synthesizable) of the serial port
// and the few registers of the ADNS-2051 mouse sensor that the scanner uses.
//
// Serial port: SCLK idles high; the first 8 bits on SDIO, sampled on rising
// edges, are {R/W, A6..A0}.  A write takes 8 more data bits.  For a read the
// model drives D7..D0, each one after a falling edge of SCLK, so the master
// samples them on the following rising edges.  A high level on PD resets the
// port to the start of a header.  Rising edges before the first falling
// edge (power-on level changes) are ignored.
// Registers: Motion (0x02, bit 7 = motion, set while dx or dy is non-zero),
// Delta_X (0x03) and Delta_Y (0x04), each cleared by its read, Configuration
// (0x0A: writing bit 3 starts a pixel dump, writing it clear ends it), and
// Data_Out_Lower (0x0C): during a dump each read returns the next pixel in
// bits 5:0 with bit 7 low; when BUSY_EVERY > 0, the first read of every
// BUSY_EVERY-th pixel returns bit 7 high instead (pixel not ready yet).
// Pixel values come from pix_value(frame, address), frame counting dumps.
// The testbench sets motion with move().  The counters at the end of the
// module record what happened, for coverage checks.
module adns2051_model #(
  parameter int BUSY_EVERY = 37
) (
  input  logic sclk,
  input  logic sdio_in,     // level on the SDIO line
  output logic sdio_drive,  // value the sensor drives
  output logic sensor_oe,   // sensor is driving SDIO
  input  logic pd
);
  logic [7:0] dx = 0, dy = 0, cfg = 0;
  logic       dumping = 0;
  int         ptr = 0, frame = 0;
  bit         busy_given = 0;

  logic [7:0] hdr, dat, rval;
  int         nbit = 0;    // rising edges seen in this transaction
  int         nfall = 0;   // falling edges seen in the read data phase
  bit         reading = 0;
  bit         armed = 0;   // a falling SCLK edge has been seen

  // coverage / protocol counters
  int n_writes = 0, n_reads = 0, n_motion_reads = 0, n_mot0 = 0, n_mot1 = 0;
  int n_busy = 0, n_pixels = 0, n_dumps = 0, n_pd_pulses = 0;
  logic [7:0] last_cfg = 0;

  initial begin
    sdio_drive = 1'b1;
    sensor_oe  = 1'b0;
    hdr = 0; dat = 0; rval = 0;
  end

  function automatic logic [5:0] pix_value(int f, int a);
    return 6'((a * 5 + f * 11 + (a >> 4)) & 63);
  endfunction

  task automatic move(input logic [7:0] mx, input logic [7:0] my);
    dx = mx;
    dy = my;
  endtask

  function automatic logic [7:0] read_reg(logic [6:0] a);
    logic [7:0] v;
    v = 8'h00;
    case (a)
      7'h02: begin
        v = {(dx != 0 || dy != 0), 7'b0};
        n_motion_reads++;
        if (v[7]) n_mot1++; else n_mot0++;
      end
      7'h03: begin v = dx; dx = 0; end
      7'h04: begin v = dy; dy = 0; end
      7'h0A: v = cfg;
      7'h0C: begin
        if (!dumping) v = 8'h80;
        else if (BUSY_EVERY > 0 && (ptr % BUSY_EVERY) == 0 && !busy_given) begin
          v = 8'h80;
          busy_given = 1;
          n_busy++;
        end else begin
          v = {2'b00, pix_value(frame, ptr)};
          busy_given = 0;
          n_pixels++;
          ptr = (ptr + 1) % 256;
        end
      end
      default: v = 8'h00;
    endcase
    return v;
  endfunction

  always @(posedge pd) begin
    n_pd_pulses++;
    nbit = 0;
    reading = 0;
    armed = 0;
    sensor_oe = 0;
  end

  always @(posedge sclk) begin
    if (!pd && armed) begin
      if (reading) begin
        nbit++;
        if (nbit == 16) begin
          reading = 0;
          nbit = 0;
          sensor_oe = 0;
        end
      end else begin
        if (nbit < 8) hdr = {hdr[6:0], sdio_in};
        else          dat = {dat[6:0], sdio_in};
        nbit++;
        if (nbit == 8 && !hdr[7]) begin
          rval = read_reg(hdr[6:0]);
          reading = 1;
          nfall = 0;
          n_reads++;
        end else if (nbit == 16) begin
          nbit = 0;
          n_writes++;
          if (hdr[6:0] == 7'h0A) begin
            cfg = dat;
            last_cfg = dat;
            if (dat[3] && !dumping) begin
              dumping = 1;
              ptr = 0;
              busy_given = 0;
              frame++;
              n_dumps++;
            end else if (!dat[3]) begin
              dumping = 0;
            end
          end
        end
      end
    end
  end

  always @(negedge sclk) begin
    if (!pd) armed = 1;
    if (reading && !pd) begin
      sensor_oe  = 1;
      sdio_drive = rval[7 - nfall];
      nfall++;
    end
  end
endmodule
