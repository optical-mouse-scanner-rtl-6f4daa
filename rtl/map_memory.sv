// map_memory: walks the 256 pixels of an image sample and gives, for each,
// the address where it lands in the 128x128 aggregate image.
//
// Both images are stored column by column, starting at the bottom-right
// pixel: address = column_from_right * height + row_from_bottom.  A sample
// pixel at sample address s (column s[7:4], row s[3:0]) therefore lands at
//     agg_addr = base + s[7:4] * 128 + s[3:0]     (mod 2**14)
// where base is the aggregate address of the sample's bottom-right corner.
// The address map is the design's; the step/run handshake is this
// implementation's own.
//
// Operation: each clock with step high moves the walk on.  When the walk is
// idle and run is high, a step starts a pass: base is taken from start_addr
// and smp_addr = 0.  Each further step advances smp_addr; the step at
// smp_addr = 255 ends the pass, or starts the next one at once (taking
// start_addr again) if run is still high.  A pass once started always
// completes.  While active is high, smp_addr/agg_addr name the pixel to copy
// on the current step.  A pass takes 257 steps including the starting one.
module map_memory
  import scan_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      step,
  input  logic      run,
  input  agg_addr_t start_addr,
  output logic      active,
  output smp_addr_t smp_addr,
  output agg_addr_t agg_addr,
  output logic      pass_done    // pulses on the step that ends a pass
);
  agg_addr_t base;

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      smp_addr  <= '0;
      base      <= '0;
      pass_done <= 1'b0;
    end else begin
      pass_done <= 1'b0;
      if (step) begin
        if (!active) begin
          if (run) begin
            active   <= 1'b1;
            base     <= start_addr;
            smp_addr <= '0;
          end
        end else if (smp_addr == '1) begin
          pass_done <= 1'b1;
          smp_addr  <= '0;
          active    <= run;
          base      <= start_addr;
        end else begin
          smp_addr <= smp_addr + 1'b1;
        end
      end
    end
  end

  assign agg_addr = base + {3'b0, smp_addr[7:4], 7'b0} + {10'b0, smp_addr[3:0]};
endmodule
