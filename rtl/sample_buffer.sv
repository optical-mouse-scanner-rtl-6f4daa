// sample_buffer: the queue of image samples between the polling state
// machine and the aggregation logic.
//
// It holds N_ENTRIES (4) samples.  Each is a 256 x 6-bit pixel RAM plus the
// sample's dx, dy and left/right button levels.  The polling state machine
// fills one entry at a time, chosen by the one-hot write select wr_sel.  The
// WR_SEQ write ends a sample: its 4-bit sequence number goes into the entry's
// nibble of the 16-bit select number (entry i in bits 4i+3:4i) and wr_sel
// moves to the next entry, round robin.  The reader (processor software)
// polls the select number, sees which nibble changed, and names that entry
// in the one-hot read select rd_sel; the pixel port and the dx/dy/click
// outputs then show that entry.  A rd_sel that is not one-hot reads zeros.
//
// Timing: rd_pixel is valid one clock after rd_addr (and rd_sel) are
// presented, like the block RAMs it is built from.  The other outputs follow
// rd_sel combinationally.  Four entries and the select-number layout follow
// the design; sizes are parameters of scan_pkg.
module sample_buffer
  import scan_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // from the polling state machine
  input  smp_wr_e              wr_kind,
  input  smp_addr_t            wr_addr,
  input  logic [7:0]           wr_data,
  // read side
  input  logic [N_ENTRIES-1:0] rd_sel,
  input  smp_addr_t            rd_addr,
  output pixel_t               rd_pixel,
  output logic [7:0]           sel_dx,
  output logic [7:0]           sel_dy,
  output logic                 sel_lc,
  output logic                 sel_rc,
  // status
  output logic [4*N_ENTRIES-1:0] select_num,
  output logic [N_ENTRIES-1:0] wr_sel
);
  logic [7:0]   dx [N_ENTRIES];
  logic [7:0]   dy [N_ENTRIES];
  logic [N_ENTRIES-1:0] lc, rc;
  pixel_t       q  [N_ENTRIES];
  logic [N_ENTRIES-1:0] rd_sel_q;

  for (genvar i = 0; i < N_ENTRIES; i++) begin : g_entry
    dual_port_ram #(.DW(PIX_W), .AW(SMP_AW)) u_ram (
      .clk,
      .we   (wr_kind == WR_PIXEL && wr_sel[i]),
      .waddr(wr_addr),
      .wdata(wr_data[PIX_W-1:0]),
      .raddr(rd_addr),
      .rdata(q[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_sel     <= N_ENTRIES'(1);
      select_num <= '0;
      lc         <= '1;
      rc         <= '1;
      for (int i = 0; i < N_ENTRIES; i++) begin
        dx[i] <= '0;
        dy[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N_ENTRIES; i++) begin
        if (wr_sel[i]) begin
          unique case (wr_kind)
            WR_DX:   dx[i] <= wr_data;
            WR_DY:   dy[i] <= wr_data;
            WR_LC:   lc[i] <= wr_data[0];
            WR_RC:   rc[i] <= wr_data[0];
            WR_SEQ:  select_num[4*i +: 4] <= wr_data[3:0];
            default: ;
          endcase
        end
      end
      if (wr_kind == WR_SEQ)
        wr_sel <= {wr_sel[N_ENTRIES-2:0], wr_sel[N_ENTRIES-1]};
    end
  end

  always_ff @(posedge clk) rd_sel_q <= rd_sel;

  always_comb begin
    rd_pixel = '0;
    sel_dx   = '0;
    sel_dy   = '0;
    sel_lc   = 1'b1;
    sel_rc   = 1'b1;
    for (int i = 0; i < N_ENTRIES; i++) begin
      if (rd_sel_q == N_ENTRIES'(1 << i)) rd_pixel = q[i];
      if (rd_sel   == N_ENTRIES'(1 << i)) begin
        sel_dx = dx[i];
        sel_dy = dy[i];
        sel_lc = lc[i];
        sel_rc = rc[i];
      end
    end
  end

  a_wr_sel_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(wr_sel));
endmodule
