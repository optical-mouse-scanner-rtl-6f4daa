// dual_port_ram: simple dual-port RAM, one write port and one read port on a
// single clock, with a registered read (the read data appears one clock after
// the address).  It stands in for the FPGA block RAMs that hold the image
// samples and the aggregate image.  Reading an address in the same clock it
// is written returns the old contents.  The contents start at zero.
//
// Parameters: DW data width, AW address width (2**AW words).
module dual_port_ram #(
  parameter int DW = 6,
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
