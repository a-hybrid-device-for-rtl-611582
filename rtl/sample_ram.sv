// sample_ram: simple dual-port RAM, one write and one read port, as used for
// each channel's sample memory (32768 x 16 bit) and for the data controller's
// frame memory.
//
// Writes take effect at the clock edge where we is high. The read is
// synchronous: rdata shows mem[raddr] one clock after raddr is presented. The
// contents are not reset. The 32768 x 16 default is the channel memory size
// of the device description.
module sample_ram #(
  parameter int W     = 16,
  parameter int DEPTH = 32768,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
