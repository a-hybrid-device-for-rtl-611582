// card_bus_slave: a measuring card's window on the shared parallel bus.
//
// The card looks like 16 cells of 16-bit RAM at addresses
// {1'b0, CARD_ID[2:0], cell[3:0]}. A read strobe that hits the card is
// answered two clocks later: the clock edge after the strobe selects the cell
// into a holding register, the next edge moves it to the data output and
// raises oe_o for one clock. The bus data is thus valid in the second clock
// period after the address was set, and the card drives the data lines (oe_o)
// only then; otherwise it leaves them to the other cards. A write to cells
// 0..3 sets the PGA gain code of channel 0..3, cells 12 and 13 set the sample
// read-out channel and address, and a write to the broadcast address starts a
// measurement (start_o, one clock). Reading cell 14 returns the stored sample
// at the read-out address and then advances the address.
//
// The 4-bit cell / 3-bit card address split, the high-impedance data lines
// and the two-clock read latency follow the device description; the cell map
// (tomo_pkg) and the write side are this design's own.
module card_bus_slave
  import tomo_pkg::*;
#(
  parameter int          NCH     = 4,
  parameter logic [2:0]  CARD_ID = 3'd0,
  parameter int          SAW     = 15       // sample RAM address width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          bus_i,
  output logic [15:0]       rdata_o,
  output logic              oe_o,
  // measurement results
  input  logic [15:0]       rms_i    [NCH],
  input  logic [15:0]       phase_i  [NCH],
  input  logic [15:0]       period_i,
  input  logic              done_i,
  input  logic              busy_i,
  // configuration
  output logic [GAIN_W-1:0] gain_o   [NCH],
  output logic              start_o,
  // sample read-out
  output logic [1:0]        samp_ch_o,
  output logic [SAW-1:0]    samp_addr_o,
  input  logic [15:0]       samp_data_i
);

  logic       hit, hit1;
  logic [3:0] cidx;
  logic [15:0] hold;

  assign hit  = (bus_i.addr[7:4] == {1'b0, CARD_ID});
  assign cidx = bus_i.addr[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit1        <= 1'b0;
      hold        <= '0;
      rdata_o     <= '0;
      oe_o        <= 1'b0;
      start_o     <= 1'b0;
      samp_ch_o   <= '0;
      samp_addr_o <= '0;
      for (int c = 0; c < NCH; c++) gain_o[c] <= '0;
    end else begin
      start_o <= bus_i.wr && (bus_i.addr == ADDR_START);
      // read, first stage: select the cidx
      hit1 <= bus_i.rd && hit;
      if (bus_i.rd && hit) begin
        hold <= '0;
        if (cidx < 4'(NCH))
          hold <= rms_i[cidx[1:0]];
        else if (cidx >= CELL_PHASE0 && cidx < CELL_PHASE0 + 4'(NCH))
          hold <= phase_i[2'(cidx - CELL_PHASE0)];
        else if (cidx == CELL_STATUS)
          hold <= {14'd0, busy_i | start_o, done_i & ~start_o};  // a start in flight already counts
        else if (cidx == CELL_PERIOD)
          hold <= period_i;
        else if (cidx == CELL_SCHAN)
          hold <= {14'd0, samp_ch_o};
        else if (cidx == CELL_SADDR)
          hold <= 16'(samp_addr_o);
        else if (cidx == CELL_SDATA) begin
          hold        <= samp_data_i;
          samp_addr_o <= samp_addr_o + 1'b1;
        end
      end
      // read, second stage: drive the bus
      oe_o <= hit1;
      if (hit1) rdata_o <= hold;
      // writes
      if (bus_i.wr && hit) begin
        if (cidx < 4'(NCH)) gain_o[cidx[1:0]] <= bus_i.wdata[GAIN_W-1:0];
        else if (cidx == CELL_SCHAN) samp_ch_o <= bus_i.wdata[1:0];
        else if (cidx == CELL_SADDR) samp_addr_o <= bus_i.wdata[SAW-1:0];
      end
    end
  end

  // a read and a write never share a bus cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(bus_i.rd && bus_i.wr));

endmodule
