// tomo_pkg: sizes, the shared-bus address map and the bus request type of the
// hybrid EIT acquisition device.
//
// The device is a set of FPGAs on one parallel bus: eight measuring cards of
// four channels each (32 electrodes), a motherboard current source, and a data
// controller that is the only bus master. Address bits [6:4] select a card and
// bits [3:0] a 16-bit cell inside it, so the cards together look like one
// 128-word RAM; bit 7 is unused by the cards. The use of bit 7 for the current
// source, the cell numbering and the broadcast start address are this design's
// own choices.
package tomo_pkg;

  localparam int ADDR_W      = 8;     // address bus width
  localparam int DATA_W      = 16;    // data bus width
  localparam int CELL_BITS   = 4;     // address bits that select a cell of a card
  localparam int CARD_BITS   = 3;     // address bits that select a card
  localparam int SAMPLE_W    = 16;    // ADC sample width (ADS8588: 16 bit)
  localparam int GAIN_W      = 3;     // PGA gain code width

  // Card cells, read side: results of the last measurement.
  localparam logic [3:0] CELL_RMS0    = 4'd0;   // cells 0..3: RMS of channel 0..3
  localparam logic [3:0] CELL_PHASE0  = 4'd4;   // cells 4..7: zero-crossing delay of channel 0..3
  localparam logic [3:0] CELL_STATUS  = 4'd8;   // bit0 done, bit1 busy
  localparam logic [3:0] CELL_PERIOD  = 4'd9;   // excitation period in clock ticks
  // Card cells, write side.
  localparam logic [3:0] CELL_GAIN0   = 4'd0;   // cells 0..3: PGA gain code of channel 0..3
  localparam logic [3:0] CELL_SCHAN   = 4'd12;  // sample read-out: channel select
  localparam logic [3:0] CELL_SADDR   = 4'd13;  // sample read-out: RAM address
  localparam logic [3:0] CELL_SDATA   = 4'd14;  // read: sample at the read-out address, then address+1

  // Broadcast write: every card starts a measurement.
  localparam logic [7:0] ADDR_START   = 8'hFF;

  // Motherboard current source registers.
  localparam logic [7:0] ADDR_CS_PAIR   = 8'h80; // write: excitation electrode pair index
  localparam logic [7:0] ADDR_CS_SETPT  = 8'h81; // write: current RMS set point (ADC codes)
  localparam logic [7:0] ADDR_CS_STATUS = 8'h82; // read: bit0 current correct
  localparam logic [7:0] ADDR_CS_IRMS   = 8'h83; // read: last measured current RMS
  localparam logic [7:0] ADDR_CS_AMP    = 8'h84; // read: amplitude DAC code
  localparam logic [7:0] ADDR_CS_SHAPE  = 8'h85; // write/read: excitation shape (0 sine, 1 triangle, 2 square)

  // One bus cycle as driven by the master. wr and rd are one-clock strobes.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic              wr;
    logic              rd;
  } bus_req_t;

  // Integer square root, floor(sqrt(v)), bit by bit.
  function automatic logic [31:0] isqrt64(input logic [63:0] v);
    logic [63:0] rem;
    logic [63:0] root;
    logic [63:0] bitv;
    rem  = v;
    root = '0;
    bitv = 64'd1 << 62;
    for (int i = 0; i < 32; i++) begin
      if (rem >= root + bitv) begin
        rem  = rem - (root + bitv);
        root = (root >> 1) + bitv;
      end else begin
        root = root >> 1;
      end
      bitv = bitv >> 2;
    end
    return root[31:0];
  endfunction

endpackage
