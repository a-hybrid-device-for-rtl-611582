// data_control: acquisition window of one measuring card.
//
// A start pulse arms the block; the next N_SAMPLES valid sample sets (one
// sample per channel, all taken at the same instant) form the window. Each
// sample of the window is written to its channel's RAM at address 0, 1, ...
// N_SAMPLES-1: the block drives the shared address and write strobe of the
// channel RAMs, whose data inputs take the sample set directly. For every
// windowed sample the block also raises win_valid_o, with win_first_o on the
// first and win_last_o on the last, so that the RMS units can accumulate while
// the data is being collected. done_o pulses in the clock after the last
// sample is written; busy_o is high from the start pulse until then. A start
// pulse during a window restarts it.
//
// Writing each channel's data to its own RAM and starting the RMS work with
// the collection follows the device description. The window length default of
// 500 samples, one period of the 1 kHz excitation at 500 kSPS, is derived from
// its figures; the strobe protocol is this design's own.
module data_control #(
  parameter int N_SAMPLES = 500,
  parameter int DEPTH     = 32768,
  localparam int AW       = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  logic               in_valid_i,
  // channel RAM write port (shared address and strobe; the data is the
  // sample set itself)
  output logic               ram_we_o,
  output logic [AW-1:0]      ram_waddr_o,
  // window strobes, aligned with ram_we_o
  output logic               win_valid_o,
  output logic               win_first_o,
  output logic               win_last_o,
  output logic               busy_o,
  output logic               done_o
);

  initial assert (N_SAMPLES >= 1 && N_SAMPLES <= DEPTH);

  logic [AW:0] idx;
  logic        armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed  <= 1'b0;
      idx    <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i) begin
        armed <= 1'b1;
        idx   <= '0;
      end else if (armed && in_valid_i) begin
        if (idx == (AW+1)'(N_SAMPLES - 1)) begin
          armed  <= 1'b0;
          done_o <= 1'b1;
        end
        idx <= idx + 1'b1;
      end
    end
  end

  always_comb begin
    win_valid_o = armed && in_valid_i && !start_i;
    win_first_o = win_valid_o && (idx == '0);
    win_last_o  = win_valid_o && (idx == (AW+1)'(N_SAMPLES - 1));
    ram_we_o    = win_valid_o;
    ram_waddr_o = idx[AW-1:0];
  end

  assign busy_o = armed;

endmodule
