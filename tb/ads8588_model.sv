// ads8588_model: behavioural model of an ADS8588-class 8-channel, 16-bit
// simultaneous-sampling ADC on its parallel interface, for testbenches only.
//
// A rising CONVST (seen on a clock edge) samples all eight analog inputs
// (given here as ideal 16-bit codes) and raises BUSY for T_CONV clocks. While
// CS# is low, each falling RD# puts the next channel's code on DB, starting
// with channel 0 (FRSTDATA marks it). The timing is clock-based, not the
// part's nanosecond data-sheet figures.
module ads8588_model #(
  parameter int T_CONV = 40
) (
  input  logic               clk,
  input  logic               convst,
  input  logic               cs_n,
  input  logic               rd_n,
  input  logic signed [15:0] ain [8],
  output logic               busy,
  output logic               frstdata,
  output logic [15:0]        db
);

  logic        convst_q = 1'b0;
  logic        rd_q     = 1'b1;
  int          cnt      = 0;
  int          idx      = 0;
  logic [15:0] lat [8];

  initial begin
    busy     = 1'b0;
    frstdata = 1'b0;
    db       = '0;
  end

  always @(posedge clk) begin
    convst_q <= convst;
    rd_q     <= rd_n;
    if (convst && !convst_q) begin
      for (int i = 0; i < 8; i++) lat[i] <= ain[i];
      busy <= 1'b1;
      cnt  <= T_CONV;
      idx  <= 0;
    end else if (busy) begin
      if (cnt == 0) busy <= 1'b0;
      else          cnt  <= cnt - 1;
    end
    if (!cs_n && rd_q && !rd_n) begin
      db       <= lat[idx % 8];
      frstdata <= (idx == 0);
      idx      <= idx + 1;
    end
  end

endmodule
