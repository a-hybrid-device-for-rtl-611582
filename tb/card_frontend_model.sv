// card_frontend_model: behavioural model of a measuring card's analog side,
// for testbenches only. Channel c sees the voltage
// amp[c] * sin(2*pi*t/PER - ph[c]) (in ADC codes, t in clocks): it is
// converted by an ADS8588-class ADC model, and its sign is the channel's
// zero-crossing square wave. The excitation current's reference square wave
// is sin(2*pi*t/PER) >= 0, produced by the testbench.
module card_frontend_model #(
  parameter int NCH = 4,
  parameter int PER = 5000
) (
  input  logic           clk,
  input  longint         t,
  input  int             amp   [NCH],
  input  real            ph_deg[NCH],
  input  logic           convst,
  input  logic           cs_n,
  input  logic           rd_n,
  output logic           busy,
  output logic [15:0]    db,
  output logic [NCH-1:0] sig_zc
);
  logic signed [15:0] ain [8];
  logic frst;
  real  w;

  always_comb begin
    for (int i = 0; i < 8; i++) ain[i] = '0;
    for (int c = 0; c < NCH; c++) begin
      w = $sin(2.0 * 3.14159265358979 * (real'(t % PER) / real'(PER) - ph_deg[c] / 360.0));
      ain[c]    = 16'($rtoi(real'(amp[c]) * w));
      sig_zc[c] = (w >= 0.0);
    end
  end

  ads8588_model adc (.clk, .convst, .cs_n, .rd_n, .ain, .busy, .frstdata(frst), .db);
endmodule
