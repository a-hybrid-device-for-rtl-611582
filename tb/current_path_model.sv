// current_path_model: behavioural model of the motherboard's analog current
// path, for testbenches only. The excitation current, in ADC codes, is
// amp_code * gain / 64 * sin(2*pi*t/PER): the amplitude DAC scales the
// synthesised sine and the load (gain, set by the testbench per electrode
// pair) scales the current. It is converted by an ADS8588-class ADC model on
// channel 0, and its sign is the current's zero-crossing square wave that is
// sent to the measuring cards as the phase reference.
module current_path_model #(
  parameter int PER   = 5000,
  parameter int DAC_W = 12
) (
  input  logic             clk,
  input  longint           t,
  input  logic [DAC_W-1:0] amp_code,
  input  int               gain,
  input  logic             convst,
  input  logic             cs_n,
  input  logic             rd_n,
  output logic             busy,
  output logic [15:0]      db,
  output logic             ref_zc
);
  logic signed [15:0] ain [8];
  logic frst;
  real  w, a;

  always_comb begin
    for (int i = 0; i < 8; i++) ain[i] = '0;
    w = $sin(2.0 * 3.14159265358979 * real'(t % PER) / real'(PER));
    a = real'(amp_code) * real'(gain) / 64.0;
    if (a > 32767.0) a = 32767.0;
    ain[0] = 16'($rtoi(a * w));
    ref_zc = (w >= 0.0);
  end

  ads8588_model adc (.clk, .convst, .cs_n, .rd_n, .ain, .busy, .frstdata(frst), .db);
endmodule
