// fir2: small FIR filter that partially smooths one channel's ADC samples
// before they are stored and measured.
//
// A TAPS-long delay line advances on every in_valid; the output is the sum of
// COEF[k] * x[n-k], arithmetically shifted right by SHIFT and saturated to 16
// bits. It is registered, so out_valid follows in_valid by one clock. The
// defaults are the 3-tap binomial low-pass [1 2 1]/4 (unity gain at DC, a zero
// at half the sample rate). The device description only names the filter; the
// taps, the gain and the latency are this design's own choice.
module fir2 #(
  parameter int TAPS       = 3,
  parameter int COEF[TAPS] = '{1, 2, 1},
  parameter int SHIFT      = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [15:0] in_sample,
  output logic               out_valid,
  output logic signed [15:0] out_sample
);

  logic signed [15:0] dly [TAPS];   // dly[0] is the newest sample
  logic signed [39:0] acc;

  always_comb begin
    acc = 40'(in_sample) * 40'(COEF[0]);
    for (int k = 1; k < TAPS; k++) acc += 40'(dly[k-1]) * 40'(COEF[k]);
    acc = acc >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dly[k] <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dly[0] <= in_sample;
        for (int k = 1; k < TAPS; k++) dly[k] <= dly[k-1];
        if (acc > 40'sd32767)       out_sample <= 16'sh7FFF;
        else if (acc < -40'sd32768) out_sample <= 16'sh8000;
        else                        out_sample <= acc[15:0];
      end
    end
  end

endmodule
