// current_regulator: digital feedback loop that holds the excitation current
// at its set point by adjusting the amplitude DAC.
//
// The current-measuring ADC delivers samples (sample_valid_i); they are
// grouped into back-to-back windows of N_SAMPLES (one excitation period by
// default) and a rms_calc gives each window's current RMS. After every window
// the error e = setpoint - rms moves the amplitude code by e >>> KSHIFT (at
// least one code towards the set point), clamped to the DAC range; this is an
// integrating controller. When |e| <= TOL for OK_WINDOWS windows in a row the
// current is declared correct (ok_o) until a window falls outside TOL.
// restart_i (a new electrode pair or set point) clears ok_o and the window,
// but keeps the amplitude, which is normally a good starting point for the
// next pair.
//
// The RMS measurement of the current, the DAC-amplitude feedback loop inside
// the FPGA and the check of the current's correctness before a measurement
// follow the device description; the control law, the tolerance and the
// number of confirming windows are this design's own.
module current_regulator #(
  parameter int N_SAMPLES  = 500,
  parameter int AMP_W      = 12,
  parameter int AMP_INIT   = 256,
  parameter int KSHIFT     = 1,
  parameter int TOL        = 16,
  parameter int OK_WINDOWS = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart_i,
  input  logic [15:0]        setpoint_i,
  input  logic               sample_valid_i,
  input  logic signed [15:0] sample_i,
  output logic [AMP_W-1:0]   amp_o,
  output logic [15:0]        irms_o,
  output logic               irms_valid_o,
  output logic               ok_o,
  output logic               adjust_o      // one clock: the amplitude was changed
);

  localparam int IW = $clog2(N_SAMPLES + 1);
  localparam int OW = $clog2(OK_WINDOWS + 1);
  localparam logic [AMP_W-1:0] AMP_MAX = '1;

  logic [IW-1:0] idx;
  logic          first, last;
  logic [OW-1:0] okcnt;
  logic signed [17:0] err, step;
  logic signed [AMP_W+2:0] amp_new;

  assign first = (idx == '0);
  assign last  = (idx == IW'(N_SAMPLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idx <= '0;
    else if (restart_i) idx <= '0;
    else if (sample_valid_i) idx <= last ? '0 : idx + 1'b1;
  end

  rms_calc #(.N_SAMPLES(N_SAMPLES)) u_rms (
    .clk, .rst_n, .valid_i(sample_valid_i && !restart_i), .first_i(first), .last_i(last),
    .sample_i, .rms_o(irms_o), .valid_o(irms_valid_o)
  );

  always_comb begin
    err  = 18'(signed'({1'b0, setpoint_i})) - 18'(signed'({1'b0, irms_o}));
    step = err >>> KSHIFT;
    if (step == 0) step = (err > 0) ? 18'sd1 : -18'sd1;
    amp_new = (AMP_W+3)'(signed'({1'b0, amp_o})) + (AMP_W+3)'(step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      amp_o    <= AMP_W'(AMP_INIT);
      okcnt    <= '0;
      ok_o     <= 1'b0;
      adjust_o <= 1'b0;
    end else begin
      adjust_o <= 1'b0;
      if (restart_i) begin
        okcnt <= '0;
        ok_o  <= 1'b0;
      end else if (irms_valid_o) begin
        if (err <= 18'(TOL) && err >= -18'(TOL)) begin
          if (okcnt != OW'(OK_WINDOWS)) okcnt <= okcnt + 1'b1;
          if (okcnt >= OW'(OK_WINDOWS - 1)) ok_o <= 1'b1;
        end else begin
          okcnt    <= '0;
          ok_o     <= 1'b0;
          adjust_o <= 1'b1;
          if (amp_new < 0)                                  amp_o <= '0;
          else if (amp_new > (AMP_W+3)'(signed'({1'b0, AMP_MAX}))) amp_o <= AMP_MAX;
          else                                              amp_o <= amp_new[AMP_W-1:0];
        end
      end
    end
  end

endmodule
