// dds_synth: excitation waveform synthesis for the signal DAC.
//
// A PHASE_W-bit phase accumulator advances by ftw_i every clock. shape_i
// selects the waveform, all of peak A = 2**(DAC_W-1)-1 and all starting at
// zero and rising at phase 0:
//   0 (and 3) sine: the top LUT_BITS phase bits index a table of
//     2**LUT_BITS entries computed at elaboration,
//     round(A * sin(2*pi*i/2**LUT_BITS));
//   1 triangle: in each quarter period the next DAC_W-1 phase bits f give
//     +f, +(A-f), -f, -(A-f);
//   2 square: +A in the first half period, -A in the second.
// The signed value is offset to the DAC's unsigned code (mid-scale is zero). The output is
// registered, one clock after the phase. wrap_o pulses on the clock where the
// accumulator wraps, i.e. once per excitation period. With the 50 MHz clock,
// FTW_1KHZ = round(2**32 * 1 kHz / 50 MHz) gives the 1 kHz excitation of the
// device description. The amplitude is not set here: the second
// (amplitude) DAC scales this signal.
//
// A generated signal shape, a choice of shapes, a separate amplitude DAC and
// the 1 kHz frequency follow the device description; the table method, the
// sizes and the particular three shapes are this design's own.
module dds_synth #(
  parameter int PHASE_W  = 32,
  parameter int LUT_BITS = 8,
  parameter int DAC_W    = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en_i,
  input  logic [PHASE_W-1:0] ftw_i,
  input  logic [1:0]         shape_i,
  output logic [DAC_W-1:0]   dac_o,
  output logic               wrap_o
);

  localparam int NLUT = 2 ** LUT_BITS;

  typedef logic signed [DAC_W-1:0] lut_t [NLUT];

  function automatic lut_t make_lut();
    lut_t t;
    real  a;
    for (int i = 0; i < NLUT; i++) begin
      a    = $sin(2.0 * 3.14159265358979 * real'(i) / real'(NLUT)) * real'(2 ** (DAC_W - 1) - 1);
      t[i] = DAC_W'($rtoi(a >= 0.0 ? a + 0.5 : a - 0.5));
    end
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [PHASE_W-1:0] phase, phase_next;
  logic               carry;

  localparam logic signed [DAC_W-1:0] PEAK = DAC_W'(2 ** (DAC_W - 1) - 1);

  logic signed [DAC_W-1:0] sine, tri_v, wave;
  logic        [DAC_W-2:0] frac;

  assign {carry, phase_next} = {1'b0, phase} + {1'b0, ftw_i};

  always_comb begin
    sine  = LUT[phase[PHASE_W-1 -: LUT_BITS]];
    frac  = phase[PHASE_W-3 -: DAC_W-1];
    tri_v = phase[PHASE_W-2] ? PEAK - signed'({1'b0, frac}) : signed'({1'b0, frac});
    if (phase[PHASE_W-1]) tri_v = -tri_v;
    unique case (shape_i)
      2'd1:    wave = tri_v;
      2'd2:    wave = phase[PHASE_W-1] ? -PEAK : PEAK;
      default: wave = sine;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      dac_o  <= DAC_W'(2 ** (DAC_W - 1));
      wrap_o <= 1'b0;
    end else if (en_i) begin
      phase  <= phase_next;
      wrap_o <= carry;
      dac_o  <= unsigned'(wave) ^ {1'b1, {(DAC_W-1){1'b0}}};
    end else begin
      wrap_o <= 1'b0;
      dac_o  <= DAC_W'(2 ** (DAC_W - 1));
    end
  end

endmodule
