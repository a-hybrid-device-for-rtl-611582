// tb_meas_card: one measuring card (id 2) with its analog side modelled.
// Short windows (50 samples at 500 kSPS, so the excitation is 10 kHz and one
// window is one period) keep the run short. Over the bus it sets the gain
// codes, starts two measurements with different amplitudes and phases, polls
// the done bit and checks RMS (amp / sqrt(2), less the small FIR loss at this
// frequency), phase delay (ph / 360 * period clocks), period, the time from
// start to done, and the stored samples read back through the sample cells.
module tb_meas_card;
  import tomo_pkg::*;
  localparam int NCH = 4, N = 50, DIV = 100, PER = N * DIV;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint t = 0;
  always @(posedge clk) t <= t + 1;

  bus_req_t bus;
  logic [15:0] rd;
  logic oe;
  logic convst, cs_n, rd_n, busy;
  logic [15:0] db;
  logic [NCH-1:0] szc;
  logic rzc;
  logic [GAIN_W-1:0] gain [NCH];
  int  amp [NCH];
  real ph [NCH];
  int checks = 0, failures = 0;

  assign rzc = (t % PER) < PER / 2;   // sin(2 pi t / PER) >= 0

  meas_card #(.NCH(NCH), .CARD_ID(3'd2), .N_SAMPLES(N), .RAM_DEPTH(1024), .SAMPLE_DIV(DIV)) dut (
    .clk, .rst_n, .bus_i(bus), .bus_rdata_o(rd), .bus_oe_o(oe),
    .adc_convst_o(convst), .adc_cs_n_o(cs_n), .adc_rd_n_o(rd_n), .adc_busy_i(busy), .adc_db_i(db),
    .ref_zc_i(rzc), .sig_zc_i(szc), .pga_gain_o(gain));
  card_frontend_model #(.NCH(NCH), .PER(PER)) fe (
    .clk, .t, .amp, .ph_deg(ph), .convst, .cs_n, .rd_n, .busy, .db, .sig_zc(szc));

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic bus_wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); bus = '{addr: a, wdata: d, wr: 1'b1, rd: 1'b0};
    @(negedge clk); bus.wr = 0;
  endtask
  task automatic bus_rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk); bus = '{addr: a, wdata: '0, wr: 1'b0, rd: 1'b1};
    @(negedge clk); bus.rd = 0;
    @(negedge clk); d = rd;
    chk(oe, "oe in second clock");
  endtask

  task automatic measure(input int a0);
    logic [15:0] d;
    longint t0;
    real exp_rms, fir_gain, sum;
    int mx;
    for (int c = 0; c < NCH; c++) begin
      amp[c] = a0 + 2500 * c;
      ph[c]  = 15.0 + 40.0 * c;
    end
    repeat (3 * PER) @(posedge clk);     // let the phase meters see the new wave
    bus_wr(ADDR_START, 0);
    t0 = t;
    bus_rd(8'h28, d);
    chk(d == 16'h0002, $sformatf("busy after start: %h", d));
    do bus_rd(8'h28, d); while (d[0] == 0);
    chk(t - t0 <= (N + 2) * DIV + 20 && t - t0 >= (N - 1) * DIV, $sformatf("window time %0d", t - t0));
    fir_gain = $cos(3.14159265358979 / N) ** 2;
    for (int c = 0; c < NCH; c++) begin
      exp_rms = real'(amp[c]) / $sqrt(2.0) * fir_gain;
      bus_rd({4'h2, 4'(c)}, d);
      chk(fabs(real'(d) - exp_rms) < 0.01 * exp_rms + 3, $sformatf("rms ch%0d %0d exp %0.1f", c, d, exp_rms));
      bus_rd({4'h2, 4'(4 + c)}, d);
      chk(fabs(real'(d) - ph[c] / 360.0 * PER) <= 3.0, $sformatf("phase ch%0d %0d exp %0.1f", c, d, ph[c] / 360.0 * PER));
    end
    bus_rd(8'h29, d);
    chk(d >= PER - 1 && d <= PER + 1, $sformatf("period %0d", d));
    // stored samples of channel 3: their RMS and peak
    bus_wr(8'h2C, 16'd3);
    bus_wr(8'h2D, 16'd0);
    repeat (2) @(negedge clk);
    sum = 0; mx = 0;
    for (int i = 0; i < N; i++) begin
      bus_rd(8'h2E, d);
      sum += real'(signed'(d)) ** 2;
      if (int'(signed'(d)) > mx) mx = int'(signed'(d));
    end
    exp_rms = real'(amp[3]) / $sqrt(2.0) * fir_gain;
    chk(fabs($sqrt(sum / N) - exp_rms) < 0.01 * exp_rms + 3, $sformatf("stored rms %0.1f", $sqrt(sum / N)));
    chk(mx <= amp[3] && mx > amp[3] * 0.97, $sformatf("stored peak %0d", mx));
  endtask

  initial begin
    logic [15:0] d;
    bus = '0;
    for (int c = 0; c < NCH; c++) begin amp[c] = 0; ph[c] = 0.0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCH; c++) bus_wr({4'h2, 4'(c)}, 16'(7 - c));
    for (int c = 0; c < NCH; c++) chk(gain[c] == GAIN_W'(7 - c), "gain");
    bus_rd(8'h28, d);
    chk(d == 16'h0000, "idle status");
    measure(4000);
    measure(12000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * PER) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
