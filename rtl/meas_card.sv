// meas_card: the FPGA of one four-channel measuring card.
//
// Signal path per channel: the card's ADS8588 converter (read by one
// ads8588_ctrl for all channels at once) -> FIR smoothing (fir2) -> acquisition
// window (data_control) -> the channel's own 32768 x 16 sample RAM and, at the
// same time, the RMS unit (rms_calc). A phase_meter per channel times the
// channel's zero-crossing square wave against the excitation-current
// reference that comes from the motherboard. A broadcast start on the bus
// opens one window of N_SAMPLES samples on all channels; two clocks after its
// last sample the RMS values are ready, and the card latches RMS, phase delay
// and reference period into its bus cells and sets its done bit. The
// controller then reads them over the bus (card_bus_slave), and it can also
// read back the stored samples. The PGA gain code of each channel is set over
// the bus and driven to the analog front end.
//
// The chain, the per-channel RAMs of 32768 x 16 bit, the parallel RMS units
// and the bus window follow the device description; the single start
// broadcast, the done bit and the sample read-out are this design's own.
module meas_card
  import tomo_pkg::*;
#(
  parameter int         NCH        = 4,
  parameter logic [2:0] CARD_ID    = 3'd0,
  parameter int         N_SAMPLES  = 500,
  parameter int         RAM_DEPTH  = 32768,
  parameter int         SAMPLE_DIV = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  // shared bus
  input  bus_req_t          bus_i,
  output logic [15:0]       bus_rdata_o,
  output logic              bus_oe_o,
  // ADC pins
  output logic              adc_convst_o,
  output logic              adc_cs_n_o,
  output logic              adc_rd_n_o,
  input  logic              adc_busy_i,
  input  logic [15:0]       adc_db_i,
  // zero-crossing detectors
  input  logic              ref_zc_i,          // excitation current, from the motherboard
  input  logic [NCH-1:0]    sig_zc_i,          // each channel's voltage
  // analog front end control
  output logic [GAIN_W-1:0] pga_gain_o [NCH]
);

  localparam int SAW = $clog2(RAM_DEPTH);

  logic signed [15:0] adc_s [NCH];
  logic               adc_v;
  logic signed [15:0] fir_s [NCH];
  logic [NCH-1:0]     fir_v;

  logic               start;
  logic               ram_we;
  logic [SAW-1:0]     ram_waddr;
  logic               win_v, win_first, win_last, win_busy, win_done;

  logic [15:0]        rms   [NCH];
  logic [NCH-1:0]     rms_v;
  logic [15:0]        dly   [NCH];
  logic [15:0]        per   [NCH];
  logic [NCH-1:0]     ph_v;

  logic [15:0]        rms_l [NCH];
  logic [15:0]        dly_l [NCH];
  logic [15:0]        per_l;
  logic               done, busy;

  logic [1:0]         samp_ch;
  logic [SAW-1:0]     samp_addr;
  logic [15:0]        samp_rd [NCH];

  ads8588_ctrl #(.NCH(NCH), .SAMPLE_DIV(SAMPLE_DIV)) u_adc (
    .clk, .rst_n, .enable_i(1'b1),
    .adc_convst_o, .adc_cs_n_o, .adc_rd_n_o, .adc_busy_i, .adc_db_i,
    .sample_o(adc_s), .sample_valid_o(adc_v)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    fir2 u_fir (
      .clk, .rst_n, .in_valid(adc_v), .in_sample(adc_s[c]),
      .out_valid(fir_v[c]), .out_sample(fir_s[c])
    );
    sample_ram #(.W(16), .DEPTH(RAM_DEPTH)) u_ram (
      .clk, .we(ram_we), .waddr(ram_waddr), .wdata(fir_s[c]),
      .raddr(samp_addr), .rdata(samp_rd[c])
    );
    rms_calc #(.N_SAMPLES(N_SAMPLES)) u_rms (
      .clk, .rst_n, .valid_i(win_v), .first_i(win_first), .last_i(win_last),
      .sample_i(fir_s[c]), .rms_o(rms[c]), .valid_o(rms_v[c])
    );
    phase_meter #(.CNT_W(16)) u_ph (
      .clk, .rst_n, .ref_zc_i, .sig_zc_i(sig_zc_i[c]),
      .delay_o(dly[c]), .period_o(per[c]), .valid_o(ph_v[c])
    );
  end

  data_control #(.N_SAMPLES(N_SAMPLES), .DEPTH(RAM_DEPTH)) u_dc (
    .clk, .rst_n, .start_i(start), .in_valid_i(fir_v[0]),
    .ram_we_o(ram_we), .ram_waddr_o(ram_waddr),
    .win_valid_o(win_v), .win_first_o(win_first), .win_last_o(win_last),
    .busy_o(win_busy), .done_o(win_done)
  );

  // the channels share one converter and one window, so they run in step
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (fir_v == {NCH{fir_v[0]}}) else $error("channel filters out of step");
      assert (rms_v == {NCH{rms_v[0]}}) else $error("RMS units out of step");
    end
  end

  // result latch: all RMS units finish together, two clocks after the window
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      busy  <= 1'b0;
      per_l <= '0;
      for (int c = 0; c < NCH; c++) begin
        rms_l[c] <= '0;
        dly_l[c] <= '0;
      end
    end else begin
      if (start) begin
        done <= 1'b0;
        busy <= 1'b1;
      end else if (rms_v[0]) begin
        done  <= 1'b1;
        busy  <= 1'b0;
        per_l <= per[0];
        for (int c = 0; c < NCH; c++) begin
          rms_l[c] <= rms[c];
          dly_l[c] <= dly[c];
        end
      end
    end
  end

  card_bus_slave #(.NCH(NCH), .CARD_ID(CARD_ID), .SAW(SAW)) u_bus (
    .clk, .rst_n, .bus_i, .rdata_o(bus_rdata_o), .oe_o(bus_oe_o),
    .rms_i(rms_l), .phase_i(dly_l), .period_i(per_l), .done_i(done), .busy_i(busy),
    .gain_o(pga_gain_o), .start_o(start),
    .samp_ch_o(samp_ch), .samp_addr_o(samp_addr), .samp_data_i(samp_rd[samp_ch])
  );

endmodule
