// hybrid_top: the digital part of the hybrid electrical-tomography
// acquisition device.
//
// NCARDS measuring cards (meas_card, NCH electrodes each), the motherboard
// current source (current_source) and the data controller (data_controller)
// share one parallel bus: an 8-bit address, 16-bit data, and read and write
// strobes, all on one clock. The controller is the only master. Each slave
// drives the data lines only in the clock where it answers a read (its
// output enable); here the shared lines are an OR of the enabled outputs,
// which is what the tri-state bus of the boards amounts to inside one
// design, and an assertion checks that no two slaves drive at once.
//
// Everything analog stays outside as ports: the ADCs of the cards and of the
// current source, the zero-crossing comparators (the current's reference
// square wave goes to every card), the PGA gain codes, the two DACs and the
// electrode multiplexer selects. The processor side (ready flag, frame read
// port, acknowledge, and the run, set point, excitation shape and
// per-electrode gain configuration) is brought out for the SoC's hard
// processor; the controller writes the gains into the cards and the shape
// into the current source over the bus before every frame.
//
// With the defaults (8 cards x 4 channels, 500 samples per window at
// 500 kSPS, 50 MHz clock) one frame of 32 electrode pairs takes about 32 ms
// plus the current settling time per pair.
module hybrid_top
  import tomo_pkg::*;
#(
  parameter int NCARDS     = 8,
  parameter int NCH        = 4,
  parameter int N_SAMPLES  = 500,
  parameter int RAM_DEPTH  = 32768,
  parameter int SAMPLE_DIV = 100,
  parameter int DAC_W      = 12,
  localparam int NELEC     = NCARDS * NCH,
  localparam int EW        = $clog2(NELEC),
  localparam int FAW       = 2 * EW + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run_i,
  input  logic [15:0]             setpoint_i,
  input  logic [GAIN_W-1:0]       gain_cfg_i [NELEC],
  input  logic [1:0]              shape_i,
  // measuring cards: ADC pins
  output logic [NCARDS-1:0]       card_adc_convst_o,
  output logic [NCARDS-1:0]       card_adc_cs_n_o,
  output logic [NCARDS-1:0]       card_adc_rd_n_o,
  input  logic [NCARDS-1:0]       card_adc_busy_i,
  input  logic [15:0]             card_adc_db_i [NCARDS],
  // measuring cards: zero-crossing detectors and PGA gains
  input  logic [NELEC-1:0]        sig_zc_i,
  input  logic                    ref_zc_i,
  output logic [GAIN_W-1:0]       pga_gain_o [NELEC],
  // current source
  output logic                    cs_adc_convst_o,
  output logic                    cs_adc_cs_n_o,
  output logic                    cs_adc_rd_n_o,
  input  logic                    cs_adc_busy_i,
  input  logic [15:0]             cs_adc_db_i,
  output logic [DAC_W-1:0]        dac_sig_o,
  output logic [DAC_W-1:0]        dac_amp_o,
  output logic [EW-1:0]           src_sel_o,
  output logic [EW-1:0]           snk_sel_o,
  output logic                    current_ok_o,
  // processor side
  input  logic [FAW-1:0]          hps_addr_i,
  output logic [15:0]             hps_rdata_o,
  output logic                    data_ready_o,
  input  logic                    hps_ack_i,
  output logic [15:0]             frame_count_o,
  output logic                    busy_o
);

  bus_req_t          bus;
  logic [15:0]       bus_data;
  logic [15:0]       s_rdata [NCARDS + 1];
  logic [NCARDS:0]   s_oe;

  for (genvar k = 0; k < NCARDS; k++) begin : g_card
    logic [GAIN_W-1:0] gain [NCH];
    meas_card #(
      .NCH(NCH), .CARD_ID(3'(k)), .N_SAMPLES(N_SAMPLES),
      .RAM_DEPTH(RAM_DEPTH), .SAMPLE_DIV(SAMPLE_DIV)
    ) u_card (
      .clk, .rst_n,
      .bus_i(bus), .bus_rdata_o(s_rdata[k]), .bus_oe_o(s_oe[k]),
      .adc_convst_o(card_adc_convst_o[k]), .adc_cs_n_o(card_adc_cs_n_o[k]),
      .adc_rd_n_o(card_adc_rd_n_o[k]), .adc_busy_i(card_adc_busy_i[k]),
      .adc_db_i(card_adc_db_i[k]),
      .ref_zc_i, .sig_zc_i(sig_zc_i[k*NCH +: NCH]),
      .pga_gain_o(gain)
    );
    for (genvar c = 0; c < NCH; c++) begin : g_gain
      assign pga_gain_o[k*NCH + c] = gain[c];
    end
  end

  current_source #(
    .NELEC(NELEC), .N_SAMPLES(N_SAMPLES), .SAMPLE_DIV(SAMPLE_DIV), .DAC_W(DAC_W)
  ) u_cs (
    .clk, .rst_n,
    .bus_i(bus), .bus_rdata_o(s_rdata[NCARDS]), .bus_oe_o(s_oe[NCARDS]),
    .adc_convst_o(cs_adc_convst_o), .adc_cs_n_o(cs_adc_cs_n_o), .adc_rd_n_o(cs_adc_rd_n_o),
    .adc_busy_i(cs_adc_busy_i), .adc_db_i(cs_adc_db_i),
    .dac_sig_o, .dac_amp_o, .src_sel_o, .snk_sel_o, .current_ok_o
  );

  data_controller #(.NCARDS(NCARDS), .NCH(NCH)) u_ctl (
    .clk, .rst_n, .run_i, .setpoint_i, .gain_i(gain_cfg_i), .shape_i,
    .bus_o(bus), .bus_rdata_i(bus_data),
    .hps_addr_i, .hps_rdata_o, .data_ready_o, .hps_ack_i, .frame_count_o, .busy_o
  );

  // shared data lines: only the enabled slave contributes
  always_comb begin
    bus_data = '0;
    for (int k = 0; k <= NCARDS; k++) if (s_oe[k]) bus_data |= s_rdata[k];
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_oe));

endmodule
