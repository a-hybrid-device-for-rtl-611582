// current_source: the motherboard FPGA that forces the excitation current.
//
// It synthesises the excitation waveform for the signal DAC (dds_synth),
// reads the measured current through its own ADS8588-class converter
// (ads8588_ctrl, first channel) and closes the amplitude loop
// (current_regulator) that drives the amplitude DAC. It also drives the
// electrode multiplexer: for pair index p the current is forced from
// electrode p into electrode (p + 1) mod NELEC, the adjacent pattern. On the
// shared bus it answers at 0x80..0x8F: writes set the pair, the current
// set point and the excitation shape (each restarts the regulation), reads
// return these, the status (bit 0: current correct), the last current RMS
// and the amplitude code. Reads have
// the same two-clock latency and output enable as the measuring cards.
//
// Two DACs (signal and amplitude), the FPGA feedback loop, the electrode
// multiplexer and its control from this board, and a selectable excitation
// shape, follow the device description; the register map, the adjacent pattern and the choice of
// current converter are this design's own.
module current_source
  import tomo_pkg::*;
#(
  parameter int NELEC      = 32,
  parameter int N_SAMPLES  = 500,
  parameter int SAMPLE_DIV = 100,
  parameter int DAC_W      = 12,
  parameter logic [31:0] FTW = 32'd85899    // 1 kHz at 50 MHz
) (
  input  logic              clk,
  input  logic              rst_n,
  // shared bus
  input  bus_req_t          bus_i,
  output logic [15:0]       bus_rdata_o,
  output logic              bus_oe_o,
  // current-measuring ADC pins
  output logic              adc_convst_o,
  output logic              adc_cs_n_o,
  output logic              adc_rd_n_o,
  input  logic              adc_busy_i,
  input  logic [15:0]       adc_db_i,
  // DACs
  output logic [DAC_W-1:0]  dac_sig_o,
  output logic [DAC_W-1:0]  dac_amp_o,
  // electrode multiplexer
  output logic [$clog2(NELEC)-1:0] src_sel_o,
  output logic [$clog2(NELEC)-1:0] snk_sel_o,
  // status
  output logic              current_ok_o
);

  localparam int EW = $clog2(NELEC);

  logic [EW-1:0]      pair;
  logic [15:0]        setpoint;
  logic [1:0]         shape;
  logic               restart;
  logic signed [15:0] i_s [1];
  logic               i_v;
  logic [15:0]        irms;

  logic               hit1;
  logic [15:0]        hold;

  dds_synth #(.DAC_W(DAC_W)) u_dds (
    .clk, .rst_n, .en_i(1'b1), .ftw_i(FTW), .shape_i(shape), .dac_o(dac_sig_o), .wrap_o()
  );

  ads8588_ctrl #(.NCH(1), .SAMPLE_DIV(SAMPLE_DIV)) u_adc (
    .clk, .rst_n, .enable_i(1'b1),
    .adc_convst_o, .adc_cs_n_o, .adc_rd_n_o, .adc_busy_i, .adc_db_i,
    .sample_o(i_s), .sample_valid_o(i_v)
  );

  current_regulator #(.N_SAMPLES(N_SAMPLES), .AMP_W(DAC_W)) u_reg (
    .clk, .rst_n, .restart_i(restart), .setpoint_i(setpoint),
    .sample_valid_i(i_v), .sample_i(i_s[0]),
    .amp_o(dac_amp_o), .irms_o(irms), .irms_valid_o(), .ok_o(current_ok_o),
    .adjust_o()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair        <= '0;
      setpoint    <= '0;
      shape       <= '0;
      restart     <= 1'b0;
      hit1        <= 1'b0;
      hold        <= '0;
      bus_rdata_o <= '0;
      bus_oe_o    <= 1'b0;
    end else begin
      restart <= 1'b0;
      if (bus_i.wr && bus_i.addr == ADDR_CS_PAIR) begin
        pair    <= EW'(bus_i.wdata);
        restart <= 1'b1;
      end
      if (bus_i.wr && bus_i.addr == ADDR_CS_SETPT) begin
        setpoint <= bus_i.wdata;
        restart  <= 1'b1;
      end
      if (bus_i.wr && bus_i.addr == ADDR_CS_SHAPE) begin
        shape    <= bus_i.wdata[1:0];
        restart  <= 1'b1;
      end
      hit1 <= bus_i.rd && bus_i.addr[7:4] == ADDR_CS_PAIR[7:4];
      if (bus_i.rd) begin
        unique case (bus_i.addr)
          ADDR_CS_PAIR:   hold <= 16'(pair);
          ADDR_CS_SETPT:  hold <= setpoint;
          ADDR_CS_STATUS: hold <= {15'd0, current_ok_o & ~restart};
          ADDR_CS_IRMS:   hold <= irms;
          ADDR_CS_AMP:    hold <= 16'(dac_amp_o);
          ADDR_CS_SHAPE:  hold <= 16'(shape);
          default:        hold <= '0;
        endcase
      end
      bus_oe_o <= hit1;
      if (hit1) bus_rdata_o <= hold;
    end
  end

  assign src_sel_o = pair;
  assign snk_sel_o = (pair == EW'(NELEC - 1)) ? '0 : pair + 1'b1;

endmodule
