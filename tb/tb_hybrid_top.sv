// tb_hybrid_top: end-to-end test of the whole device at reduced size: two
// cards of four channels (8 electrodes, 8 pairs), 50-sample windows at
// 500 kSPS (10 kHz excitation), two complete frames so that both frame banks
// and the acknowledge are used. The checks are in hybrid_tb_body.svh.
module tb_hybrid_top;
  localparam int     NCARDS     = 2;
  localparam int     NCH        = 4;
  localparam int     N_SAMPLES  = 50;
  localparam int     SAMPLE_DIV = 100;
  localparam int     FRAMES     = 2;
  localparam longint WATCHDOG   = 3000000;

  `include "hybrid_tb_body.svh"

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hybrid_top #(.NCARDS(NCARDS), .NCH(NCH), .N_SAMPLES(N_SAMPLES), .RAM_DEPTH(1024),
               .SAMPLE_DIV(SAMPLE_DIV)) dut (
    .clk, .rst_n, .run_i(run), .setpoint_i(sp), .gain_cfg_i(gcfg), .shape_i(2'd0),
    .card_adc_convst_o(c_convst), .card_adc_cs_n_o(c_cs_n), .card_adc_rd_n_o(c_rd_n),
    .card_adc_busy_i(c_busy), .card_adc_db_i(c_db),
    .sig_zc_i(szc), .ref_zc_i(rzc), .pga_gain_o(gain),
    .cs_adc_convst_o(i_convst), .cs_adc_cs_n_o(i_cs_n), .cs_adc_rd_n_o(i_rd_n),
    .cs_adc_busy_i(i_busy), .cs_adc_db_i(i_db),
    .dac_sig_o(dsig), .dac_amp_o(damp), .src_sel_o(src), .snk_sel_o(snk), .current_ok_o(current_ok),
    .hps_addr_i(hps_addr), .hps_rdata_o(hps_rdata), .data_ready_o(data_ready), .hps_ack_i(ack),
    .frame_count_o(frames), .busy_o(busy));
endmodule
