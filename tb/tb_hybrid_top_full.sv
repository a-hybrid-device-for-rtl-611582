// tb_hybrid_top_full: one complete measurement frame of the device at its
// full size and default parameters: eight cards of four channels
// (32 electrodes, 32 pairs), 500-sample windows at 500 kSPS (1 kHz
// excitation, 1 ms per window), 32768-word sample memories. The checks are in
// hybrid_tb_body.svh.
module tb_hybrid_top_full;
  localparam int     NCARDS     = 8;
  localparam int     NCH        = 4;
  localparam int     N_SAMPLES  = 500;
  localparam int     SAMPLE_DIV = 100;
  localparam int     FRAMES     = 1;
  localparam longint WATCHDOG   = 40000000;

  `include "hybrid_tb_body.svh"

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hybrid_top dut (
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
