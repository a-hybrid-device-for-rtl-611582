// ads8588_ctrl: conversion controller for an ADS8588-class simultaneous-sampling
// ADC on its 16-bit parallel interface.
//
// Every SAMPLE_DIV clocks it pulses CONVST for CONVST_W clocks, waits for BUSY
// to rise and then fall, and then reads NCH results with CS# low and one RD#
// pulse per channel (RD_LOW clocks low, RD_HIGH clocks high). The data bus is
// sampled in the last low clock of each RD# pulse. When all NCH words are in,
// sample_o holds them (two's complement) and sample_valid_o is high for one
// clock. With a 50 MHz clock the default SAMPLE_DIV of 100 gives the
// converter's 500 kSPS. If BUSY does not rise within BUSY_TIMEOUT clocks the
// conversion is dropped and the next one is started on schedule.
//
// The converter type and its 16-bit, 500 kSPS figures follow the device
// description; the clock frequency, the pulse widths and the timeout are this
// design's own choices.
module ads8588_ctrl #(
  parameter int NCH          = 4,
  parameter int SAMPLE_DIV   = 100,
  parameter int CONVST_W     = 2,
  parameter int RD_LOW       = 2,
  parameter int RD_HIGH      = 2,
  parameter int BUSY_TIMEOUT = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable_i,
  // ADC pins
  output logic                     adc_convst_o,
  output logic                     adc_cs_n_o,
  output logic                     adc_rd_n_o,
  input  logic                     adc_busy_i,
  input  logic [15:0]              adc_db_i,
  // samples
  output logic signed [15:0]       sample_o [NCH],
  output logic                     sample_valid_o
);

  typedef enum logic [2:0] {S_IDLE, S_CONV, S_BUSY_H, S_BUSY_L, S_RD_LO, S_RD_HI} state_t;
  state_t state;

  localparam int DW = $clog2(SAMPLE_DIV + 1);
  logic [DW-1:0] div_cnt;
  logic          tick;
  logic [7:0]    cnt;
  localparam int CHW = (NCH > 1) ? $clog2(NCH) : 1;
  logic [CHW-1:0] ch;
  logic          busy_q;

  // sample-rate divider
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_cnt <= '0;
    else if (!enable_i || div_cnt == DW'(SAMPLE_DIV - 1)) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end
  assign tick = enable_i && (div_cnt == DW'(SAMPLE_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= adc_busy_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      cnt            <= '0;
      ch             <= '0;
      adc_convst_o   <= 1'b0;
      adc_cs_n_o     <= 1'b1;
      adc_rd_n_o     <= 1'b1;
      sample_valid_o <= 1'b0;
      for (int i = 0; i < NCH; i++) sample_o[i] <= '0;
    end else begin
      sample_valid_o <= 1'b0;
      unique case (state)
        S_IDLE: if (tick) begin
          adc_convst_o <= 1'b1;
          cnt          <= '0;
          state        <= S_CONV;
        end
        S_CONV: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(CONVST_W - 1)) begin
            adc_convst_o <= 1'b0;
            cnt          <= '0;
            state        <= S_BUSY_H;
          end
        end
        S_BUSY_H: begin
          cnt <= cnt + 1'b1;
          if (busy_q) state <= S_BUSY_L;
          else if (cnt == 8'(BUSY_TIMEOUT - 1)) state <= S_IDLE;
        end
        S_BUSY_L: if (!busy_q) begin
          adc_cs_n_o <= 1'b0;
          adc_rd_n_o <= 1'b0;
          cnt        <= '0;
          ch         <= '0;
          state      <= S_RD_LO;
        end
        S_RD_LO: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(RD_LOW - 1)) begin
            sample_o[ch] <= signed'(adc_db_i);
            adc_rd_n_o <= 1'b1;
            cnt        <= '0;
            state      <= S_RD_HI;
          end
        end
        S_RD_HI: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(RD_HIGH - 1)) begin
            cnt <= '0;
            if (ch == CHW'(NCH - 1)) begin
              adc_cs_n_o     <= 1'b1;
              sample_valid_o <= 1'b1;
              state          <= S_IDLE;
            end else begin
              ch         <= ch + 1'b1;
              adc_rd_n_o <= 1'b0;
              state      <= S_RD_LO;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
