// phase_meter: phase shift between the excitation current and one channel's
// voltage, from their zero-crossing square waves.
//
// Both square waves come from analog comparators and are brought into the
// clock domain by two-flop synchronisers (equal delay on both paths, so it
// cancels). A counter restarts at each rising edge of the current reference.
// The count at the first rising edge of the voltage after a reference edge is
// the delay; the count reached at the next reference edge is the period. On
// each reference edge that closes a period in which a delay was seen,
// delay_o and period_o are updated and valid_o pulses. The phase in degrees is
// 360 * delay / period, left to the software. Counts saturate at all ones.
//
// Measuring the phase from zero-crossing detectors follows the device
// description; measuring it as a time delay in clock ticks is this design's
// own choice.
module phase_meter #(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ref_zc_i,   // current zero-crossing square wave (asynchronous)
  input  logic             sig_zc_i,   // voltage zero-crossing square wave (asynchronous)
  output logic [CNT_W-1:0] delay_o,
  output logic [CNT_W-1:0] period_o,
  output logic             valid_o
);

  logic [2:0] ref_s, sig_s;  // [0],[1] synchroniser, [2] previous value
  logic       ref_rise, sig_rise;
  logic [CNT_W-1:0] cnt, dly;
  logic       ref_seen, dly_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_s <= '0;
      sig_s <= '0;
    end else begin
      ref_s <= {ref_s[1:0], ref_zc_i};
      sig_s <= {sig_s[1:0], sig_zc_i};
    end
  end
  assign ref_rise = ref_s[1] & ~ref_s[2];
  assign sig_rise = sig_s[1] & ~sig_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      dly      <= '0;
      ref_seen <= 1'b0;
      dly_seen <= 1'b0;
      delay_o  <= '0;
      period_o <= '0;
      valid_o  <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      if (ref_rise) begin
        if (ref_seen && dly_seen) begin
          delay_o  <= dly;
          period_o <= cnt;
          valid_o  <= 1'b1;
        end
        ref_seen <= 1'b1;
        dly_seen <= 1'b0;
        cnt      <= CNT_W'(1);
        // a voltage edge together with the reference edge is a zero delay
        if (sig_rise) begin
          dly      <= '0;
          dly_seen <= 1'b1;
        end
      end else begin
        if (cnt != '1) cnt <= cnt + 1'b1;
        if (sig_rise && ref_seen && !dly_seen) begin
          dly      <= cnt;
          dly_seen <= 1'b1;
        end
      end
    end
  end

endmodule
