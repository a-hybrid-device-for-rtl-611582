// rms_calc: root mean square of the samples of one acquisition window.
//
// While the window runs, each valid sample is squared and added to a wide
// accumulator (first_i restarts it). The clock edge that takes the last sample
// (last_i) also stores the mean square, sum / N_SAMPLES; the next edge stores
// its integer square root. rms_o and valid_o are therefore ready two clocks
// after the last sample of the window, and stay until the next result
// (valid_o is a one-clock pulse). The two-clock result latency is the figure
// the device description gives for its RMS units; the constant divider and the
// combinational square root are this design's own way of meeting it.
module rms_calc #(
  parameter int N_SAMPLES = 500,
  parameter int ACC_W     = 48
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               valid_i,
  input  logic               first_i,
  input  logic               last_i,
  input  logic signed [15:0] sample_i,
  output logic [15:0]        rms_o,
  output logic               valid_o
);

  import tomo_pkg::*;

  logic [ACC_W-1:0] acc, acc_next;
  logic [31:0]      sq;
  logic [31:0]      mean_sq;
  logic             mean_vld;

  always_comb begin
    sq       = 32'(unsigned'(32'(sample_i) * 32'(sample_i)));
    acc_next = (first_i ? '0 : acc) + ACC_W'(sq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      mean_sq  <= '0;
      mean_vld <= 1'b0;
      rms_o    <= '0;
      valid_o  <= 1'b0;
    end else begin
      mean_vld <= 1'b0;
      valid_o  <= 1'b0;
      if (valid_i) begin
        acc <= acc_next;
        if (last_i) begin
          mean_sq  <= 32'(acc_next / ACC_W'(N_SAMPLES));
          mean_vld <= 1'b1;
        end
      end
      if (mean_vld) begin
        rms_o   <= 16'(isqrt64(64'(mean_sq)));
        valid_o <= 1'b1;
      end
    end
  end

endmodule
