// tb_fir2: feeds random samples with random gaps into the FIR filter and
// compares each output with (x[n] + 2 x[n-1] + x[n-2]) >>> 2 computed here,
// including the one-clock output latency.
module tb_fir2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv, ov;
  logic signed [15:0] xi, yo;
  int checks = 0, failures = 0;
  int h [3] = '{0, 0, 0};
  int expv;
  logic exp_pending = 0;

  fir2 dut (.clk, .rst_n, .in_valid(iv), .in_sample(xi), .out_valid(ov), .out_sample(yo));

  initial begin
    iv = 0; xi = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      iv = ($urandom % 3) != 0;
      xi = (n < 20) ? 16'sh7FFF : 16'($urandom);
      if (iv) begin
        h[2] = h[1]; h[1] = h[0]; h[0] = int'(xi);
        expv = (h[0] + 2 * h[1] + h[2]) >>> 2;
      end
      @(posedge clk);
      #1;
      checks++;
      if (ov !== iv || (iv && yo !== 16'(expv))) begin
        failures++;
        $display("FAIL n=%0d ov=%b yo=%0d exp=%0d", n, ov, yo, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
