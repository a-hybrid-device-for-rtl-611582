// tb_rms_calc: feeds windows of random and of sine samples into the RMS unit
// and compares the result with floor(sqrt(floor(sum(x^2) / N))) computed here,
// and checks that the result appears exactly two clocks after the last sample.
module tb_rms_calc;
  localparam int N = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic v, f, l, ov;
  logic signed [15:0] x;
  logic [15:0] r;
  int checks = 0, failures = 0;
  longint cyc = 0, last_cyc;

  rms_calc #(.N_SAMPLES(N)) dut (.clk, .rst_n, .valid_i(v), .first_i(f), .last_i(l),
    .sample_i(x), .rms_o(r), .valid_o(ov));

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint isq(input longint a);
    longint s = 0;
    while ((s + 1) * (s + 1) <= a) s++;
    return s;
  endfunction

  task automatic window(input int kind, input int amp);
    longint sum = 0, expv;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      v = 1; f = (i == 0); l = (i == N - 1);
      if (kind == 0) x = 16'($urandom);
      else x = 16'($rtoi(real'(amp) * $sin(2.0 * 3.14159265 * i / N)));
      sum += longint'(x) * longint'(x);
      if (l) last_cyc = cyc;
      if ($urandom % 4 == 0 && i != N - 1) begin
        @(negedge clk); v = 0;  // gap; the sample above is taken at this edge
      end
    end
    @(negedge clk); v = 0; f = 0; l = 0;
    expv = isq(sum / N);
    while (!ov) @(posedge clk);
    #1;
    checks++;
    if (r != 16'(expv)) begin failures++; $display("FAIL rms %0d exp %0d", r, expv); end
    checks++;
    if (cyc - 1 - last_cyc != 2) begin failures++; $display("FAIL latency %0d", cyc - 1 - last_cyc); end
  endtask

  initial begin
    v = 0; f = 0; l = 0; x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) window(0, 0);
    window(1, 32767);
    window(1, 1000);
    window(1, 0);
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
