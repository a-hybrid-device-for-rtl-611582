// tb_current_regulator: closes the loop around a model of the current path.
// The model turns the amplitude code into a sine of amplitude amp * G / 64
// ADC codes (G is the load), sampled once per SAMPLE_DIV clocks. The test
// checks that the regulator brings the current RMS within TOL of the set
// point, raises ok only then, lowers ok on restart, and regulates again after
// a load step and a set-point step.
module tb_current_regulator;
  localparam int N = 40, TOL = 16, DIV = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic restart, sv;
  logic [15:0] sp;
  logic signed [15:0] smp;
  logic [11:0] amp;
  logic [15:0] irms;
  logic iv, ok, adj;
  int checks = 0, failures = 0;
  int G = 64, nadj = 0;
  longint n = 0;

  current_regulator #(.N_SAMPLES(N), .TOL(TOL)) dut (
    .clk, .rst_n, .restart_i(restart), .setpoint_i(sp), .sample_valid_i(sv), .sample_i(smp),
    .amp_o(amp), .irms_o(irms), .irms_valid_o(iv), .ok_o(ok), .adjust_o(adj));

  // plant: one sample per DIV clocks, one period per N samples
  always @(posedge clk) begin
    if (rst_n && adj) nadj++;
    sv <= 0;
    if (n % DIV == 0) begin
      real a;
      a = real'(amp) * real'(G) / 64.0;
      smp <= 16'($rtoi(a * $sin(2.0 * 3.14159265 * real'((n / DIV) % N) / N)));
      sv <= 1;
    end
    n <= n + 1;
  end

  task automatic chk(input bit ok_, input string msg);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", msg); end
  endtask

  // wait for ok, then check the current
  task automatic settle(input string tag);
    int t = 0;
    while (!ok && t < 200000) begin @(posedge clk); t++; end
    #1;
    chk(ok, {tag, ": ok reached"});
    chk(int'(irms) >= int'(sp) - TOL && int'(irms) <= int'(sp) + TOL,
        $sformatf("%s: irms %0d sp %0d", tag, irms, sp));
  endtask

  task automatic do_restart();
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    #1 chk(!ok, "ok cleared by restart");
  endtask

  initial begin
    restart = 0; sp = 16'd2000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    settle("first");
    // ok must not have been given while the current was wrong: check ok holds
    repeat (N * DIV * 3) @(posedge clk);
    chk(ok, "ok holds");
    G = 128; do_restart(); settle("load step");
    chk(amp > 12'd1300 && amp < 12'd1500, $sformatf("amp halved %0d", amp));
    sp = 16'd5000; do_restart(); settle("set-point step");
    chk(nadj > 3, "amplitude was adjusted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
