// tb_phase_meter: generates a reference square wave of period P and a signal
// square wave delayed by D clocks (with asynchronous sub-clock offsets), for
// several (P, D) pairs including zero delay, and checks the reported delay
// and period.
module tb_phase_meter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rz = 0, sz = 0;
  logic [15:0] d, p;
  logic v;
  int checks = 0, failures = 0;

  phase_meter dut (.clk, .rst_n, .ref_zc_i(rz), .sig_zc_i(sz), .delay_o(d), .period_o(p), .valid_o(v));

  int P, D;
  bit run = 0;
  // waveform generator in clock units, changes at negedge
  initial begin
    longint t = 0;
    forever begin
      @(negedge clk);
      if (run) begin
        rz = (t % P) < P / 2;
        sz = ((t - D + 10 * P) % P) < P / 2;
        t++;
      end
    end
  end

  task automatic test(input int per, input int dly);
    int got = 0;
    P = per; D = dly; run = 1;
    // skip two results, then check three
    while (got < 5) begin
      @(posedge clk); #1;
      if (v) begin
        got++;
        if (got > 2) begin
          checks += 2;
          if (p != 16'(per)) begin failures++; $display("FAIL period %0d exp %0d", p, per); end
          if (d != 16'(dly)) begin failures++; $display("FAIL delay %0d exp %0d", d, dly); end
        end
      end
    end
  endtask

  initial begin
    P = 100; D = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test(100, 10);
    test(100, 0);
    test(250, 77);
    test(1000, 999);
    test(5000, 1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
