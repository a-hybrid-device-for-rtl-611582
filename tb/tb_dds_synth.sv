// tb_dds_synth: runs the synthesiser at three frequency words and compares
// every output code with 2048 + round(2047 * sin(2*pi*k/256)), k being the
// top 8 bits of a phase accumulator kept here, and checks that wrap pulses
// come once per period. The triangle and square shapes are compared with
// piecewise formulas on the top 13 phase bits n (0..8191): triangle n,
// 4095-n, 4096-n, n-8191 in the four quarters; square +-2047. Also checks
// the mid-scale output while disabled.
module tb_dds_synth;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en;
  logic [31:0] ftw;
  logic [1:0]  shape;
  logic [11:0] dac;
  logic wrap;
  int checks = 0, failures = 0;

  dds_synth dut (.clk, .rst_n, .en_i(en), .ftw_i(ftw), .shape_i(shape), .dac_o(dac), .wrap_o(wrap));

  function automatic int expect_code(input logic [31:0] ph);
    real a;
    int  n;
    a = $sin(2.0 * 3.14159265358979 * real'(ph[31:24]) / 256.0) * 2047.0;
    n = int'(ph[31:19]);
    case (shape)
      2'd1:    return 2048 + (n < 2048 ? n : n < 4096 ? 4095 - n : n < 6144 ? 4096 - n : n - 8191);
      2'd2:    return 2048 + (n < 4096 ? 2047 : -2047);
      default: return 2048 + $rtoi(a >= 0.0 ? a + 0.5 : a - 0.5);
    endcase
  endfunction

  task automatic run(input logic [31:0] f, input int cycles, input int min_wraps);
    logic [31:0] ph = 0;
    longint last_wrap = -1;
    int nw = 0;
    ftw = f;
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1; en = 1;
    for (int k = 0; k < cycles; k++) begin
      @(posedge clk); #1;
      checks++;
      if (int'(dac) != expect_code(ph)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d dac=%0d exp=%0d", k, dac, expect_code(ph));
      end
      if (wrap) begin
        if (last_wrap >= 0) begin
          checks++;
          if (k - last_wrap != longint'((64'd1 << 32) / f) && k - last_wrap != longint'((64'd1 << 32) / f) + 1) begin
            failures++;
            $display("FAIL wrap spacing %0d", k - last_wrap);
          end
        end
        last_wrap = k;
        nw++;
      end
      ph += f;
    end
    checks++;
    if (nw < min_wraps) begin failures++; $display("FAIL too few wraps"); end
  endtask

  initial begin
    en = 0; ftw = 0; shape = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (dac != 12'd2048) begin failures++; $display("FAIL idle code"); end
    run(32'd4294967, 3500, 3);       // period 1000 clocks
    run(32'd85899, 1200, 0);         // 1 kHz at 50 MHz: check the start of the wave
    run(32'd42949673, 500, 4);       // period 100 clocks
    shape = 1;
    run(32'd4294967, 2100, 2);       // triangle
    shape = 2;
    run(32'd4294967, 2100, 2);       // square
    shape = 3;
    run(32'd42949673, 300, 2);       // unused code: sine
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
