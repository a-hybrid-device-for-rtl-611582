// tb_sample_ram: writes random words to random addresses of a full-size
// 32768 x 16 RAM, keeps a copy, and reads every written address back,
// checking the one-clock read latency.
module tb_sample_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [14:0] wa, ra;
  logic [15:0] wd, rd;
  logic [15:0] ref_m [int];
  int checks = 0, failures = 0;

  sample_ram dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1; wa = 15'($urandom); wd = 16'($urandom);
      ref_m[int'(wa)] = wd;
    end
    @(negedge clk); we = 0;
    foreach (ref_m[a]) begin
      @(negedge clk); ra = 15'(a);
      @(posedge clk); #1;
      checks++;
      if (rd !== ref_m[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rd, ref_m[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
