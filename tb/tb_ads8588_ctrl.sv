// tb_ads8588_ctrl: drives the ADC controller against the behavioural
// converter. Every conversion gets fresh random input codes; the test checks
// that each delivered sample set equals the codes present at the CONVST edge
// and that sample sets arrive exactly every SAMPLE_DIV clocks.
module tb_ads8588_ctrl;
  localparam int NCH = 4, DIV = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic convst, cs_n, rd_n, busy, frst;
  logic [15:0] db;
  logic signed [15:0] ain [8];
  logic signed [15:0] smp [NCH];
  logic vld;
  int checks = 0, failures = 0;

  ads8588_ctrl #(.NCH(NCH), .SAMPLE_DIV(DIV)) dut (
    .clk, .rst_n, .enable_i(1'b1), .adc_convst_o(convst), .adc_cs_n_o(cs_n),
    .adc_rd_n_o(rd_n), .adc_busy_i(busy), .adc_db_i(db), .sample_o(smp), .sample_valid_o(vld));
  ads8588_model m (.clk, .convst, .cs_n, .rd_n, .ain, .busy, .frstdata(frst), .db);

  logic [NCH*16-1:0] exp_q [$];
  logic conv_q = 0;
  longint last_v = -1, cyc = 0;
  int nsets = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    conv_q <= convst;
    if (convst && !conv_q && rst_n) begin
      logic [NCH*16-1:0] e;
      for (int i = 0; i < NCH; i++) e[i*16 +: 16] = ain[i];
      exp_q.push_back(e);
    end
    // new random inputs every clock
    for (int i = 0; i < 8; i++) ain[i] <= 16'($urandom);
    if (vld && rst_n) begin
      logic [NCH*16-1:0] e;
      e = exp_q.pop_front();
      for (int i = 0; i < NCH; i++) begin
        checks++;
        if (smp[i] !== e[i*16 +: 16]) begin
          failures++;
          $display("FAIL ch%0d got %h exp %h", i, smp[i], e[i*16 +: 16]);
        end
      end
      if (last_v >= 0) begin
        checks++;
        if (cyc - last_v != DIV) begin
          failures++;
          $display("FAIL spacing %0d", cyc - last_v);
        end
      end
      last_v = cyc;
      nsets++;
    end
  end

  initial begin
    for (int i = 0; i < 8; i++) ain[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nsets == 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
