// tb_current_source: the motherboard current source on the bus, with the
// current path modelled and a load that changes with the electrode pair.
// Checks the multiplexer selects for a pair and for the wrap-around pair,
// that writing a pair clears the current-correct flag, that the flag comes
// back and the measured current RMS is then within tolerance of the set
// point, the register read-back, that the signal DAC is running, and that a
// shape write clears the flag and turns the DAC signal into a square wave.
module tb_current_source;
  import tomo_pkg::*;
  localparam int N = 50, DIV = 100, PER = N * DIV;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint t = 0;
  always @(posedge clk) t <= t + 1;

  bus_req_t bus;
  logic [15:0] rd;
  logic oe;
  logic convst, cs_n, rd_n, busy, rzc, ok;
  logic [15:0] db;
  logic [11:0] dsig, damp;
  logic [4:0] src, snk;
  int G = 64;
  int checks = 0, failures = 0;
  int dmin = 4095, dmax = 0;

  current_source #(.NELEC(32), .N_SAMPLES(N), .SAMPLE_DIV(DIV)) dut (
    .clk, .rst_n, .bus_i(bus), .bus_rdata_o(rd), .bus_oe_o(oe),
    .adc_convst_o(convst), .adc_cs_n_o(cs_n), .adc_rd_n_o(rd_n), .adc_busy_i(busy), .adc_db_i(db),
    .dac_sig_o(dsig), .dac_amp_o(damp), .src_sel_o(src), .snk_sel_o(snk), .current_ok_o(ok));
  current_path_model #(.PER(PER)) cp (
    .clk, .t, .amp_code(damp), .gain(G), .convst, .cs_n, .rd_n, .busy, .db, .ref_zc(rzc));

  always @(posedge clk) if (rst_n) begin
    if (int'(dsig) < dmin) dmin = int'(dsig);
    if (int'(dsig) > dmax) dmax = int'(dsig);
  end

  task automatic chk(input bit ok_, input string msg);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic bus_wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); bus = '{addr: a, wdata: d, wr: 1'b1, rd: 1'b0};
    @(negedge clk); bus.wr = 0;
  endtask
  task automatic bus_rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk); bus = '{addr: a, wdata: '0, wr: 1'b0, rd: 1'b1};
    @(negedge clk); bus.rd = 0;
    @(negedge clk); d = rd;
    chk(oe, "oe in second clock");
  endtask

  task automatic pair_test(input int p, input int load, input int sp);
    logic [15:0] d;
    int polls = 0;
    G = load;
    bus_wr(ADDR_CS_PAIR, 16'(p));
    bus_wr(ADDR_CS_SETPT, 16'(sp));
    chk(src == 5'(p) && snk == 5'((p + 1) % 32), $sformatf("selects %0d %0d", src, snk));
    bus_rd(ADDR_CS_STATUS, d);
    chk(d[0] == 1'b0, "ok cleared by new pair");
    do begin
      bus_rd(ADDR_CS_STATUS, d);
      polls++;
    end while (!d[0] && polls < 100000);
    chk(d[0], $sformatf("pair %0d: current correct", p));
    bus_rd(ADDR_CS_IRMS, d);
    chk(int'(d) >= sp - 16 && int'(d) <= sp + 16, $sformatf("irms %0d sp %0d", d, sp));
    bus_rd(ADDR_CS_PAIR, d);
    chk(d == 16'(p), "pair read-back");
    bus_rd(ADDR_CS_AMP, d);
    chk(d == 16'(damp), "amp read-back");
  endtask

  initial begin
    bus = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pair_test(5, 64, 2000);
    pair_test(31, 48, 2000);
    pair_test(12, 100, 3000);
    chk(dmax - dmin > 4000, $sformatf("signal DAC swing %0d..%0d", dmin, dmax));
    begin
      logic [15:0] d;
      int n_hi = 0, n_lo = 0, n_other = 0;
      bus_wr(ADDR_CS_SHAPE, 16'd2);
      bus_rd(ADDR_CS_STATUS, d);
      chk(d[0] == 1'b0, "ok cleared by a shape change");
      bus_rd(ADDR_CS_SHAPE, d);
      chk(d == 16'd2, "shape read-back");
      repeat (50000) begin              // one 1 kHz period at 50 MHz
        @(posedge clk); #1;
        if (dsig == 12'd4095) n_hi++; else if (dsig == 12'd1) n_lo++; else n_other++;
      end
      chk(n_other == 0 && n_hi > 0 && n_lo > 0, $sformatf("square wave: %0d high, %0d low, %0d other", n_hi, n_lo, n_other));
      bus_wr(ADDR_CS_SHAPE, 16'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * PER) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
