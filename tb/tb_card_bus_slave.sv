// tb_card_bus_slave: exercises one card's bus window (card id 5). Checks that
// reads of its cells return the result inputs in the second clock after the
// address with oe high for exactly that clock, that other cards' addresses
// are ignored, that writes set the gain codes and the read-out pointer, that
// the broadcast address raises start, and that the sample cell returns the
// RAM word and advances the pointer.
module tb_card_bus_slave;
  import tomo_pkg::*;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t bus;
  logic [15:0] rd;
  logic oe;
  logic [15:0] rms [NCH], ph [NCH], per;
  logic done, busy, start;
  logic [GAIN_W-1:0] gain [NCH];
  logic [1:0] sch;
  logic [14:0] sa;
  logic [15:0] sdata;
  int checks = 0, failures = 0;
  int nstart = 0;

  card_bus_slave #(.NCH(NCH), .CARD_ID(3'd5)) dut (
    .clk, .rst_n, .bus_i(bus), .rdata_o(rd), .oe_o(oe),
    .rms_i(rms), .phase_i(ph), .period_i(per), .done_i(done), .busy_i(busy),
    .gain_o(gain), .start_o(start), .samp_ch_o(sch), .samp_addr_o(sa), .samp_data_i(sdata));

  // sample RAM stand-in: word = f(ch, addr), one clock read latency
  always @(posedge clk) sdata <= {sch, 14'(sa)} ^ 16'h5A5A;
  always @(posedge clk) if (start && rst_n) nstart++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic bus_wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); bus = '{addr: a, wdata: d, wr: 1'b1, rd: 1'b0};
    @(negedge clk); bus.wr = 0;
  endtask

  // read: returns data seen in the second clock after the address
  task automatic bus_rd(input logic [7:0] a, output logic [15:0] d, output bit ok);
    @(negedge clk); bus = '{addr: a, wdata: '0, wr: 1'b0, rd: 1'b1};
    @(negedge clk); bus.rd = 0; ok = !oe;        // first clock: not driving
    @(negedge clk); ok &= oe; d = rd;            // second clock: driving
    @(negedge clk); ok &= !oe;                   // released again
  endtask

  initial begin
    logic [15:0] d;
    bit ok;
    bus = '0;
    for (int c = 0; c < NCH; c++) begin rms[c] = 16'(1000 + c); ph[c] = 16'(2000 + c); end
    per = 16'd50000; done = 1; busy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCH; c++) begin
      bus_rd({4'h5, 4'(c)}, d, ok); chk(ok && d == 16'(1000 + c), $sformatf("rms%0d %0d", c, d));
      bus_rd({4'h5, 4'(4 + c)}, d, ok); chk(ok && d == 16'(2000 + c), "phase");
    end
    bus_rd(8'h58, d, ok); chk(ok && d == 16'h0001, "status");
    bus_rd(8'h59, d, ok); chk(ok && d == 16'd50000, "period");
    // another card's address: no drive
    @(negedge clk); bus = '{addr: 8'h40, wdata: '0, wr: 1'b0, rd: 1'b1};
    @(negedge clk); bus.rd = 0;
    repeat (3) begin @(negedge clk); chk(!oe, "foreign read"); end
    // gains
    for (int c = 0; c < NCH; c++) bus_wr({4'h5, 4'(c)}, 16'(c + 3));
    bus_wr(8'h31, 16'h7);  // other card
    for (int c = 0; c < NCH; c++) chk(gain[c] == GAIN_W'(c + 3), "gain");
    // start broadcast
    bus_wr(ADDR_START, 0);
    repeat (2) @(posedge clk);
    #1;
    chk(nstart == 1, $sformatf("start %0d", nstart));
    // sample read-out with auto-increment
    bus_wr(8'h5C, 16'd2);
    bus_wr(8'h5D, 16'd100);
    repeat (2) @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      bus_rd(8'h5E, d, ok);
      chk(ok && d == ({2'd2, 14'(100 + i)} ^ 16'h5A5A), $sformatf("sample %0d got %h", i, d));
    end
    chk(sa == 15'd105, "pointer advanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
