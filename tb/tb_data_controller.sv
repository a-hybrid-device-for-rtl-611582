// tb_data_controller: the data controller against behavioural bus slaves
// (two cards of four channels and a current source) that answer reads in the
// second clock, report the current as correct and the cards as done only
// after a random number of polls, and return values that encode frame, pair,
// electrode and kind. After each frame the test reads the whole frame memory
// through the processor port and checks every word, including the zeros for
// the two current-carrying electrodes, the ready flag and its acknowledge,
// the frame counter, that the second frame went to the other bank, and that
// every card's gain cells received the configured gain codes, and the
// current source the configured shape, before each frame.
module tb_data_controller;
  import tomo_pkg::*;
  localparam int NCARDS = 2, NCH = 4, NELEC = NCARDS * NCH, NPAIRS = NELEC;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t bus;
  logic [15:0] rdata;
  logic run, ready, ack, busy;
  logic [15:0] sp, frames, hdata;
  logic [6:0] haddr;
  logic [GAIN_W-1:0] gcfg [NELEC];
  int gain_reg [NELEC];
  int n_gain_wr = 0, shape_reg = -1;
  logic [1:0] shape;
  int checks = 0, failures = 0;

  data_controller #(.NCARDS(NCARDS), .NCH(NCH)) dut (
    .clk, .rst_n, .run_i(run), .setpoint_i(sp), .gain_i(gcfg), .shape_i(shape), .bus_o(bus), .bus_rdata_i(rdata),
    .hps_addr_i(haddr), .hps_rdata_o(hdata), .data_ready_o(ready), .hps_ack_i(ack),
    .frame_count_o(frames), .busy_o(busy));

  // ---- behavioural slaves ----
  int pair_reg = -1, sp_reg = -1, frame_no = 0;
  int cs_wait, card_wait [NCARDS];
  int n_cs_notok = 0, n_card_notdone = 0, n_starts = 0;
  logic [15:0] p1, p2;
  logic v1, v2;

  function automatic logic [15:0] value(input int f, input int p, input int e, input int kind);
    return 16'(f * 4096 + p * 256 + e * 2 + kind + 1);
  endfunction

  always @(posedge clk) begin
    v1 <= 0; v2 <= v1; p2 <= p1;
    if (rst_n && bus.wr) begin
      if (bus.addr == ADDR_CS_PAIR) begin pair_reg = int'(bus.wdata); cs_wait = $urandom % 4; end
      if (bus.addr == ADDR_CS_SETPT) sp_reg = int'(bus.wdata);
      if (bus.addr == ADDR_CS_SHAPE) shape_reg = int'(bus.wdata);
      if (bus.addr[7] == 1'b0 && int'(bus.addr[3:0]) < NCH) begin
        gain_reg[int'(bus.addr[6:4]) * NCH + int'(bus.addr[3:0])] = int'(bus.wdata);
        n_gain_wr++;
      end
      if (bus.addr == ADDR_START) begin
        n_starts++;
        for (int k = 0; k < NCARDS; k++) card_wait[k] = $urandom % 4;
      end
    end
    if (rst_n && bus.rd) begin
      v1 <= 1;
      p1 <= 16'hDEAD;
      if (bus.addr == ADDR_CS_STATUS) begin
        if (cs_wait > 0) begin cs_wait--; n_cs_notok++; p1 <= 0; end
        else p1 <= 16'd1;
      end else if (bus.addr[7] == 1'b0 && int'(bus.addr[6:4]) < NCARDS) begin
        int k, cl;
        k = int'(bus.addr[6:4]); cl = int'(bus.addr[3:0]);
        if (cl == int'(CELL_STATUS)) begin
          if (card_wait[k] > 0) begin card_wait[k]--; n_card_notdone++; p1 <= 16'h0002; end
          else p1 <= 16'h0001;
        end else if (cl < NCH) p1 <= value(frame_no, pair_reg, k * NCH + cl, 0);
        else if (cl < 2 * NCH) p1 <= value(frame_no, pair_reg, k * NCH + cl - NCH, 1);
      end
    end
  end
  assign rdata = v2 ? p2 : 16'h0000;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic check_frame(input int f);
    logic [15:0] e;
    for (int p = 0; p < NPAIRS; p++)
      for (int el = 0; el < NELEC; el++)
        for (int kind = 0; kind < 2; kind++) begin
          @(negedge clk); haddr = {3'(p), 3'(el), 1'(kind)};
          @(posedge clk); #1;
          e = (el == p || el == (p + 1) % NELEC) ? 16'd0 : value(f, p, el, kind);
          chk(hdata == e, $sformatf("frame %0d p%0d e%0d k%0d: %h exp %h", f, p, el, kind, hdata, e));
        end
  endtask

  task automatic check_gains(input string tag);
    for (int e = 0; e < NELEC; e++)
      chk(gain_reg[e] == int'(gcfg[e]), $sformatf("%s: gain of electrode %0d = %0d exp %0d", tag, e, gain_reg[e], gcfg[e]));
  endtask

  initial begin
    bus = '0;
    for (int e = 0; e < NELEC; e++) begin gcfg[e] = GAIN_W'(3 * e + 1); gain_reg[e] = -1; end
    shape = 2'd1;
    run = 0; ack = 0; sp = 16'd1234; haddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    chk(!busy && !ready, "idle before run");
    run = 1;
    wait (ready);
    frame_no = 1;                 // slaves now return frame-1 values
    chk(frames == 16'd1, "frame count 1");
    chk(sp_reg == 1234, "set point written");
    check_frame(0);
    check_gains("frame 0");
    chk(shape_reg == 1, "shape written");
    shape = 2'd2;
    for (int e = 0; e < NELEC; e++) gcfg[e] = GAIN_W'(7 - e);
    @(negedge clk); ack = 1; @(negedge clk); ack = 0;
    chk(!ready, "ack clears ready");
    wait (ready);
    run = 0;
    chk(frames == 16'd2, "frame count 2");
    check_frame(1);
    check_gains("frame 1");
    chk(shape_reg == 2, "new shape written for the next frame");
    chk(n_gain_wr >= 2 * NELEC && n_gain_wr % NELEC == 0, $sformatf("one gain write per electrode and frame: %0d", n_gain_wr));
    chk(n_starts >= 2 * NPAIRS, "one start per pair");
    chk(n_cs_notok > 0, "current not yet correct was seen");
    chk(n_card_notdone > 0, "card not yet done was seen");
    $display("polls: current not ok %0d, card not done %0d", n_cs_notok, n_card_notdone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
