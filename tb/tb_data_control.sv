// tb_data_control: streams sample sets with random gaps, starts a window,
// and checks that exactly N_SAMPLES samples are written at addresses
// 0..N-1 with the right data, that first/last mark the ends, that done
// follows the last sample by one clock and that samples outside the window
// are not written. A second window started in the middle of the first
// restarts it.
module tb_data_control;
  localparam int NCH = 4, N = 37, DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, iv;
  logic signed [15:0] xs [NCH];
  logic we, wv, wf, wl, busy, done;
  logic [5:0] wa;
  int checks = 0, failures = 0;
  int nwr = 0, nfirst = 0, nlast = 0, ndone = 0;
  longint cyc = 0, last_cyc = -10;

  data_control #(.N_SAMPLES(N), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .start_i(start), .in_valid_i(iv),
    .ram_we_o(we), .ram_waddr_o(wa),
    .win_valid_o(wv), .win_first_o(wf), .win_last_o(wl),
    .busy_o(busy), .done_o(done));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (we) begin
      chk(wa == 6'(nwr), $sformatf("addr %0d exp %0d", wa, nwr));
      chk(wv && iv, "write only with a valid sample");
      chk(wf == (nwr == 0), "first");
      chk(wl == (nwr == N - 1), "last");
      if (wf) nfirst++;
      if (wl) begin nlast++; last_cyc = cyc; end
      nwr++;
    end
    if (done) begin
      ndone++;
      chk(cyc == last_cyc + 1, "done timing");
    end
  end

  task automatic run_samples(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      iv = ($urandom % 2) == 1;
      for (int c = 0; c < NCH; c++) xs[c] = 16'($urandom);
    end
    @(negedge clk); iv = 0;
  endtask

  initial begin
    start = 0; iv = 0;
    for (int c = 0; c < NCH; c++) xs[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_samples(20);
    chk(nwr == 0, "no write before start");
    // window 1, restarted midway
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    run_samples(30);
    @(negedge clk); start = 1; nwr = 0; @(negedge clk); start = 0;
    run_samples(200);
    chk(nwr == N, $sformatf("window length %0d", nwr));
    chk(ndone == 1 && nlast == 1 && nfirst == 2, "strobe counts");
    chk(!busy, "idle after window");
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
