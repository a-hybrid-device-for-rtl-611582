// hybrid_tb_body.svh: body shared by the end-to-end testbenches of
// hybrid_top. The including module defines NCARDS, NCH, N_SAMPLES, SAMPLE_DIV,
// FRAMES and WATCHDOG, instantiates the top as "dut" on the signals below and
// has its own watchdog of WATCHDOG clocks.
//
// The analog world is modelled: each electrode's voltage has an amplitude
// that depends on its distance from the current-carrying pair and a fixed
// phase lag per electrode; the current path has a load that changes every
// four pairs, so the amplitude loop has to re-settle. The controller runs
// frames on its own; after each frame the test reads the frame memory through
// the processor port and checks every RMS and phase value against the model,
// and the zeros of the two current-carrying electrodes, and that every PGA
// gain output carries the gain configured for its electrode. It also checks that
// every measurement was started with the current reported correct and the
// multiplexer on the right pair, and counts each mechanism of the design.

  import tomo_pkg::*;
  localparam int NELEC = NCARDS * NCH;
  localparam int EW    = $clog2(NELEC);
  localparam int PER   = N_SAMPLES * SAMPLE_DIV;    // one excitation period = one window

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;                             // 50 MHz
  longint t = 0;
  always @(posedge clk) t <= t + 1;

  logic                    run, ack, data_ready, current_ok, busy;
  logic [15:0]             sp, hps_rdata, frames;
  logic [2*EW:0]           hps_addr;
  logic [NCARDS-1:0]       c_convst, c_cs_n, c_rd_n, c_busy;
  logic [15:0]             c_db [NCARDS];
  logic [NELEC-1:0]        szc;
  logic                    rzc;
  logic [GAIN_W-1:0]       gain [NELEC];
  logic [GAIN_W-1:0]       gcfg [NELEC], gexp [NELEC];
  logic                    i_convst, i_cs_n, i_rd_n, i_busy;
  logic [15:0]             i_db;
  logic [11:0]             dsig, damp;
  logic [EW-1:0]           src, snk;

  int checks = 0, failures = 0;

  // ---- analog models ----
  function automatic int amp_of(input int p, input int e);
    return 2000 + 300 * ((e - p + NELEC) % NELEC);
  endfunction
  function automatic real ph_of(input int e);
    return 5.0 + 2.5 * real'(e);
  endfunction
  function automatic int load_of(input int p);
    return 48 + 16 * ((p / 4) % 3);
  endfunction
  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  int G;
  always_comb G = load_of(int'(src));

  for (genvar k = 0; k < NCARDS; k++) begin : g_fe
    int  a [NCH];
    real p [NCH];
    always_comb
      for (int c = 0; c < NCH; c++) begin
        a[c] = amp_of(int'(src), k * NCH + c);
        p[c] = ph_of(k * NCH + c);
      end
    card_frontend_model #(.NCH(NCH), .PER(PER)) fe (
      .clk, .t, .amp(a), .ph_deg(p), .convst(c_convst[k]), .cs_n(c_cs_n[k]), .rd_n(c_rd_n[k]),
      .busy(c_busy[k]), .db(c_db[k]), .sig_zc(szc[k*NCH +: NCH]));
  end

  current_path_model #(.PER(PER)) cp (
    .clk, .t, .amp_code(damp), .gain(G), .convst(i_convst), .cs_n(i_cs_n), .rd_n(i_rd_n),
    .busy(i_busy), .db(i_db), .ref_zc(rzc));

  // ---- bus observer and mechanism counters ----
  int n_start = 0, n_start_bad = 0, n_cs_notok = 0, n_card_notdone = 0, n_adjust = 0;
  int n_reads = 0, n_excluded = 0, n_banks = 0, n_ack = 0, n_conv = 0;
  logic [7:0] ra1, ra2;
  logic       rv1, rv2;
  logic       cv_q;

  always @(posedge clk) if (rst_n) begin
    rv1 <= dut.bus.rd; ra1 <= dut.bus.addr;
    rv2 <= rv1;        ra2 <= ra1;
    cv_q <= c_convst[0];
    if (c_convst[0] && !cv_q) n_conv++;
    if (dut.bus.wr && dut.bus.addr == ADDR_START) begin
      n_start++;
      if (!current_ok || int'(src) != int'(dut.u_ctl.pair) ||
          int'(snk) != (int'(dut.u_ctl.pair) + 1) % NELEC) n_start_bad++;
    end
    if (rv2) begin
      n_reads++;
      if (ra2 == ADDR_CS_STATUS && !dut.bus_data[0]) n_cs_notok++;
      if (!ra2[7] && ra2[3:0] == CELL_STATUS && !dut.bus_data[0]) n_card_notdone++;
    end
    if (dut.u_cs.u_reg.adjust_o) n_adjust++;
    if (dut.u_ctl.f_we && dut.u_ctl.f_wdata == 16'd0) n_excluded++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic check_frame(input int f);
    real fir_gain, er, ep;
    int  e_src, e_snk;
    fir_gain = $cos(3.14159265358979 / real'(N_SAMPLES)) ** 2;
    for (int p = 0; p < NELEC; p++)
      for (int e = 0; e < NELEC; e++)
        for (int kind = 0; kind < 2; kind++) begin
          @(negedge clk); hps_addr = {EW'(p), EW'(e), 1'(kind)};
          @(posedge clk); #1;
          e_src = p; e_snk = (p + 1) % NELEC;
          if (e == e_src || e == e_snk) begin
            chk(hps_rdata == 16'd0, $sformatf("f%0d p%0d e%0d excluded: %0d", f, p, e, hps_rdata));
          end else if (kind == 0) begin
            er = real'(amp_of(p, e)) / $sqrt(2.0) * fir_gain;
            chk(fabs(real'(hps_rdata) - er) < 0.01 * er + 3.0,
                $sformatf("f%0d p%0d e%0d rms %0d exp %0.1f", f, p, e, hps_rdata, er));
          end else begin
            ep = ph_of(e) / 360.0 * real'(PER);
            chk(fabs(real'(hps_rdata) - ep) <= 3.0 + ep * 0.001,
                $sformatf("f%0d p%0d e%0d delay %0d exp %0.1f", f, p, e, hps_rdata, ep));
          end
        end
  endtask

  initial begin
    longint t0;
    run = 0; ack = 0; sp = 16'd2000; hps_addr = '0;
    for (int e = 0; e < NELEC; e++) gcfg[e] = GAIN_W'(5 * e + 2);
    gexp = gcfg;                       // written at the start of frame 0
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    if (FRAMES == 1) begin
      repeat (10) @(posedge clk);
      run = 0;
    end
    t0 = t;
    for (int f = 0; f < FRAMES; f++) begin
      wait (data_ready);
      $display("frame %0d ready after %0d clocks (%0d windows of %0d clocks)", f, t - t0, NELEC, PER);
      chk(t - t0 >= longint'(NELEC) * PER, "a frame takes at least one full window per pair");
      t0 = t;
      n_banks++;
      // the controller writes the gains for the next frame as soon as a frame
      // is handed over, if it goes on running
      if (f < FRAMES - 1) gexp = gcfg;
      if (f == FRAMES - 2) run = 0;    // the frame now running is the last
      chk(int'(frames) == f + 1, "frame counter");
      check_frame(f);
      for (int e = 0; e < NELEC; e++)
        chk(gain[e] == gexp[e], $sformatf("PGA gain of electrode %0d", e));
      for (int e = 0; e < NELEC; e++) gcfg[e] = GAIN_W'(3 * e + f + 1);
      @(negedge clk); ack = 1; @(negedge clk); ack = 0; n_ack++;
      #1 chk(!data_ready, "acknowledge clears ready");
    end
    wait (!busy);
    // mechanisms
    chk(n_start == FRAMES * NELEC, $sformatf("one start per pair: %0d", n_start));
    chk(n_start_bad == 0, "measurements started only with correct current on the right pair");
    chk(n_adjust > 0, "amplitude loop adjusted");
    chk(n_cs_notok > 0, "current-not-correct polls happened");
    chk(n_card_notdone > 0, "card-not-done polls happened");
    chk(n_excluded == FRAMES * NELEC * 4, $sformatf("excluded electrode words %0d", n_excluded));
    chk(n_conv > 0 && n_reads > 0, "ADC conversions and bus reads happened");
    chk(n_ack == FRAMES && n_banks == FRAMES, "frames handed over");
    $display("mechanisms: starts %0d, amplitude adjustments %0d, current-not-correct polls %0d, card-not-done polls %0d, excluded words %0d, bus reads %0d, ADC conversions %0d, frames %0d",
             n_start, n_adjust, n_cs_notok, n_card_notdone, n_excluded, n_reads, n_conv, n_banks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
