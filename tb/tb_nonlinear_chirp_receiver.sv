// tb_nonlinear_chirp_receiver: end-to-end test of the nonlinear chirp
// receiver.
//
// Drives 400 ns pulses of the four signal types the receiver separates:
// cubic-phase (nonlinear) chirps, linear chirps, chirps with both terms and
// stationary tones, spaced 1.1 us apart so each is processed before the next
// arrives, then two pulses 500 ns apart to provoke an overrun. Each measured
// pulse must carry the right class, its arrival window, rates within
// 25 MHz (per 400 ns^2 or per 400 ns) and a carrier within 25 MHz.
module tb_nonlinear_chirp_receiver;
  import chirp_pkg::*;
  import tb_chirp_pkg::*;

  localparam int NP  = 6;
  localparam int PRI = 2816;   // 1.1 us

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  adc_t din [LANES];
  logic [MEAS_W-1:0] lo [4][10], hi [4][10];
  logic rep_valid, ev_toa, ev_overrun, ev_nl, ev_lin, ev_noclass;
  rx_report_t rep;

  nonlinear_chirp_receiver dut (
    .clk, .rst_n, .din, .nl_dc_max(12'd128), .lin_dc_max(12'd128),
    .cls_lo(lo), .cls_hi(hi), .cls_en(4'hF), .rep_valid, .rep,
    .ev_toa, .ev_overrun, .ev_nl_dechirp(ev_nl), .ev_lin_dechirp(ev_lin),
    .ev_noclass
  );

  pulse_t ps[$];
  int checks = 0, failures = 0, nrep = 0, nover = 0, nnl = 0, nlin = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    static real f0s [NP] = '{300.0, 200.0, 150.0, 700.0, 250.0, 600.0};
    static real bls [NP] = '{0.0,   500.0, 300.0, 0.0,   0.0,   0.0};
    static real bns [NP] = '{800.0, 0.0,   600.0, 0.0,   900.0, 0.0};
    static int  st  [NP] = '{800, 800 + PRI, 800 + 2*PRI, 800 + 3*PRI, 800 + 4*PRI, 800 + 4*PRI + 1280};
    for (int i = 0; i < NP; i++)
      ps.push_back('{start: st[i], len: 1024, amp: 5.0, f0: f0s[i],
                     blin: bls[i], bnl: bns[i], period: 1024.0});
    // measurement windows: 0 dc1 1 pwr1 2 ifm1 dc 3 ifm1 pwr 4 ifm2 dc
    //                      5 ifm2 pwr 6 ifm3 pwr 7 nl rate 8 lin rate 9 carrier
    for (int c = 0; c < 4; c++)
      for (int m = 0; m < 10; m++) begin lo[c][m] = 16'd0; hi[c][m] = 16'hFFFF; end
    // nonlinear only: tone after two mixings, DC after NL de-chirp + mixing
    hi[0][2] = 16'd127; lo[0][4] = 16'd128;
    // linear only: DC after two mixings, tone after the linear mixing
    lo[1][2] = 16'd128; hi[1][4] = 16'd127;
    // both
    hi[2][2] = 16'd127; hi[2][4] = 16'd127;
    // stationary: DC after every mixing
    lo[3][0] = 16'd128; lo[3][2] = 16'd128; lo[3][4] = 16'd128;
  end

  always @(negedge clk)
    for (int l = 0; l < LANES; l++)
      din[l] <= adc_t'(train_sample(ps, int'(dut.widx)*LANES + l, 0.5));

  always @(posedge clk) if (rst_n) begin
    if (ev_overrun) nover++;
    if (ev_nl) nnl++;
    if (ev_lin) nlin++;
    if (rep_valid) begin
      int p;
      sig_class_t ec;
      p = -1;
      foreach (ps[i]) if (iabs(int'(rep.toa) - ps[i].start/8) <= 2) p = i;
      nrep++;
      $display("report: toa=%0d cls=%s nl=%0.2f lin=%0.2f carrier=%0.2f", rep.toa,
               rep.cls.name(), real'(rep.nl_rate_q4)/16.0, real'(rep.lin_rate_q4)/16.0,
               real'(rep.carrier_q4)/16.0);
      if (p >= 0) begin
        ec = (ps[p].bnl > 0.0) ? ((ps[p].blin > 0.0) ? SIG_NL_LINEAR : SIG_NONLINEAR)
                               : ((ps[p].blin > 0.0) ? SIG_LINEAR : SIG_STATIONARY);
        check(iabs(int'(rep.toa) - ps[p].start/8) <= 1, "arrival window");
        check(iabs(int'(rep.pw) - ps[p].len/8) <= 2, "pulse width");
        check(rep.cls == ec, "class");
        check(iabs(int'(rep.nl_rate_q4)  - $rtoi(ps[p].bnl * 16.0))  <= 25*16, "nonlinear rate");
        check(iabs(int'(rep.lin_rate_q4) - $rtoi(ps[p].blin * 16.0)) <= 25*16, "linear rate");
        check(iabs(int'(rep.carrier_q4)  - $rtoi(ps[p].f0 * 16.0))   <= 25*16, "carrier");
      end else check(0, "report for no pulse");
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (int'(dut.widx) > (800 + 4*PRI + 1280 + 1024)/8 + 600);
    check(nrep == NP - 1, "five pulses reported");
    check(nover == 1, "second of two close pulses counted as overrun");
    check(nnl == 3, "three nonlinear de-chirps");
    check(nlin == 2, "two linear de-chirps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
