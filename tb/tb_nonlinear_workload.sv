// tb_nonlinear_workload: the nonlinear chirp receiver over its measurement
// ranges, as a train of 400 ns pulses 1.1 us apart.
//
// Thirty-two pulses cycle through the four signal types: nonlinear chirp,
// linear chirp, both, and tone. Rates are drawn with $urandom from
// 50-1180 MHz (nonlinear, over 400 ns^2; linear, over 400 ns), and the start
// frequency keeps the whole sweep inside 50-1230 MHz. Amplitude 5 LSB, noise
// 0.5 LSB. Every pulse must be reported, with no overrun, in the right class
// and arrival window. Nonlinear rate, linear rate and carrier errors are
// collected and printed: each must be below 10 MHz on at least 90% of the
// pulses where it applies, and below 5 MHz on average.
module tb_nonlinear_workload;
  import chirp_pkg::*;
  import tb_chirp_pkg::*;

  localparam int NP  = 32;
  localparam int PRI = 2816;          // 1.1 us

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
  int checks = 0, failures = 0, nrep = 0, nover = 0;
  int n_e [3] = '{0, 0, 0};          // 0 nonlinear rate, 1 linear rate, 2 carrier
  int bad [3] = '{0, 0, 0};
  real sum_e [3] = '{0.0, 0.0, 0.0};
  real max_e [3] = '{0.0, 0.0, 0.0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic err(int i, real meas, real want);
    real e;
    e = meas - want;
    e = e < 0.0 ? -e : e;
    n_e[i]++;
    sum_e[i] += e;
    if (e > max_e[i]) max_e[i] = e;
    if (e > 10.0) bad[i]++;
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    for (int i = 0; i < NP; i++) begin
      real bn, bl, f;
      bn = 0.0; bl = 0.0;
      case (i % 4)
        0: bn = 50.0 + real'($urandom_range(0, 1130));
        1: bl = 50.0 + real'($urandom_range(0, 1130));
        2: begin
             bn = 50.0 + real'($urandom_range(0, 1030));
             bl = 50.0 + real'($urandom_range(0, 1080 - int'(bn)));
           end
        default: ;
      endcase
      f = 50.0 + real'($urandom_range(0, 1180 - int'(bn + bl)));
      ps.push_back('{start: 800 + i*PRI, len: 1024, amp: 5.0, f0: f, blin: bl, bnl: bn,
                     period: 1024.0});
    end
    for (int c = 0; c < 4; c++)
      for (int m = 0; m < 10; m++) begin lo[c][m] = 16'd0; hi[c][m] = 16'hFFFF; end
    hi[0][2] = 16'd127; lo[0][4] = 16'd128;
    lo[1][2] = 16'd128; hi[1][4] = 16'd127;
    hi[2][2] = 16'd127; hi[2][4] = 16'd127;
    lo[3][0] = 16'd128; lo[3][2] = 16'd128; lo[3][4] = 16'd128;
  end

  always @(negedge clk)
    for (int l = 0; l < LANES; l++)
      din[l] <= adc_t'(train_sample(ps, int'(dut.widx)*LANES + l, 0.5));

  always @(posedge clk) if (rst_n) begin
    if (ev_overrun) nover++;
    if (rep_valid) begin
      int p;
      sig_class_t ec;
      p = (int'(rep.toa) * 8 - 800 + PRI/2) / PRI;
      nrep++;
      if (p >= 0 && p < NP) begin
        ec = (ps[p].bnl > 0.0) ? ((ps[p].blin > 0.0) ? SIG_NL_LINEAR : SIG_NONLINEAR)
                               : ((ps[p].blin > 0.0) ? SIG_LINEAR : SIG_STATIONARY);
        check(iabs(int'(rep.toa) - ps[p].start/8) <= 1, "arrival window");
        check(rep.cls == ec, $sformatf("class of pulse %0d: %s", p, rep.cls.name()));
        if (ps[p].bnl > 0.0) err(0, real'(rep.nl_rate_q4) / 16.0, ps[p].bnl);
        if (ps[p].blin > 0.0) err(1, real'(rep.lin_rate_q4) / 16.0, ps[p].blin);
        err(2, real'(rep.carrier_q4) / 16.0, ps[p].f0);
      end else check(0, "report for no pulse");
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (int'(dut.widx) > (800 + NP*PRI)/8 + 600);
    for (int i = 0; i < 3; i++) begin
      $display("%s: %0d pulses, mean error %0.2f MHz, max %0.2f MHz, %0d above 10 MHz",
               i == 0 ? "nonlinear rate" : i == 1 ? "linear rate" : "carrier",
               n_e[i], sum_e[i] / (n_e[i] > 0 ? n_e[i] : 1), max_e[i], bad[i]);
      check(bad[i] * 10 <= n_e[i], "within 10 MHz on 90% of pulses");
      check(sum_e[i] < 5.0 * real'(n_e[i]), "mean error below 5 MHz");
    end
    check(nrep == NP, $sformatf("%0d of %0d pulses reported", nrep, NP));
    check(nover == 0, "no overrun at 1.1 us spacing");
    check(n_e[0] == NP/2 && n_e[1] == NP/2, "every chirp term measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
