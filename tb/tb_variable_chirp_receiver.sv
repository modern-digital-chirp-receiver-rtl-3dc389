// tb_variable_chirp_receiver: end-to-end test of the variable chirp receiver.
//
// Drives linear chirps and stationary tones of different pulse widths
// (400 ns to 1.6 us), a pulse too short to measure (ev_short) and two
// pulses only 100 ns apart, the closest spacing the receiver must handle
// (no overrun allowed).
// Each report must carry the right class, the arrival window (+-1), the
// width in windows (+-2), the rate swept over the pulse within 5 % + 25 MHz
// and the carrier within 30 MHz.
module tb_variable_chirp_receiver;
  import chirp_pkg::*;
  import tb_chirp_pkg::*;

  localparam int NP = 7;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  adc_t din [LANES];
  logic [MEAS_W-1:0] lo [2][6], hi [2][6];
  logic rep_valid, ev_toa, ev_tod, ev_overrun, ev_short, ev_noclass;
  rx_report_t rep;

  variable_chirp_receiver dut (
    .clk, .rst_n, .din, .cls_lo(lo), .cls_hi(hi), .cls_en(2'b11),
    .rep_valid, .rep, .ev_toa, .ev_tod, .ev_overrun, .ev_short, .ev_noclass
  );

  pulse_t ps[$];
  int st [NP];
  int checks = 0, failures = 0, nrep = 0, nover = 0, nshort = 0, ntod = 0;
  int last_end;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    static int  lens [NP] = '{1024,  2048,  4096,  3200,  800,   1536,  1024};
    static real f0s  [NP] = '{300.0, 500.0, 200.0, 150.0, 400.0, 250.0, 600.0};
    static real bls  [NP] = '{400.0, 800.0, 0.0,   1000.0, 0.0,  600.0, 300.0};
    static int  gap  [NP] = '{800,   2400,  2400,  2400,  2400,  2400,  256};
    int  s;
    s = 0;
    for (int i = 0; i < NP; i++) begin
      s += gap[i];
      st[i] = s;
      ps.push_back('{start: s, len: lens[i], amp: 5.0, f0: f0s[i],
                     blin: bls[i], bnl: 0.0, period: real'(lens[i])});
      s += lens[i];
    end
    last_end = s;
    // measurements: 0 IFM1 DC, 1 IFM1 power, 2 IFM2 DC, 3 IFM2 power, 4 rate, 5 carrier
    for (int c = 0; c < 2; c++)
      for (int m = 0; m < 6; m++) begin lo[c][m] = 16'd0; hi[c][m] = 16'hFFFF; end
    hi[0][0] = 16'd127;                   // chirp: no DC after last x conj(first)
    lo[1][0] = 16'd128;                   // stationary: DC
  end

  always @(negedge clk)
    for (int l = 0; l < LANES; l++)
      din[l] <= adc_t'(train_sample(ps, int'(dut.widx)*LANES + l, 0.5));

  always @(posedge clk) if (rst_n) begin
    if (ev_overrun) nover++;
    if (ev_short) nshort++;
    if (ev_tod) ntod++;
    if (rep_valid) begin
      int p;
      real tol;
      p = -1;
      foreach (ps[i]) if (iabs(int'(rep.toa) - ps[i].start/8) <= 2) p = i;
      nrep++;
      $display("report: toa=%0d pw=%0d cls=%s rate=%0.2f carrier=%0.2f", rep.toa, rep.pw,
               rep.cls.name(), real'(rep.lin_rate_q4)/16.0, real'(rep.carrier_q4)/16.0);
      if (p >= 0) begin
        tol = (0.05 * ps[p].blin + 25.0) * 16.0;
        check(iabs(int'(rep.toa) - ps[p].start/8) <= 1, "arrival window");
        check(iabs(int'(rep.pw) - ps[p].len/8) <= 2, "pulse width");
        check(rep.cls == ((ps[p].blin > 0.0) ? SIG_LINEAR : SIG_STATIONARY), "class");
        check(iabs(int'(rep.lin_rate_q4) - $rtoi(ps[p].blin * 16.0)) <= $rtoi(tol), "rate");
        check(iabs(int'(rep.carrier_q4) - $rtoi(ps[p].f0 * 16.0)) <= 30*16, "carrier");
        check(p != 4, "short pulse must not be reported");
      end else check(0, "report for no pulse");
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (int'(dut.widx) > last_end/8 + 400);
    check(nrep == NP - 1, "six pulses reported");
    check(nshort == 1, "one short pulse");
    check(nover == 0, "no overrun at 100 ns spacing");
    check(ntod == NP, "every pulse has a departure");
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
