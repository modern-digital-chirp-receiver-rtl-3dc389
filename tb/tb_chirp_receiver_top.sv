// tb_chirp_receiver_top: end-to-end test of the three chirp receivers at
// their default sizes.
//
// Each receiver gets its own 2.56 GSPS pulse train (4-bit samples, noise
// sigma 0.5 LSB, amplitude 5 LSB):
//   linear    : five 400 ns pulses at a 500 ns repetition interval (chirps
//               and tones), a tone outside every class window (no class),
//               a pair of pulses 462 ns apart (overrun), a 62 ns burst
//               (candidate aborted) and two more pulses 500 ns apart;
//   nonlinear : nonlinear, linear, combined and stationary 400 ns pulses
//               1.1 us apart, then two pulses 500 ns apart (overrun);
//   variable  : chirps and a tone of 400 ns to 1.6 us, a 310 ns pulse (too
//               short) and a pulse 100 ns after the previous one.
// Every report is matched to its pulse and checked for class, arrival
// window, rates and carrier. Each mechanism is counted - arrival, departure,
// reject or abort of a candidate, linear and nonlinear de-chirping, overrun,
// unclassified pulse, short pulse, readout burst - and a mechanism that never
// happened is a failure. The readout side is ready on random clocks; the
// linear receiver's eight reports fill its report FIFO, which must then
// return them in order, while the other two FIFOs stay below full.
// Runs the top with no parameter overrides.
module tb_chirp_receiver_top;
  import chirp_pkg::*;
  import tb_chirp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  adc_t nl_din [LANES], lin_din [LANES], var_din [LANES];
  logic [MEAS_W-1:0] nl_lo [4][10], nl_hi [4][10];
  logic [MEAS_W-1:0] lin_lo [2][5], lin_hi [2][5];
  logic [MEAS_W-1:0] var_lo [2][6], var_hi [2][6];
  logic nl_rv, lin_rv, var_rv;
  rx_report_t nl_rep, lin_rep, var_rep;
  logic [4:0] nl_ev;
  logic [3:0] lin_ev;
  logic [4:0] var_ev;
  logic [2:0] rd_ready = '0, rd_valid, rd_draining, rd_drop, drain_d = '0;
  rx_report_t rd_data [3];

  chirp_receiver_top dut (
    .clk, .rst_n,
    .nl_din, .nl_nl_dc_max(12'd128), .nl_lin_dc_max(12'd128),
    .nl_cls_lo(nl_lo), .nl_cls_hi(nl_hi), .nl_cls_en(4'hF),
    .nl_rep_valid(nl_rv), .nl_rep, .nl_events(nl_ev),
    .lin_din, .lin_dc_max(12'd128), .lin_cls_lo(lin_lo), .lin_cls_hi(lin_hi),
    .lin_cls_en(2'b11), .lin_rep_valid(lin_rv), .lin_rep, .lin_events(lin_ev),
    .var_din, .var_cls_lo(var_lo), .var_cls_hi(var_hi), .var_cls_en(2'b11),
    .var_rep_valid(var_rv), .var_rep, .var_events(var_ev),
    .rd_ready, .rd_valid, .rd_data, .rd_draining, .rd_drop
  );

  rx_report_t rq [3][$];
  int n_rd [3] = '{0, 0, 0};
  int c_burst = 0, c_drop = 0;

  pulse_t lin_ps[$], nl_ps[$], var_ps[$];
  int checks = 0, failures = 0;
  int n_lin_rep = 0, n_nl_rep = 0, n_var_rep = 0;
  // mechanism counters
  int c_toa = 0, c_tod = 0, c_reject_abort = 0, c_lin_dechirp = 0, c_nl_dechirp = 0;
  int c_overrun = 0, c_noclass = 0, c_short = 0;
  int end_w;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  function automatic pulse_t mk(int st, int len, real f0, real bl, real bn, real per);
    return '{start: st, len: len, amp: 5.0, f0: f0, blin: bl, bnl: bn, period: per};
  endfunction

  function automatic int find(pulse_t ps[$], int toa);
    foreach (ps[i]) if (iabs(toa - ps[i].start / 8) <= 2) return i;
    return -1;
  endfunction

  function automatic sig_class_t exp_cls(pulse_t p);
    if (p.bnl > 0.0) return (p.blin > 0.0) ? SIG_NL_LINEAR : SIG_NONLINEAR;
    return (p.blin > 0.0) ? SIG_LINEAR : SIG_STATIONARY;
  endfunction

  initial begin
    int s;
    // ---------------- linear stream
    lin_ps.push_back(mk(800,          1024, 200.0,  600.0, 0.0, 1024.0));
    lin_ps.push_back(mk(800 + 1280,   1024, 500.0,    0.0, 0.0, 1024.0));
    lin_ps.push_back(mk(800 + 2*1280, 1024, 400.0,  300.0, 0.0, 1024.0));
    lin_ps.push_back(mk(800 + 3*1280, 1024, 900.0,    0.0, 0.0, 1024.0));
    lin_ps.push_back(mk(800 + 4*1280, 1024, 100.0, 1000.0, 0.0, 1024.0));
    lin_ps.push_back(mk(9000,         1024, 1100.0,   0.0, 0.0, 1024.0));  // no class
    lin_ps.push_back(mk(12000,        1024, 300.0,  500.0, 0.0, 1024.0));
    lin_ps.push_back(mk(12000 + 1184, 1024, 600.0,    0.0, 0.0, 1024.0));  // overrun
    lin_ps.push_back(mk(16000,         160, 300.0,    0.0, 0.0, 1024.0));  // aborted
    lin_ps.push_back(mk(18000,        1024, 700.0,  200.0, 0.0, 1024.0));
    lin_ps.push_back(mk(18000 + 1280, 1024, 350.0,    0.0, 0.0, 1024.0));
    // classes: 0 chirp, 1 tone; tones only up to 1000 MHz
    for (int c = 0; c < 2; c++)
      for (int m = 0; m < 5; m++) begin lin_lo[c][m] = 16'd0; lin_hi[c][m] = 16'hFFFF; end
    lin_hi[0][0] = 16'd127; lin_lo[0][3] = 16'd640;
    lin_lo[1][0] = 16'd128; lin_hi[1][4] = 16'd16000;

    // ---------------- nonlinear stream
    s = 800;
    nl_ps.push_back(mk(s, 1024, 300.0,   0.0, 800.0, 1024.0)); s += 2816;
    nl_ps.push_back(mk(s, 1024, 200.0, 500.0,   0.0, 1024.0)); s += 2816;
    nl_ps.push_back(mk(s, 1024, 150.0, 300.0, 600.0, 1024.0)); s += 2816;
    nl_ps.push_back(mk(s, 1024, 700.0,   0.0,   0.0, 1024.0)); s += 2816;
    nl_ps.push_back(mk(s, 1024, 250.0,   0.0, 900.0, 1024.0)); s += 1280;
    nl_ps.push_back(mk(s, 1024, 600.0,   0.0,   0.0, 1024.0));              // overrun
    for (int c = 0; c < 4; c++)
      for (int m = 0; m < 10; m++) begin nl_lo[c][m] = 16'd0; nl_hi[c][m] = 16'hFFFF; end
    nl_hi[0][2] = 16'd127; nl_lo[0][4] = 16'd128;
    nl_lo[1][2] = 16'd128; nl_hi[1][4] = 16'd127;
    nl_hi[2][2] = 16'd127; nl_hi[2][4] = 16'd127;
    nl_lo[3][0] = 16'd128; nl_lo[3][2] = 16'd128; nl_lo[3][4] = 16'd128;

    // ---------------- variable stream
    s = 800;
    var_ps.push_back(mk(s, 1024, 300.0,  400.0, 0.0, 1024.0)); s += 1024 + 2400;
    var_ps.push_back(mk(s, 2048, 500.0,  800.0, 0.0, 2048.0)); s += 2048 + 2400;
    var_ps.push_back(mk(s, 4096, 200.0,    0.0, 0.0, 4096.0)); s += 4096 + 2400;
    var_ps.push_back(mk(s, 3200, 150.0, 1000.0, 0.0, 3200.0)); s += 3200 + 2400;
    var_ps.push_back(mk(s,  800, 400.0,    0.0, 0.0,  800.0)); s += 800 + 2400;   // short
    var_ps.push_back(mk(s, 1536, 250.0,  600.0, 0.0, 1536.0)); s += 1536 + 256;
    var_ps.push_back(mk(s, 1024, 600.0,  300.0, 0.0, 1024.0)); s += 1024;         // 100 ns gap
    for (int c = 0; c < 2; c++)
      for (int m = 0; m < 6; m++) begin var_lo[c][m] = 16'd0; var_hi[c][m] = 16'hFFFF; end
    var_hi[0][0] = 16'd127; var_lo[1][0] = 16'd128;
    end_w = s / 8 + 400;
  end

  always @(negedge clk) begin
    int w;
    w = int'(dut.u_lin.widx);
    for (int l = 0; l < LANES; l++) begin
      lin_din[l] <= adc_t'(train_sample(lin_ps, w*LANES + l, 0.5));
      rd_ready   <= 3'($urandom);
      nl_din[l]  <= adc_t'(train_sample(nl_ps,  w*LANES + l, 0.5));
      var_din[l] <= adc_t'(train_sample(var_ps, w*LANES + l, 0.5));
    end
  end

  always @(posedge clk) if (rst_n) begin
    c_toa          += int'(lin_ev[0]) + int'(nl_ev[0]) + int'(var_ev[0]);
    c_tod          += int'(var_ev[1]);
    c_overrun      += int'(lin_ev[1]) + int'(nl_ev[1]) + int'(var_ev[2]);
    c_lin_dechirp  += int'(lin_ev[2]) + int'(nl_ev[3]);
    c_nl_dechirp   += int'(nl_ev[2]);
    c_noclass      += int'(lin_ev[3]) + int'(nl_ev[4]) + int'(var_ev[4]);
    c_short        += int'(var_ev[3]);
    c_reject_abort += int'(dut.u_lin.u_toa.reject) + int'(dut.u_lin.u_toa.aborted);
    if (lin_rv) rq[0].push_back(lin_rep);
    if (nl_rv)  rq[1].push_back(nl_rep);
    if (var_rv) rq[2].push_back(var_rep);
    for (int i = 0; i < 3; i++) begin
      if (rd_valid[i] && rd_ready[i]) begin
        check(rq[i].size() > 0 && rd_data[i] == rq[i][0], $sformatf("readout %0d in order", i));
        if (rq[i].size() > 0) void'(rq[i].pop_front());
        n_rd[i]++;
      end
      c_burst += int'(rd_draining[i] && !drain_d[i]);
      c_drop  += int'(rd_drop[i]);
    end
    drain_d <= rd_draining;

    if (lin_rv) begin
      int p;
      n_lin_rep++;
      p = find(lin_ps, int'(lin_rep.toa));
      $display("linear report: toa=%0d %s rate=%0.2f carrier=%0.2f", lin_rep.toa,
               lin_rep.cls.name(), real'(lin_rep.lin_rate_q4)/16.0, real'(lin_rep.carrier_q4)/16.0);
      check(p >= 0 && (p <= 6 || p >= 9), "linear report belongs to a measurable pulse");
      if (p >= 0) begin
        check(lin_rep.cls == exp_cls(lin_ps[p]), "linear class");
        check(iabs(int'(lin_rep.pw) - lin_ps[p].len / 8) <= 2, "linear pulse width");
        check(iabs(int'(lin_rep.lin_rate_q4) - $rtoi(lin_ps[p].blin * 16.0)) <= 15*16, "linear rate");
        check(iabs(int'(lin_rep.carrier_q4) - $rtoi(lin_ps[p].f0 * 16.0)) <= 15*16, "linear carrier");
      end
    end
    if (nl_rv) begin
      int p;
      n_nl_rep++;
      p = find(nl_ps, int'(nl_rep.toa));
      $display("nonlinear report: toa=%0d %s nl=%0.2f lin=%0.2f carrier=%0.2f", nl_rep.toa,
               nl_rep.cls.name(), real'(nl_rep.nl_rate_q4)/16.0, real'(nl_rep.lin_rate_q4)/16.0,
               real'(nl_rep.carrier_q4)/16.0);
      check(p >= 0 && p <= 4, "nonlinear report belongs to a measurable pulse");
      if (p >= 0) begin
        check(nl_rep.cls == exp_cls(nl_ps[p]), "nonlinear class");
        check(iabs(int'(nl_rep.pw) - nl_ps[p].len / 8) <= 2, "nonlinear pulse width");
        check(iabs(int'(nl_rep.nl_rate_q4) - $rtoi(nl_ps[p].bnl * 16.0)) <= 25*16, "nonlinear rate");
        check(iabs(int'(nl_rep.lin_rate_q4) - $rtoi(nl_ps[p].blin * 16.0)) <= 25*16, "nonlinear lin rate");
        check(iabs(int'(nl_rep.carrier_q4) - $rtoi(nl_ps[p].f0 * 16.0)) <= 25*16, "nonlinear carrier");
      end
    end
    if (var_rv) begin
      int p;
      n_var_rep++;
      p = find(var_ps, int'(var_rep.toa));
      $display("variable report: toa=%0d pw=%0d %s rate=%0.2f carrier=%0.2f", var_rep.toa,
               var_rep.pw, var_rep.cls.name(), real'(var_rep.lin_rate_q4)/16.0,
               real'(var_rep.carrier_q4)/16.0);
      check(p >= 0 && p != 4, "variable report belongs to a measurable pulse");
      if (p >= 0) begin
        check(var_rep.cls == exp_cls(var_ps[p]), "variable class");
        check(iabs(int'(var_rep.pw) - var_ps[p].len / 8) <= 2, "variable pulse width");
        check(iabs(int'(var_rep.lin_rate_q4) - $rtoi(var_ps[p].blin * 16.0))
              <= $rtoi((0.05 * var_ps[p].blin + 25.0) * 16.0), "variable rate");
        check(iabs(int'(var_rep.carrier_q4) - $rtoi(var_ps[p].f0 * 16.0)) <= 30*16, "variable carrier");
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (int'(dut.u_lin.widx) > end_w);
    check(n_lin_rep == 8, $sformatf("linear reports %0d of 8", n_lin_rep));
    check(n_nl_rep == 5,  $sformatf("nonlinear reports %0d of 5", n_nl_rep));
    check(n_var_rep == 6, $sformatf("variable reports %0d of 6", n_var_rep));
    $display("mechanisms: toa=%0d tod=%0d reject/abort=%0d lin-dechirp=%0d nl-dechirp=%0d overrun=%0d noclass=%0d short=%0d burst=%0d",
             c_toa, c_tod, c_reject_abort, c_lin_dechirp, c_nl_dechirp, c_overrun, c_noclass, c_short, c_burst);
    check(c_burst > 0, "readout burst");
    check(c_burst == 1 && c_drop == 0, "one burst, nothing dropped");
    check(n_rd[0] == 8 && n_rd[1] == 0 && n_rd[2] == 0,
          $sformatf("reports read out %0d/%0d/%0d, expected 8/0/0", n_rd[0], n_rd[1], n_rd[2]));
    check(c_toa > 0, "arrival detected");
    check(c_tod > 0, "departure detected");
    check(c_reject_abort > 0, "candidate rejected or aborted");
    check(c_lin_dechirp > 0, "linear de-chirp");
    check(c_nl_dechirp > 0, "nonlinear de-chirp");
    check(c_overrun > 0, "overrun");
    check(c_noclass > 0, "unclassified pulse");
    check(c_short > 0, "short pulse");
    check(c_overrun == 2, "one overrun in the linear and one in the nonlinear receiver");
    check(c_noclass == 1, "one unclassified pulse");
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
