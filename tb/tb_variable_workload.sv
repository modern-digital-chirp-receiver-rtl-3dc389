// tb_variable_workload: the variable chirp receiver on pulse widths from
// 400 ns to 4 us in 400 ns steps, each followed 100 ns later by the next.
//
// Ten pulses (1024 to 10240 samples) arrive with a 100 ns (256-sample) gap
// between the end of one and the start of the next, so the repetition
// interval is the pulse width plus 100 ns. Each width is sent as a linear
// chirp whose sweep over the pulse is drawn from 100-1000 MHz, from a start
// frequency that keeps it inside 50-1230 MHz; a second train sends the same
// widths as tones. Amplitude 5 LSB, noise 0.5 LSB, values from $urandom.
// Every pulse must be reported, with no overrun, with the right class,
// arrival window (+-1) and width (+-2 windows). Rate and carrier must both
// be within 3 MHz; the errors are printed.
module tb_variable_workload;
  import chirp_pkg::*;
  import tb_chirp_pkg::*;

  localparam int NW = 10;            // widths
  localparam int NP = 2 * NW;        // chirps, then tones
  localparam int GAP = 256;          // 100 ns

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
  int checks = 0, failures = 0, nrep = 0, nover = 0;
  int last_end;
  real sum_er = 0.0, sum_ec = 0.0, max_er = 0.0, max_ec = 0.0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  function automatic int find(int toa);
    foreach (ps[i]) if (iabs(toa - ps[i].start / 8) <= 2) return i;
    return -1;
  endfunction

  initial begin
    int s;
    s = 800;
    for (int i = 0; i < NP; i++) begin
      int  len;
      real b, f;
      len = 1024 * (i % NW + 1);
      if (i < NW) begin
        b = 100.0 + real'($urandom_range(0, 900));
        f = 50.0 + real'($urandom_range(0, int'(1180.0 - b)));
      end else begin
        b = 0.0;
        f = 50.0 + real'($urandom_range(0, 1180));
      end
      ps.push_back('{start: s, len: len, amp: 5.0, f0: f, blin: b, bnl: 0.0,
                     period: real'(len)});
      s += len + GAP;
    end
    last_end = s;
    for (int c = 0; c < 2; c++)
      for (int m = 0; m < 6; m++) begin lo[c][m] = 16'd0; hi[c][m] = 16'hFFFF; end
    hi[0][0] = 16'd127;
    lo[1][0] = 16'd128;
  end

  always @(negedge clk)
    for (int l = 0; l < LANES; l++)
      din[l] <= adc_t'(train_sample(ps, int'(dut.widx)*LANES + l, 0.5));

  always @(posedge clk) if (rst_n) begin
    if (ev_overrun) nover++;
    if (rep_valid) begin
      int p;
      real er, ec;
      nrep++;
      p = find(int'(rep.toa));
      check(p >= 0, "report belongs to a pulse");
      if (p >= 0) begin
        check(rep.cls == (ps[p].blin > 0.0 ? SIG_LINEAR : SIG_STATIONARY),
              $sformatf("class of pulse %0d", p));
        check(iabs(int'(rep.toa) - ps[p].start / 8) <= 1, "arrival window");
        check(iabs(int'(rep.pw) - ps[p].len / 8) <= 2, "pulse width");
        er = real'(rep.lin_rate_q4) / 16.0 - ps[p].blin;
        er = er < 0.0 ? -er : er;
        ec = real'(rep.carrier_q4) / 16.0 - ps[p].f0;
        ec = ec < 0.0 ? -ec : ec;
        check(er <= 3.0,
              $sformatf("rate of pulse %0d: %0.1f vs %0.1f", p, real'(rep.lin_rate_q4)/16.0, ps[p].blin));
        check(ec <= 3.0,
              $sformatf("carrier of pulse %0d: %0.1f vs %0.1f", p, real'(rep.carrier_q4)/16.0, ps[p].f0));
        sum_er += er; sum_ec += ec;
        if (er > max_er) max_er = er;
        if (ec > max_ec) max_ec = ec;
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (int'(dut.widx) > last_end / 8 + 400);
    $display("rate: mean error %0.2f MHz, max %0.2f MHz; carrier: mean error %0.2f MHz, max %0.2f MHz",
             sum_er / NP, max_er, sum_ec / NP, max_ec);
    check(nrep == NP, $sformatf("%0d of %0d pulses reported", nrep, NP));
    check(nover == 0, "no overrun at 100 ns spacing");
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
