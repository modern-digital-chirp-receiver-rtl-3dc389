// tb_linear_chirp_receiver: end-to-end test of the linear chirp receiver.
//
// Drives a train of 400 ns pulses 500 ns apart (the document's test set-up):
// linear chirps and stationary tones with a little noise. Every pulse must be
// reported (so one pulse is handled within the 500 ns repetition interval),
// with the right class, its arrival window, a chirp rate within 15 MHz per
// 400 ns and a carrier within 15 MHz of the generated values.
module tb_linear_chirp_receiver;
  import chirp_pkg::*;
  import tb_chirp_pkg::*;

  localparam int NP = 5;
  localparam int PRI = 1280;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  adc_t din [LANES];
  logic [PWR_W-1:0] dc_max;
  logic [MEAS_W-1:0] lo [2][5], hi [2][5];
  logic rep_valid, ev_toa, ev_overrun, ev_dechirp, ev_noclass;
  rx_report_t rep;

  linear_chirp_receiver dut (
    .clk, .rst_n, .din, .dc_chirp_max(dc_max), .cls_lo(lo), .cls_hi(hi),
    .cls_en(2'b11), .rep_valid, .rep, .ev_toa, .ev_overrun, .ev_dechirp,
    .ev_noclass
  );

  pulse_t ps[$];
  int checks = 0, failures = 0, nrep = 0, ndech = 0;
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    static real f0s [NP] = '{200.0, 500.0, 400.0, 900.0, 100.0};
    static real bs  [NP] = '{600.0, 0.0,   300.0, 0.0,  1000.0};
    for (int i = 0; i < NP; i++)
      ps.push_back('{start: 800 + i*PRI, len: 1024, amp: 5.0, f0: f0s[i],
                     blin: bs[i], bnl: 0.0, period: 1024.0});
    dc_max = 12'd128;
    // class 0: linear chirp, class 1: stationary
    lo[0] = '{16'd0,   16'd0, 16'd0, 16'd640,  16'd0};
    hi[0] = '{16'd127, 16'hFFFF, 16'hFFFF, 16'd19040, 16'hFFFF};
    lo[1] = '{16'd128, 16'd0, 16'd0, 16'd0,    16'd800};
    hi[1] = '{16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF, 16'd19680};
  end

  always @(negedge clk) begin
    for (int l = 0; l < LANES; l++) din[l] <= adc_t'(train_sample(ps, int'(dut.widx)*LANES + l, 0.5));
    cyc <= cyc + 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_dechirp) ndech++;
    if (rep_valid) begin
      int p, exp_rate, exp_car;
      p = (int'(rep.toa) * 8 - 800 + PRI/2) / PRI;
      nrep++;
      $display("report: toa=%0d cls=%s rate=%0.2f MHz carrier=%0.2f MHz", rep.toa,
               rep.cls.name(), real'(rep.lin_rate_q4)/16.0, real'(rep.carrier_q4)/16.0);
      if (p >= 0 && p < NP) begin
        exp_rate = $rtoi(ps[p].blin * 16.0);
        exp_car  = $rtoi(ps[p].f0 * 16.0);
        check(iabs(int'(rep.toa) - ps[p].start/8) <= 1, "arrival window");
        check(iabs(int'(rep.pw) - ps[p].len/8) <= 2, "pulse width");
        check(rep.cls == (ps[p].blin > 0.0 ? SIG_LINEAR : SIG_STATIONARY), "class");
        check(iabs(int'(rep.lin_rate_q4) - exp_rate) <= 15*16, "chirp rate");
        check(iabs(int'(rep.carrier_q4) - exp_car) <= 15*16, "carrier");
      end else check(0, "report for no pulse");
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (cyc > (800 + NP*PRI)/8 + 300);
    check(nrep == NP, "one report per pulse at 500 ns PRI");
    check(ndech == 3, "three pulses de-chirped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
