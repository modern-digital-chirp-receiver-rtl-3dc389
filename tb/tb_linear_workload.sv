// tb_linear_workload: the linear chirp receiver over its whole measurement
// range, as a 500 ns pulse train.
//
// Forty 400 ns pulses arrive 500 ns apart, at an amplitude of 5 LSB with
// 0.5 LSB noise. Half are linear chirps, with a rate drawn from 50-1180 MHz
// per 400 ns and a start frequency that keeps the sweep inside 50-1230 MHz.
// The other half are tones at 50-1230 MHz. All values come from $urandom.
// Every pulse must be reported with the right class, arrival window and pulse
// width. Rate and carrier errors are collected: each must be below 2 MHz on
// at least 95% of the pulses, and below 1 MHz on average. The error
// statistics are printed.
module tb_linear_workload;
  import chirp_pkg::*;
  import tb_chirp_pkg::*;

  localparam int NP  = 40;
  localparam int PRI = 1280;          // 500 ns

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  adc_t din [LANES];
  logic [MEAS_W-1:0] lo [2][5], hi [2][5];
  logic rep_valid, ev_toa, ev_overrun, ev_dechirp, ev_noclass;
  rx_report_t rep;

  linear_chirp_receiver dut (
    .clk, .rst_n, .din, .dc_chirp_max(12'd128), .cls_lo(lo), .cls_hi(hi),
    .cls_en(2'b11), .rep_valid, .rep, .ev_toa, .ev_overrun, .ev_dechirp,
    .ev_noclass
  );

  pulse_t ps[$];
  int checks = 0, failures = 0, nrep = 0, nrate = 0, ncar = 0, nbad_r = 0, nbad_c = 0;
  real sum_er = 0.0, sum_ec = 0.0, max_er = 0.0, max_ec = 0.0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    for (int i = 0; i < NP; i++) begin
      real b, f;
      if (i % 2 == 0) begin
        b = 50.0 + real'($urandom_range(0, 1130));
        f = 50.0 + real'($urandom_range(0, (b > 1180.0) ? 0 : int'(1180.0 - b)));
      end else begin
        b = 0.0;
        f = 50.0 + real'($urandom_range(0, 1180));
      end
      ps.push_back('{start: 800 + i*PRI, len: 1024, amp: 5.0, f0: f, blin: b, bnl: 0.0,
                     period: 1024.0});
    end
    lo[0] = '{16'd0,   16'd0, 16'd0, 16'd640,  16'd0};
    hi[0] = '{16'd127, 16'hFFFF, 16'hFFFF, 16'd19040, 16'hFFFF};
    lo[1] = '{16'd128, 16'd0, 16'd0, 16'd0,    16'd640};
    hi[1] = '{16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF, 16'd19840};
  end

  always @(negedge clk)
    for (int l = 0; l < LANES; l++)
      din[l] <= adc_t'(train_sample(ps, int'(dut.widx)*LANES + l, 0.5));

  always @(posedge clk) if (rst_n) begin
    if (rep_valid) begin
      int p;
      real er, ec;
      p = (int'(rep.toa) * 8 - 800 + PRI/2) / PRI;
      nrep++;
      if (p >= 0 && p < NP) begin
        check(iabs(int'(rep.toa) - ps[p].start/8) <= 1, "arrival window");
        check(iabs(int'(rep.pw) - ps[p].len/8) <= 2, "pulse width");
        check(rep.cls == (ps[p].blin > 0.0 ? SIG_LINEAR : SIG_STATIONARY),
              $sformatf("class of pulse %0d (f0 %0.0f, B %0.0f)", p, ps[p].f0, ps[p].blin));
        ec = real'(rep.carrier_q4) / 16.0 - ps[p].f0;
        ec = ec < 0.0 ? -ec : ec;
        sum_ec += ec; ncar++;
        if (ec > max_ec) max_ec = ec;
        if (ec > 2.0) nbad_c++;
        if (ps[p].blin > 0.0) begin
          er = real'(rep.lin_rate_q4) / 16.0 - ps[p].blin;
          er = er < 0.0 ? -er : er;
          sum_er += er; nrate++;
          if (er > max_er) max_er = er;
          if (er > 2.0) nbad_r++;
        end
      end else check(0, "report for no pulse");
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (int'(dut.widx) > (800 + NP*PRI)/8 + 300);
    $display("rate: %0d pulses, mean error %0.2f MHz, max %0.2f MHz, %0d above 2 MHz",
             nrate, sum_er / (nrate > 0 ? nrate : 1), max_er, nbad_r);
    $display("carrier: %0d pulses, mean error %0.2f MHz, max %0.2f MHz, %0d above 2 MHz",
             ncar, sum_ec / (ncar > 0 ? ncar : 1), max_ec, nbad_c);
    check(nrep == NP, $sformatf("%0d of %0d pulses reported", nrep, NP));
    check(nrate == NP/2, "every chirp measured");
    check(nbad_r * 20 <= nrate, "rate within 2 MHz on 95% of chirps");
    check(nbad_c * 20 <= ncar, "carrier within 2 MHz on 95% of pulses");
    check(sum_er < 1.0 * real'(nrate), "mean rate error below 1 MHz");
    check(sum_ec < 1.0 * real'(ncar), "mean carrier error below 1 MHz");
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
