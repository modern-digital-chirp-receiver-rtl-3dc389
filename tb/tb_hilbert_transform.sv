// tb_hilbert_transform: self-checking test of the 43-tap Hilbert transform.
//
// Part 1 feeds 400 words of random 4-bit samples and compares every output
// sample with a reference computed here from the filter definition: odd
// taps round(64/k), the 0.5625 gain correction and the 2-LSB trim. The reference
// uses its own integer arithmetic on the whole sample record, with zeros
// before the first sample. The output for input word k is expected 4 clocks
// after the word is presented (HT_LAT).
// Part 2 feeds a 300 MHz tone and checks that consecutive output samples
// rotate by +42 degrees on average (positive frequency, analytic signal).
module tb_hilbert_transform;
  import chirp_pkg::*;

  localparam int NW = 400;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  adc_t din [LANES];
  cplx2_t dout [LANES];

  hilbert_transform dut (.clk, .rst_n, .din, .dout);

  int checks = 0, failures = 0, mism = 0;
  int x [NW*LANES];
  bit tone = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int xs(int n);
    return (n < 0 || n >= NW*LANES) ? 0 : x[n];
  endfunction

  function automatic int trim(int v64);   // v in 1/64 LSB
    return (v64 >= 128) ? 1 : (v64 <= -128) ? -1 : 0;
  endfunction

  function automatic int ref_q(int n);
    int acc;
    acc = 0;
    for (int k = 1; k <= 21; k += 2)
      acc += ((128 + k) / (2 * k)) * (xs(n - k) - xs(n + k));
    return trim((acc >>> 1) + (acc >>> 4));
  endfunction

  int cur;
  real rot_re = 0.0, rot_im = 0.0;
  cplx2_t last;

  initial begin
    for (int n = 0; n < NW*LANES; n++) x[n] = $urandom_range(0, 14) - 7;
    for (int l = 0; l < LANES; l++) din[l] = '0;
    last = '0;
    cur = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // drive word `cur` at negedge; after the following posedge, dout holds
  // output word cur - 3, i.e. the 4th word counted from its input
  always @(negedge clk) if (rst_n) begin
    if (!tone && cur >= 1) begin
      int ow;
      ow = cur - 1 - 3;
      if (ow >= 0) begin
        int bad;
        bad = 0;
        for (int l = 0; l < LANES; l++) begin
          int n;
          n = ow * LANES + l;
          if (int'(dout[l].re) != trim(xs(n) * 64) || int'(dout[l].im) != ref_q(n)) bad++;
        end
        mism += bad;
        check(bad == 0, $sformatf("output word %0d", ow));
      end
    end
    if (tone && cur >= 8)
      for (int l = 0; l < LANES; l++) begin
        rot_re += real'(dout[l].re * last.re + dout[l].im * last.im);
        rot_im += real'(dout[l].im * last.re - dout[l].re * last.im);
        last = dout[l];
      end
    for (int l = 0; l < LANES; l++) begin
      if (!tone) din[l] <= (cur < NW) ? adc_t'(x[cur*LANES + l]) : '0;
      else din[l] <= adc_t'($rtoi(5.0 * $cos(2.0 * 3.14159265 * 300.0 / 2560.0
                                              * real'(cur * LANES + l)) + 7.5) - 7);
    end
    cur++;
  end

  initial begin
    wait (cur == NW + 4);
    check(mism == 0, "random input matches reference");
    if (mism != 0) $display("mismatching samples: %0d", mism);
    @(negedge clk); tone = 1; cur = 0;
    wait (cur == 200);
    begin
      real ang;
      ang = $atan2(rot_im, rot_re) * 180.0 / 3.14159265;
      $display("tone rotation %0.1f deg per sample", ang);
      check(ang > 30.0 && ang < 55.0, "300 MHz tone rotates by about +42 degrees");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
