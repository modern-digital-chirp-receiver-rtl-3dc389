// tb_digital_ifm: self-checking test of the digital IFM.
//
// Each measurement feeds 48 words (16 history words + 32 correlated words)
// of a complex tone reduced to signs, x(n) = (sgn cos, sgn sin)(2 pi f n / fs
// + p0), at a random frequency between -1270 and +1270 MHz and random start
// phase, with random idle clocks between words. Checked against values
// worked out here:
//   * frequency code within 2 MHz of f (modulo 2.56 GHz);
//   * signal power = 2 per sample = 512, DC term small for a tone and 512
//     for a constant input;
//   * detection variable = sum over the five correlators of |S_m|^2, which
//     is large (> 5 * 200^2) for a tone;
//   * res_valid exactly ITER + 3 = 17 clocks after the 48th word.
module tb_digital_ifm;
  import chirp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic start = 0, in_valid = 0, res_valid;
  cplx2_t din [LANES];
  ifm_result_t res;

  digital_ifm dut (.clk, .rst_n, .start, .in_valid, .din, .res_valid, .res);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic measure(real f, real p0, bit dc_in, output int lat);
    for (int w = 0; w < 48; w++) begin
      @(negedge clk);
      start = (w == 0);
      in_valid = 1;
      for (int l = 0; l < LANES; l++) begin
        real ph;
        ph = 2.0 * 3.14159265358979 * f / 2560.0 * real'(w * LANES + l) + p0;
        din[l] = dc_in ? '{re: 2'sd1, im: -2'sd1}
                       : '{re: ($cos(ph) >= 0.0) ? 2'sd1 : -2'sd1,
                           im: ($sin(ph) >= 0.0) ? 2'sd1 : -2'sd1};
      end
      if (w != 47 && $urandom_range(0, 4) == 0) begin
        @(negedge clk);
        start = 0;
        in_valid = 0;
      end
    end
    @(negedge clk);
    start = 0; in_valid = 0;
    lat = 1;
    while (!res_valid && lat < 100) begin @(negedge clk); lat++; end
  endtask

  initial begin
    for (int l = 0; l < LANES; l++) din[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      real f, got, err;
      int lat;
      f = real'($urandom_range(0, 25400)) / 10.0 - 1270.0;
      measure(f, real'($urandom_range(0, 6283)) / 1000.0, 0, lat);
      got = real'(res.freq) * 2560.0 / 65536.0;
      err = got - (f < 0.0 ? f + 2560.0 : f);
      if (err > 1280.0) err -= 2560.0;
      if (err < -1280.0) err += 2560.0;
      check(lat == 17, $sformatf("latency %0d", lat));
      check(err < 2.0 && err > -2.0, $sformatf("f=%0.1f MHz measured %0.2f", f, got));
      check(res.pwr == 12'd512, "signal power of a full-scale tone");
      check(int'(res.dc) < 96, $sformatf("tone DC term %0d", res.dc));
      check(res.detvar > 24'd200000, "detection variable of a tone");
      @(negedge clk);
      check(!res_valid, "res_valid is one clock");
    end
    begin
      int lat;
      measure(0.0, 0.0, 1, lat);
      check(res.dc == 12'd512 && res.pwr == 12'd512, "constant input is all DC");
      check(res.freq <= 16'd8 || res.freq >= 16'hFFF8, $sformatf("constant input frequency code %0d", res.freq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
