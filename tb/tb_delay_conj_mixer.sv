// tb_delay_conj_mixer: self-checking test of the delay-and-conjugate mixer.
//
// Feeds random 3-level complex samples, with random idle clocks between
// words, through a mixer with the default 640-sample delay and one with a
// delay that is not a multiple of 8 (213 samples). Every output sample after
// the delay line has filled is compared with x(n) * conj(x(n - D)) computed
// here in integer arithmetic and reduced to its signs; the output must come
// one clock after its input word, with out_valid following in_valid.
module tb_delay_conj_mixer;
  import chirp_pkg::*;

  localparam int NW = 300;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0;
  cplx2_t din [LANES];
  logic ov_a, ov_b;
  cplx2_t da [LANES], db [LANES];

  delay_conj_mixer dut_a (.clk, .rst_n, .in_valid, .din, .out_valid(ov_a), .dout(da));
  delay_conj_mixer #(.DELAY(213)) dut_b (.clk, .rst_n, .in_valid, .din, .out_valid(ov_b), .dout(db));

  int checks = 0, failures = 0;
  int xr [NW*LANES], xi [NW*LANES];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int s3(int v); return v > 0 ? 1 : v < 0 ? -1 : 0; endfunction

  function automatic bit word_ok(int w, int d, cplx2_t o [LANES]);
    for (int l = 0; l < LANES; l++) begin
      int n, m, er, ei;
      n = w * LANES + l; m = n - d;
      er = s3(xr[n] * xr[m] + xi[n] * xi[m]);
      ei = s3(xi[n] * xr[m] - xr[n] * xi[m]);
      if (int'(o[l].re) != er || int'(o[l].im) != ei) return 0;
    end
    return 1;
  endfunction

  initial begin
    for (int n = 0; n < NW*LANES; n++) begin
      xr[n] = $urandom_range(0, 2) - 1;
      xi[n] = $urandom_range(0, 2) - 1;
    end
    for (int l = 0; l < LANES; l++) din[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      in_valid = 1;
      for (int l = 0; l < LANES; l++)
        din[l] = '{re: 2'(xr[w*LANES + l]), im: 2'(xi[w*LANES + l])};
      @(negedge clk);                      // output of word w is now visible
      in_valid = ($urandom_range(0, 3) == 0);
      check(ov_a && ov_b, "out_valid one clock after in_valid");
      if (in_valid) begin                  // an idle clock with junk on din
        for (int l = 0; l < LANES; l++) din[l] = '{re: 2'sd1, im: 2'sd1};
        in_valid = 0;
        @(negedge clk);
      end
      if (w >= 80) check(word_ok(w, 640, da), $sformatf("delay 640 word %0d", w));
      if (w >= 27) check(word_ok(w, 213, db), $sformatf("delay 213 word %0d", w));
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
