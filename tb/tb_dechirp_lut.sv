// tb_dechirp_lut: self-checking test of the de-chirp signal generator.
//
// For random table entries and sample words the 1-bit complex outputs of a
// linear (ORDER 2) and a nonlinear (ORDER 3) generator are compared with
// exp(-j 2 pi phi(n)) evaluated here in floating point, with
// phi(n) = b n^2 / 2 (linear) or b n^3 / 3 (nonlinear), b = (40 MHz + idx *
// 1150/1023 MHz) / 2.56 GHz per 1024-sample period. Samples whose phase lies
// within 1e-4 turn of a sign boundary are skipped (the hardware rounds the
// rate to 32 bits). Output is registered: one clock after idx/word.
module tb_dechirp_lut;
  import chirp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [IDX_W-1:0] idx;
  logic [6:0] word;
  cplx2_t d2 [LANES], d3 [LANES];

  dechirp_lut #(.ORDER(2)) dut2 (.clk, .rst_n, .idx, .word, .dout(d2));
  dechirp_lut #(.ORDER(3)) dut3 (.clk, .rst_n, .idx, .word, .dout(d3));

  int checks = 0, failures = 0, skipped = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // returns 0 if the sample is too close to a boundary, else 1 and signs
  function automatic bit ref_bits(real ph, output int re, output int im);
    real f;
    f = ph - $floor(ph);                               // [0,1)
    if (f < 1e-4 || f > 1.0 - 1e-4 || (f > 0.25 - 1e-4 && f < 0.25 + 1e-4) ||
        (f > 0.5 - 1e-4 && f < 0.5 + 1e-4) || (f > 0.75 - 1e-4 && f < 0.75 + 1e-4))
      return 0;
    re = $cos(2.0 * 3.14159265358979 * f) >= 0.0 ? 1 : -1;
    im = -$sin(2.0 * 3.14159265358979 * f) >= 0.0 ? 1 : -1;
    return 1;
  endfunction

  initial begin
    idx = '0; word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      real b;
      int bad;
      @(negedge clk);
      idx  = (t < 2) ? IDX_W'(t * 1023) : IDX_W'($urandom_range(0, 1023));
      word = 7'($urandom_range(0, 87));
      b = (40.0 + real'(idx) * 1150.0 / 1023.0) / 2560.0;
      @(negedge clk);
      bad = 0;
      for (int l = 0; l < LANES; l++) begin
        real n;
        int re, im;
        n = real'(int'(word) * LANES + l);
        if (ref_bits(b * n * n / 2048.0, re, im)) begin
          if (int'(d2[l].re) != re || int'(d2[l].im) != im) bad++;
        end else skipped++;
        if (ref_bits(b * n * n * n / (3.0 * 1048576.0), re, im)) begin
          if (int'(d3[l].re) != re || int'(d3[l].im) != im) bad++;
        end else skipped++;
      end
      check(bad == 0, $sformatf("entry %0d word %0d", idx, word));
    end
    check(skipped < 200, "few samples skipped");
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
