// tb_power_meter: self-checking test of the signal / DC power meter.
//
// Runs several measurements of random length on random 3-level complex
// words, some with a DC bias, with `en` toggling at random. After each run
// the signal power sum(|re|+|im|) and DC term |sum re| + |sum im| are
// compared with sums kept here; `clear` must restart both.
module tb_power_meter;
  import chirp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic clear = 0, en = 0;
  cplx2_t din [LANES];
  logic [PWR_W-1:0] pwr, dc;

  power_meter dut (.clk, .rst_n, .clear, .en, .din, .pwr, .dc);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    for (int l = 0; l < LANES; l++) din[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 12; run++) begin
      int sp, sr, si, nw, bias;
      sp = 0; sr = 0; si = 0;
      nw = $urandom_range(1, 40);
      bias = run % 3;                       // 0: none, 1: +re, 2: -im
      @(negedge clk); clear = 1; en = 1;    // clear wins over en
      @(negedge clk); clear = 0; en = 0;
      check(pwr == 0 && dc == 0, "clear");
      for (int w = 0; w < nw; w++) begin
        en = ($urandom_range(0, 3) != 0);
        for (int l = 0; l < LANES; l++) begin
          int r, i;
          r = $urandom_range(0, 2) - 1; i = $urandom_range(0, 2) - 1;
          if (bias == 1 && $urandom_range(0, 1) == 1) r = 1;
          if (bias == 2 && $urandom_range(0, 1) == 1) i = -1;
          din[l] = '{re: 2'(r), im: 2'(i)};
          if (en) begin sp += iabs(r) + iabs(i); sr += r; si += i; end
        end
        @(negedge clk);
      end
      en = 0;
      @(negedge clk);
      check(int'(pwr) == sp, $sformatf("power run %0d", run));
      check(int'(dc) == iabs(sr) + iabs(si), $sformatf("dc run %0d", run));
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
