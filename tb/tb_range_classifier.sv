// tb_range_classifier: self-checking test of the range classifier.
//
// Uses 5 measurements and 3 classes with random windows [lo, hi] and
// random measurement vectors (half of them drawn inside one class's window).
// For each vector the expected match mask, the lowest matching class and the
// `any` flag are computed here and compared with the outputs, which must
// appear one clock after `start`; disabled classes must never match.
module tb_range_classifier;
  import chirp_pkg::*;

  localparam int NM = 5, NC = 3;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic start = 0;
  logic [MEAS_W-1:0] meas [NM];
  logic [MEAS_W-1:0] lo [NC][NM], hi [NC][NM];
  logic [NC-1:0] cls_en;
  logic valid, any;
  logic [1:0] cls;
  logic [NC-1:0] match;

  range_classifier #(.NMEAS(NM), .NCLASS(NC)) dut (
    .clk, .rst_n, .start, .meas, .lo, .hi, .cls_en, .valid, .any, .cls, .match
  );

  int checks = 0, failures = 0, nany = 0, nnone = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cls_en = '1;
    for (int m = 0; m < NM; m++) meas[m] = '0;
    for (int c = 0; c < NC; c++)
      for (int m = 0; m < NM; m++) begin
        int a, b;
        a = $urandom_range(0, 60000); b = $urandom_range(0, 60000);
        lo[c][m] = MEAS_W'(a < b ? a : b);
        hi[c][m] = MEAS_W'(a < b ? b : a);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [NC-1:0] em;
      int ec;
      @(negedge clk);
      cls_en = (t % 50 == 49) ? NC'($urandom_range(0, 7)) : cls_en;
      for (int m = 0; m < NM; m++) begin
        int c;
        c = $urandom_range(0, NC - 1);
        meas[m] = (t % 2 == 0) ? MEAS_W'($urandom_range(lo[c][m], hi[c][m]))
                               : MEAS_W'($urandom_range(0, 65535));
        if (t % 2 == 0) begin
          c = t % NC;
          meas[m] = MEAS_W'($urandom_range(lo[c][m], hi[c][m]));
        end
      end
      em = '0;
      for (int c = 0; c < NC; c++) begin
        em[c] = cls_en[c];
        for (int m = 0; m < NM; m++)
          if (meas[m] < lo[c][m] || meas[m] > hi[c][m]) em[c] = 0;
      end
      ec = 0;
      for (int c = NC - 1; c >= 0; c--) if (em[c]) ec = c;
      start = 1;
      @(negedge clk);
      start = 0;
      check(valid, "valid one clock after start");
      check(match == em, "match mask");
      check(any == (em != 0), "any");
      if (em != 0) begin check(int'(cls) == ec, "first matching class"); nany++; end
      else nnone++;
      @(negedge clk);
      check(!valid, "valid is a single pulse");
    end
    check(nany > 20 && nnone > 20, "both outcomes exercised");
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
