// tb_chirp_correction: self-checking test of the pulse-width correction.
//
// Random IFM codes and pulse widths (1024 to 60000 samples) are applied and
// the outputs are compared with an integer reference computed here:
//     Bc = floor(F1 * PW / (PW - 384))            (saturated to 18 bits;
//                                                  F1 signed, rate 0 if < 0)
//     rate (MHz x16) = Bc * 2560 * 16 / 65536
//     Cc = ((F2 - floor(Bc * 384 / PW)) mod 2^16) / 2
//     carrier (MHz x16) = Cc * 2560 * 16 / 65536
// `done` must follow `start` within 80 clocks (two 32-step divisions).
module tb_chirp_correction;
  import chirp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic start = 0, done;
  logic [15:0] f_rate, f_carr, pw, rate_q4, carrier_q4;

  chirp_correction dut (
    .clk, .rst_n, .start, .f_rate, .f_carr, .pw_samp(pw), .done, .rate_q4, .carrier_q4
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    f_rate = '0; f_carr = '0; pw = 16'd1024;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      longint bc, q, cc, er, ec;
      int cyc;
      @(negedge clk);
      f_rate = 16'($urandom_range(0, 65535));
      f_carr = 16'($urandom_range(0, 65535));
      pw     = (t % 4 == 0) ? 16'($urandom_range(1024, 1100)) : 16'($urandom_range(1024, 60000));
      if (t < 4) f_rate = 16'(t * 1000);
      if (t >= 4 && t < 8) f_rate = 16'(65536 - t * 3);
      if (f_rate < 16'h8000) begin
        bc = (longint'(f_rate) * longint'(pw)) / longint'(pw - 16'd384);
        if (bc > 262143) bc = 262143;
        q  = (bc * 384) / longint'(pw);
        er = (bc * 5) >> 3; if (er > 65535) er = 65535;
      end else begin                              // falling: signed F1
        bc = (longint'(65536 - int'(f_rate)) * longint'(pw)) / longint'(pw - 16'd384);
        q  = -((bc * 384) / longint'(pw));
        er = 0;
      end
      cc = ((longint'(f_carr) - q) % 65536 + 65536) % 65536 / 2;
      ec = (cc * 5) >> 3;
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 200) begin @(negedge clk); cyc++; end
      check(cyc <= 80, "latency");
      check(longint'(rate_q4) == er, $sformatf("rate F1=%0d PW=%0d", f_rate, pw));
      check(longint'(carrier_q4) == ec, $sformatf("carrier F2=%0d", f_carr));
    end
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
