// tb_toa_detector: self-checking test of the arrival / departure detector.
//
// Drives scripted window sequences (8 ADC samples per window, all of one
// magnitude with alternating signs) through four scenes:
//   1. a 200-window pulse: one arrival at its first window, one departure at
//      the first window after it, pw = 200, arrival reported no earlier than
//      64 windows (the verification span) after the arrival window;
//   2. a 20-window burst: the candidate is aborted (5 of 6 windows missing);
//   3. a pulse hitting every other window: the candidate is rejected by the
//      42-of-64 rule;
//   4. a pulse found through criterion 2 only (three strong samples per
//      window, sum below the criterion-1 threshold).
// Expected events are worked out from the scene script, not from the DUT.
module tb_toa_detector;
  import chirp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  adc_t din [LANES];
  logic [TS_W-1:0] widx = '0;
  logic toa_v, tod_v, inp, ver, rej, abt;
  logic [TS_W-1:0] toa_i, tod_i;
  logic [15:0] pw;

  toa_detector dut (
    .clk, .rst_n, .din, .win_idx(widx), .toa_valid(toa_v), .toa_idx(toa_i),
    .tod_valid(tod_v), .tod_idx(tod_i), .pw, .in_pulse(inp), .verifying(ver),
    .reject(rej), .aborted(abt)
  );

  int checks = 0, failures = 0;
  int ntoa = 0, ntod = 0, nrej = 0, nabt = 0;
  int toa_seen [$], tod_seen [$], pw_seen [$], toa_cyc [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // window script: magnitude per window, and a mode (0 all lanes, 1 three lanes)
  int mag [4000];
  bit three [4000];

  initial begin
    for (int w = 0; w < 4000; w++) begin mag[w] = 0; three[w] = 0; end
    for (int w = 100; w < 300; w++) mag[w] = 2;                 // scene 1
    for (int w = 600; w < 620; w++) mag[w] = 2;                 // scene 2
    for (int w = 900; w < 906; w++) mag[w] = 2;                 // scene 3
    for (int w = 906; w < 1100; w++) mag[w] = (w % 2 == 0) ? 2 : 0;
    for (int w = 1400; w < 1600; w++) begin mag[w] = 3; three[w] = 1; end  // scene 4
  end

  always @(negedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      int v;
      v = (three[widx] && l >= 3) ? 0 : mag[widx];
      din[l] <= adc_t'((l % 2 == 0) ? v : -v);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (rst_n) widx <= widx + 1'b1;
    if (toa_v) begin ntoa++; toa_seen.push_back(int'(toa_i)); toa_cyc.push_back(int'(widx)); end
    if (tod_v) begin ntod++; tod_seen.push_back(int'(tod_i)); pw_seen.push_back(int'(pw)); end
    if (rej) nrej++;
    if (abt) nabt++;
  end

  initial begin
    for (int l = 0; l < LANES; l++) din[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (widx == 1000);
    check(nabt == 1, "scene 2 aborted");
    wait (widx == 1300);
    check(nrej == 1, "scene 3 rejected");
    wait (widx == 1800);
    check(ntoa == 2, "two arrivals");
    check(ntod == 2, "two departures");
    if (ntoa == 2 && ntod == 2) begin
      check(toa_seen[0] == 100, "scene 1 arrival window");
      check(tod_seen[0] == 300, "scene 1 departure window");
      check(pw_seen[0] == 200, "scene 1 width");
      check(toa_cyc[0] >= 100 + 64 && toa_cyc[0] <= 100 + 72, "arrival latency 64..72 windows");
      check(toa_seen[1] == 1400, "scene 4 arrival window");
      check(pw_seen[1] == 200, "scene 4 width");
    end
    check(nabt == 1 && nrej == 1, "no extra abort / reject");
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
