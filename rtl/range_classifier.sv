// range_classifier: signal-type decision from measurement windows.
//
// Every measurement (signal power, DC power, frequency) is compared with a
// lower and an upper threshold held for each signal class; a class matches
// when all of its measurements lie within [lo, hi]. The first matching class
// (lowest number) is reported; with no match the pulse is not reported
// (`any` low). Per-class enables allow a class to be switched off. The
// lower/upper-bound scheme follows the document; its threshold values were
// found by simulation there and are inputs here, to be loaded by the user.
//
// Timing: results are registered and `valid` pulses one clock after `start`.
module range_classifier
  import chirp_pkg::*;
#(
  parameter int NMEAS  = 5,
  parameter int NCLASS = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [MEAS_W-1:0]          meas [NMEAS],
  input  logic [MEAS_W-1:0]          lo   [NCLASS][NMEAS],
  input  logic [MEAS_W-1:0]          hi   [NCLASS][NMEAS],
  input  logic [NCLASS-1:0]          cls_en,
  output logic                       valid,
  output logic                       any,
  output logic [$clog2(NCLASS+1)-1:0] cls,
  output logic [NCLASS-1:0]          match
);
  logic [NCLASS-1:0] m;

  always_comb begin
    for (int c = 0; c < NCLASS; c++) begin
      m[c] = cls_en[c];
      for (int k = 0; k < NMEAS; k++)
        if (meas[k] < lo[c][k] || meas[k] > hi[c][k]) m[c] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0; any <= 1'b0; cls <= '0; match <= '0;
    end else begin
      valid <= start;
      if (start) begin
        match <= m;
        any   <= |m;
        cls   <= '0;
        for (int c = NCLASS - 1; c >= 0; c--)
          if (m[c]) cls <= ($clog2(NCLASS+1))'(c);
      end
    end
  end
endmodule
