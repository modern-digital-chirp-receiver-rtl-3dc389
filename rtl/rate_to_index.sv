// rate_to_index: converts an IFM frequency code measured on a mixed signal
// into a chirp rate and the nearest de-chirp table entry.
//
// A chirp of B MHz per period mixed with a delayed copy of itself becomes a
// tone at GAIN * B: for a linear chirp and delay D samples GAIN = D / 1024
// (0.625 for 640 samples, 0.3125 for 320); for the nonlinear chirp after two
// mixings with delays D1 and D2, GAIN = 2 * D1 * D2 / 1024^2. The rate is
//     rate_q4 = code * 0.0390625 / GAIN * 16       (MHz x16, saturated)
// and the table entry idx = round((B - 40) / (1150/1023)), held to 0..1023.
// The delays follow the document; the fixed-point scaling (12-bit and 16-bit
// constants) is this design's choice. Purely combinational.
module rate_to_index
  import chirp_pkg::*;
#(
  parameter real GAIN = 0.625
) (
  input  logic [FREQ_W-1:0] code,
  output logic [15:0]       rate_q4,
  output logic [IDX_W-1:0]  idx
);
  localparam longint K_Q4 = longint'(FS_MHZ / 65536.0 * 16.0 / GAIN * 4096.0);
  localparam longint K_IX = longint'(65536.0 / (16.0 * LUT_STEP_MHZ));
  localparam longint OFS  = longint'(LUT_F0_MHZ * 16.0);

  logic [39:0] r_full;
  logic signed [40:0] t;

  always_comb begin
    r_full  = (40'(code) * 40'(K_Q4)) >> 12;
    rate_q4 = (r_full > 40'hFFFF) ? 16'hFFFF : 16'(r_full);
    t       = (41'(signed'({1'b0, r_full})) - 41'(OFS)) * 41'(K_IX) + 41'sd32768;
    if (t < 0)                       idx = '0;
    else if ((t >>> 16) > 41'sd1023) idx = '1;
    else                             idx = IDX_W'(t >>> 16);
  end
endmodule
