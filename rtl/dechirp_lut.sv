// dechirp_lut: de-chirping signal table, 1024 entries of 1-bit complex
// samples, delivered 8 samples per clock.
//
// Entry `idx` de-chirps a rate B = 40 MHz + idx * 1150/1023 MHz (about
// 1.12 MHz steps, up to 1190 MHz) per chirp period of 400 ns (ORDER = 2,
// linear) or 400 ns^2 (ORDER = 3, nonlinear). Sample n (from the arrival) is
//     d(n) = exp(-j 2 pi phi(n)),
//     phi(n) = b n^2 / 2048            (ORDER 2)
//     phi(n) = b n^3 / (3 * 2^20)      (ORDER 3),   b = B / 2.56 GHz,
// which is minus the chirp phase (1/2) a t^2 or (1/3) beta t^3 of the
// document's signal model with a period of 1024 samples. Each component is
// kept as its sign (1 bit, +-1), as in the document's table.
//
// The document stores 1024 x 384 (or x 704) samples in memory; here the same
// entries are computed on the fly from idx and the sample number with one
// phase multiplier per lane, which gives identical contents without a
// 0.8 Mbit ROM. Phases are 32-bit turn fractions.
//
// Timing: present `idx` and `word` (samples 8*word .. 8*word+7); `dout` is
// registered and valid one clock later.
module dechirp_lut
  import chirp_pkg::*;
#(
  parameter int ORDER = 2            // 2: linear table, 3: nonlinear table
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IDX_W-1:0]  idx,
  input  logic [6:0]        word,
  output cplx2_t            dout [LANES]
);
  localparam longint B0    = longint'(LUT_F0_MHZ   / FS_MHZ * 4294967296.0);
  localparam longint BSTEP = longint'(LUT_STEP_MHZ / FS_MHZ * 4294967296.0);

  logic [31:0] b32;
  assign b32 = 32'(B0) + 32'(idx) * 32'(BSTEP);

  cplx2_t d [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [9:0]  n;
      logic [63:0] pw, prod;
      logic [31:0] ph;
      n = {word, 3'(l)};
      if (ORDER == 3) begin
        pw   = 64'(n) * 64'(n) * 64'(n);
        prod = 64'(b32) * pw;
        ph   = 32'((prod >> 20) / 64'd3);
      end else begin
        pw   = 64'(n) * 64'(n);
        prod = 64'(b32) * pw;
        ph   = 32'(prod >> 11);
      end
      d[l].re = (ph[31] ^ ph[30]) ? -2'sd1 : 2'sd1;   // sign of cos
      d[l].im = ph[31] ? 2'sd1 : -2'sd1;              // sign of -sin
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int l = 0; l < LANES; l++) dout[l] <= '0;
    else        dout <= d;
  end
endmodule
