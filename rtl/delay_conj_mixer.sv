// delay_conj_mixer: multiplies a complex sample stream by a delayed and
// conjugated copy of itself, y(n) = x(n) * conj(x(n - DELAY)).
//
// This is the chirp isolation step of the receivers: a phase term of order p
// in n becomes one of order p-1, so a linear chirp turns into a tone whose
// frequency is proportional to the chirp rate and a stationary tone turns
// into DC. DELAY is in samples and need not be a multiple of the 8 lanes: the
// last ceil(DELAY/8) words are kept in a shift register (the document's
// delay line) and each lane picks its partner from the flattened history.
// Products are trimmed back to 3 levels per component (-1, 0, +1), as the
// document keeps all samples after the Hilbert transform at 2 bits.
//
// Interface: a word is taken when `in_valid` is high; the mixed word leaves
// one clock later with `out_valid`. The history only advances on valid
// words, so y is correct once DELAY samples have entered.
module delay_conj_mixer
  import chirp_pkg::*;
#(
  parameter int DELAY = 640            // samples (250 ns at 2.56 GSPS)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplx2_t  din  [LANES],
  output logic    out_valid,
  output cplx2_t  dout [LANES]
);
  localparam int NW = (DELAY + LANES - 1) / LANES;

  cplx2_t hist [NW*LANES];
  cplx2_t flat [(NW+1)*LANES];         // flat[i]: sample base - NW*8 + i

  always_comb begin
    for (int i = 0; i < NW*LANES; i++) flat[i] = hist[i];
    for (int l = 0; l < LANES; l++)    flat[NW*LANES + l] = din[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NW*LANES; i++) hist[i] <= '0;
      for (int l = 0; l < LANES; l++) dout[l] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < NW*LANES; i++) hist[i] <= flat[i + LANES];
        for (int l = 0; l < LANES; l++)
          dout[l] <= cmul_conj(flat[NW*LANES + l], flat[NW*LANES + l - DELAY]);
      end
    end
  end
endmodule
