// hilbert_transform: real-to-complex conversion of the 8-sample-per-clock
// ADC stream with a 43-tap Type III Hilbert FIR.
//
// The ideal Hilbert kernel is 2/(pi*k) for odd k and 0 for even k. The
// document scales it to 1/k (unity at k = 1) and realises each coefficient
// with shift-and-add terms of at most a 6-bit shift; here coefficient k is
// round(64/k) for k = 1, 3, ..., 21, i.e. 64 21 13 9 7 6 5 4 4 3 3 in 1/64
// units, and the constant multiplications are left to synthesis as shift-
// and-add. Because the kernel is odd, each output needs only 11 products:
//     Q(c) = sum_k c_k * (x(c-k) - x(c+k))
// while the in-phase part is the centre sample, I(c) = x(c). The filter gain
// (about 1.71 over 50..1230 MHz) is corrected by the document's factor
// 1/2 + 1/16 = 0.5625, then I and Q are trimmed to 2 bits: +-1 when the
// magnitude is at least TRIM_THR ADC LSBs, 0 otherwise (the trim rule and
// threshold are this design's choice; the document only says 2 bits).
//
// Interface: one raw word of LANES samples per clock, no valid (the ADC
// stream is continuous). Output word k (samples 8k..8k+7) is registered and
// appears HT_LAT = 4 clocks after raw word k entered: 21 samples of filter
// delay rounded up to 3 words, plus the output register.
module hilbert_transform
  import chirp_pkg::*;
#(
  parameter int TRIM_THR = 2       // trim threshold, ADC LSBs (assumed)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  adc_t    din  [LANES],
  output cplx2_t  dout [LANES]
);
  localparam int HALF = 21;              // (43 - 1) / 2
  localparam int PW   = 6;               // previous words kept
  localparam int OFS  = 24;              // output centre offset behind word base

  function automatic int coef(input int k);   // round(64/k), odd k
    return (128 + k) / (2 * k);
  endfunction

  adc_t prev [PW*LANES];
  adc_t flat [(PW+1)*LANES];             // flat[i]: sample base - PW*8 + i

  always_comb begin
    for (int i = 0; i < PW*LANES; i++) flat[i] = prev[i];
    for (int l = 0; l < LANES; l++)    flat[PW*LANES + l] = din[l];
  end

  cplx2_t q_next [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      int c;
      logic signed [15:0] acc, corr, ival;
      c   = PW*LANES + l - OFS;          // index of centre sample in flat
      acc = '0;
      for (int k = 1; k <= HALF; k += 2)
        acc = acc + 16'(coef(k)) * (16'(flat[c-k]) - 16'(flat[c+k]));
      corr = (acc >>> 1) + (acc >>> 4);              // x 0.5625, 1/64 units
      ival = 16'(flat[c]) <<< 6;                     // 1/64 units
      q_next[l].re = (ival >= 16'(TRIM_THR * 64)) ? 2'sd1 :
                     (ival <= -16'(TRIM_THR * 64)) ? -2'sd1 : 2'sd0;
      q_next[l].im = (corr >= 16'(TRIM_THR * 64)) ? 2'sd1 :
                     (corr <= -16'(TRIM_THR * 64)) ? -2'sd1 : 2'sd0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PW*LANES; i++) prev[i] <= '0;
      for (int l = 0; l < LANES; l++) dout[l] <= '0;
    end else begin
      for (int i = 0; i < PW*LANES; i++) prev[i] <= flat[i + LANES];
      dout <= q_next;
    end
  end
endmodule
