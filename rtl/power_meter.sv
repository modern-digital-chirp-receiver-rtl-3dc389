// power_meter: signal power and DC power of a complex 2-bit sample stream.
//
// Accumulates, over the words presented with `en`, the signal power
// sum |x(n)| and the DC term |sum x(n)|. |x| is taken as |re| + |im| (0, 1 or
// 2 for 3-level samples) and the DC magnitude as |sum re| + |sum im|; the
// document defines both sums but not how the complex magnitude is formed, so
// the L1 norm is this design's choice. `clear` restarts both sums (it wins
// over `en`). Results are registered: they include a word one clock after its
// `en`.
module power_meter
  import chirp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  cplx2_t            din [LANES],
  output logic [PWR_W-1:0]  pwr,
  output logic [PWR_W-1:0]  dc
);
  logic signed [PWR_W:0] sum_re, sum_im;
  logic [PWR_W-1:0]      acc_pwr;

  logic [4:0]        w_pwr;
  logic signed [4:0] w_re, w_im;

  always_comb begin
    w_pwr = '0; w_re = '0; w_im = '0;
    for (int l = 0; l < LANES; l++) begin
      w_re  = w_re + 5'(din[l].re);
      w_im  = w_im + 5'(din[l].im);
      w_pwr = w_pwr + 5'(din[l].re != 0) + 5'(din[l].im != 0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_re <= '0; sum_im <= '0; acc_pwr <= '0;
    end else if (clear) begin
      sum_re <= '0; sum_im <= '0; acc_pwr <= '0;
    end else if (en) begin
      sum_re  <= sum_re + (PWR_W+1)'(w_re);
      sum_im  <= sum_im + (PWR_W+1)'(w_im);
      acc_pwr <= acc_pwr + PWR_W'(w_pwr);
    end
  end

  logic [PWR_W:0] abs_re, abs_im;
  assign abs_re = sum_re < 0 ? -sum_re : sum_re;
  assign abs_im = sum_im < 0 ? -sum_im : sum_im;
  assign pwr = acc_pwr;
  assign dc  = PWR_W'(abs_re + abs_im);
endmodule
