// digital_ifm: digital instantaneous frequency measurement of a complex stream.
//
// Five autocorrelators S_m = sum x(n) * conj(x(n-m)), m = 1, 2, 8, 32, 128,
// are accumulated over NSAMP = 256 samples. Each sum has phase m*w (w = the
// signal frequency in radians per sample), found with one CORDIC per
// correlator. S1 maps to frequency without ambiguity; each longer delay is
// unwrapped with the estimate of the previous one:
//     z_m = round(m*f_prev - theta_m),  f_m = (theta_m + z_m) / m   (in turns)
// and f_128 is the result. Because all delays are powers of two, the
// multiplications and divisions by m are shifts. The IFM also reports the
// signal power sum |x|, the DC term |sum x| (through power_meter) and the
// detection variable sum_m |S_m|^2.
//
// The correlator set, 256-sample sum, 2-bit input samples, zone mapping and
// the power / DC / detection-variable outputs follow the document. The
// conjugate is placed on the delayed sample (so a positive frequency gives a
// positive phase), the zone rounding is taken on m*f_prev - theta_m, the
// phase is found with a CORDIC and frequencies carry 24 fractional bits;
// these are this design's choices.
//
// Timing: pulse `start` together with the first of 48 valid words
// (in_valid). Words 0..15 only fill the 128-sample history, words 16..47 are
// accumulated (384 samples = 150 ns at 2.56 GSPS, as in the document).
// `res_valid` pulses ITER+3 clocks after the 48th word. Invalid clocks
// between words are allowed; a new `start` aborts a measurement in progress.
module digital_ifm
  import chirp_pkg::*;
#(
  parameter int NSAMP = 256,     // samples correlated per measurement
  parameter int ITER  = 14       // CORDIC iterations
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_valid,
  input  cplx2_t      din [LANES],
  output logic        res_valid,
  output ifm_result_t res
);
  localparam int NDLY  = 5;
  localparam int MAXD  = 128;
  localparam int HW    = MAXD / LANES;           // history words
  localparam int NW    = HW + NSAMP / LANES;     // words per measurement
  localparam int ACC_W = $clog2(NSAMP) + 3;      // |sum| <= 2*NSAMP
  localparam int FB    = 24;                     // fractional bits of f

  // delay m = 2^dsh(k)
  function automatic int dsh(input int k);
    case (k)
      0: return 0; 1: return 1; 2: return 3; 3: return 5; default: return 7;
    endcase
  endfunction

  // ---------------------------------------------------------------- history
  cplx2_t hist [HW*LANES];      // hist[i] = sample at (current word base) - HW*LANES + i
  cplx2_t flat [(HW+1)*LANES];

  always_comb begin
    for (int i = 0; i < HW*LANES; i++) flat[i] = hist[i];
    for (int l = 0; l < LANES; l++)    flat[HW*LANES + l] = din[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HW*LANES; i++) hist[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < HW*LANES; i++) hist[i] <= flat[i + LANES];
    end
  end

  // ------------------------------------------------------ per-word products
  logic signed [5:0] wre [NDLY];
  logic signed [5:0] wim [NDLY];

  always_comb begin
    for (int k = 0; k < NDLY; k++) begin
      wre[k] = '0; wim[k] = '0;
      for (int l = 0; l < LANES; l++) begin
        cplx2_t a, b;
        a = flat[HW*LANES + l];
        b = flat[HW*LANES + l - (1 << dsh(k))];
        wre[k] = wre[k] + 6'(a.re * b.re) + 6'(a.im * b.im);
        wim[k] = wim[k] + 6'(a.im * b.re) - 6'(a.re * b.im);
      end
    end
  end

  // ------------------------------------------------------------- control
  logic [$clog2(NW+1)-1:0] cnt;
  logic active, acc_en, launch;
  logic signed [ACC_W-1:0] acc_re [NDLY];
  logic signed [ACC_W-1:0] acc_im [NDLY];

  assign acc_en = active && in_valid && !start && (int'(cnt) >= HW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; cnt <= '0; launch <= 1'b0;
      for (int k = 0; k < NDLY; k++) begin acc_re[k] <= '0; acc_im[k] <= '0; end
    end else begin
      launch <= 1'b0;
      if (start && in_valid) begin
        active <= 1'b1;
        cnt    <= 1;
        for (int k = 0; k < NDLY; k++) begin acc_re[k] <= '0; acc_im[k] <= '0; end
      end else if (active && in_valid) begin
        if (acc_en) begin
          for (int k = 0; k < NDLY; k++) begin
            acc_re[k] <= acc_re[k] + ACC_W'(wre[k]);
            acc_im[k] <= acc_im[k] + ACC_W'(wim[k]);
          end
        end
        if (int'(cnt) == NW - 1) begin
          active <= 1'b0;
          launch <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  logic [PWR_W-1:0] pwr_w, dc_w;
  logic [FREQ_W-1:0] freq_q;
  logic [DV_W-1:0] detvar_r;

  power_meter u_pwr (
    .clk, .rst_n, .clear(start), .en(acc_en), .din,
    .pwr(pwr_w), .dc(dc_w)
  );

  // ------------------------------------------------------------ phase
  logic [15:0] theta [NDLY];
  logic [NDLY-1:0] cdone;

  for (genvar k = 0; k < NDLY; k++) begin : g_cordic
    cordic_atan2 #(.IN_W(ACC_W), .ANG_W(16), .ITER(ITER)) u_cordic (
      .clk, .rst_n, .start(launch), .x(acc_re[k]), .y(acc_im[k]),
      .done(cdone[k]), .angle(theta[k])
    );
  end

  // ----------------------------------------------- detection variable
  logic [DV_W-1:0] detvar_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) detvar_q <= '0;
    else if (launch) begin
      logic [DV_W-1:0] s;
      s = '0;
      for (int k = 0; k < NDLY; k++)
        s = s + DV_W'(acc_re[k] * acc_re[k]) + DV_W'(acc_im[k] * acc_im[k]);
      detvar_q <= s;
    end
  end

  // ------------------------------------------------------ zone mapping
  logic signed [39:0] f_est [NDLY];
  always_comb begin
    f_est[0] = 40'(signed'(theta[0])) <<< (FB - 16);
    for (int k = 1; k < NDLY; k++) begin
      logic signed [39:0] p, t, d, z;
      int sh;
      sh = dsh(k);
      p  = f_est[k-1] <<< sh;                       // m * f_prev
      t  = 40'({theta[k], 8'b0});                   // theta_m in [0,1)
      d  = p - t + (40'sd1 <<< (FB - 1));
      z  = d >>> FB;                                // zone number
      f_est[k] = ((z <<< FB) + t) >>> sh;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      freq_q    <= '0;
      detvar_r  <= '0;
    end else begin
      res_valid <= &cdone;
      if (&cdone) begin
        freq_q   <= f_est[NDLY-1][FB-1 -: FREQ_W];
        detvar_r <= detvar_q;
      end
    end
  end

  assign res = '{freq: freq_q, pwr: pwr_w, dc: dc_w, detvar: detvar_r};
endmodule
