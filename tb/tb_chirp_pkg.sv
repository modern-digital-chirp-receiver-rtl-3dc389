// tb_chirp_pkg: stimulus helpers shared by the chirp receiver testbenches.
//
// Builds 4-bit ADC samples of pulsed signals at 2.56 GSPS:
//   x(n) = A cos(2 pi phi(n)) + noise, quantised to -7..7,
//   phi(n) = f0/fs n + 1/2 (Blin/fs)/P n^2 + 1/3 (Bnl/fs)/P^2 n^3,
// where Blin is the frequency swept in P samples by the linear term and Bnl
// the frequency swept in P samples by the cubic term (P = 1024 samples =
// 400 ns for the fixed-width receivers, P = the pulse width for the variable
// receiver). Noise is a sum of four uniform variates (near Gaussian).
package tb_chirp_pkg;
  localparam real FS = 2560.0;   // MHz

  typedef struct {
    int  start;      // first sample
    int  len;        // samples
    real amp;
    real f0;         // MHz
    real blin;       // MHz per period
    real bnl;        // MHz per period^2
    real period;     // samples
  } pulse_t;

  function automatic real pulse_phase(pulse_t p, int n);
    real t;
    t = real'(n - p.start);
    return p.f0 / FS * t
         + 0.5 * (p.blin / FS) / p.period * t * t
         + (1.0 / 3.0) * (p.bnl / FS) / (p.period * p.period) * t * t * t;
  endfunction

  function automatic real noise(real sigma);
    real s;
    s = 0.0;
    for (int i = 0; i < 4; i++) s += (real'($urandom_range(0, 65535)) / 65535.0) - 0.5;
    return s * sigma * 1.732;   // four uniforms of variance 1/12 each
  endfunction

  function automatic int quant4(real v);
    int q;
    q = $rtoi(v + (v >= 0.0 ? 0.5 : -0.5));
    if (q > 7) q = 7;
    if (q < -7) q = -7;
    return q;
  endfunction

  // Sample n of a train of pulses plus noise.
  function automatic int train_sample(pulse_t ps[$], int n, real sigma);
    real v;
    v = noise(sigma);
    foreach (ps[i])
      if (n >= ps[i].start && n < ps[i].start + ps[i].len)
        v += ps[i].amp * $cos(2.0 * 3.14159265358979 * pulse_phase(ps[i], n));
    return quant4(v);
  endfunction
endpackage
