// chirp_pkg: types and constants shared by the digital chirp receivers.
//
// The receivers take a 2.56 GSPS real sample stream demultiplexed 1:8, so one
// clock (320 MHz) carries one "window" of LANES = 8 consecutive samples. Only
// the 4 most significant ADC bits are used (values -7..7). After the Hilbert
// transform every sample is complex and each component is trimmed to 2 bits
// holding -1, 0 or +1; every mixer re-trims its product to the same 3 levels.
//
// Frequencies leave an IFM as an unsigned 16-bit fraction of a turn per
// sample, i.e. code * 2.56 GHz / 65536 (39.0625 kHz per LSB). Reported chirp
// rates and carriers are in MHz with 4 fractional bits (MHz * 16).
package chirp_pkg;

  localparam int LANES   = 8;    // samples per clock (1:8 demux)
  localparam int ADC_W   = 4;    // ADC bits used by the receivers
  localparam int FREQ_W  = 16;   // IFM frequency code width (turn fraction)
  localparam int PWR_W   = 12;   // signal / DC power width (<= 512 over 256 samples)
  localparam int DV_W    = 24;   // IFM detection variable width
  localparam int MEAS_W  = 16;   // classifier measurement width
  localparam int IDX_W   = 10;   // de-chirp table index (1024 entries)
  localparam int TS_W    = 32;   // window timestamp width
  localparam int HT_LAT  = 4;    // Hilbert output word k appears 4 clocks after raw word k

  // De-chirp tables: 1024 rates from 40 to 1190 MHz per chirp period.
  localparam real FS_MHZ       = 2560.0;
  localparam real LUT_F0_MHZ   = 40.0;
  localparam real LUT_STEP_MHZ = 1150.0 / 1023.0;   // about 1.12 MHz

  typedef logic signed [ADC_W-1:0] adc_t;

  // Complex sample with 2-bit components in {-1, 0, +1}.
  typedef struct packed {
    logic signed [1:0] re;
    logic signed [1:0] im;
  } cplx2_t;

  typedef cplx2_t cword_t [LANES];

  // One IFM measurement.
  typedef struct packed {
    logic [FREQ_W-1:0] freq;    // frequency, fraction of a turn per sample
    logic [PWR_W-1:0]  pwr;     // sum of |x| (|re|+|im|) over the 256 samples
    logic [PWR_W-1:0]  dc;      // |sum x| (|sum re| + |sum im|)
    logic [DV_W-1:0]   detvar;  // sum over correlators of |S_m|^2
  } ifm_result_t;

  typedef enum logic [2:0] {
    SIG_NONE       = 3'd0,
    SIG_STATIONARY = 3'd1,
    SIG_LINEAR     = 3'd2,
    SIG_NONLINEAR  = 3'd3,
    SIG_NL_LINEAR  = 3'd4
  } sig_class_t;

  // What a receiver reports for one pulse.
  typedef struct packed {
    sig_class_t        cls;
    logic [TS_W-1:0]   toa;         // window index of the time of arrival
    logic [15:0]       pw;          // pulse width in windows (0 if not measured)
    logic [15:0]       nl_rate_q4;  // nonlinear chirp rate, MHz in 400ns^2, x16
    logic [15:0]       lin_rate_q4; // linear chirp rate, MHz per chirp period, x16
    logic [15:0]       carrier_q4;  // carrier / starting frequency, MHz x16
  } rx_report_t;

  // Trim a small signed value to -1 / 0 / +1.
  function automatic logic signed [1:0] sgn3(input logic signed [3:0] v);
    return (v > 0) ? 2'sd1 : (v < 0) ? -2'sd1 : 2'sd0;
  endfunction

  // a * conj(b), re-trimmed to 3 levels per component.
  function automatic cplx2_t cmul_conj(input cplx2_t a, input cplx2_t b);
    logic signed [3:0] r, i;
    r = 4'(a.re * b.re) + 4'(a.im * b.im);
    i = 4'(a.im * b.re) - 4'(a.re * b.im);
    return '{re: sgn3(r), im: sgn3(i)};
  endfunction

  // a * b, re-trimmed to 3 levels per component.
  function automatic cplx2_t cmul(input cplx2_t a, input cplx2_t b);
    logic signed [3:0] r, i;
    r = 4'(a.re * b.re) - 4'(a.im * b.im);
    i = 4'(a.im * b.re) + 4'(a.re * b.im);
    return '{re: sgn3(r), im: sgn3(i)};
  endfunction

  // Frequency code (turn fraction) to MHz x16: code * 2560 * 16 / 65536.
  function automatic logic [15:0] code_to_mhz_q4(input logic [FREQ_W-1:0] c);
    return 16'((20'(c) * 20'd5) >> 3);
  endfunction

endpackage
