// linear_chirp_receiver: measures the linear chirp rate and the carrier
// (starting) frequency of short pulses, or the carrier of a stationary pulse.
//
// Data path (8 samples per clock, 320 MHz for 2.56 GSPS):
//   ADC words -> toa_detector                       (arrival of a pulse)
//   ADC words -> hilbert_transform -> 2-bit complex stream s(n)
//   s -> delay_conj_mixer (640 samples = 250 ns) -> IFM1   (chirp tone)
//   s -> sample_ring_buffer                          (replay of the pulse start)
//   replayed s(0..383) * de-chirp(idx) -> IFM2            (carrier)
//   IFM1/IFM2 power, DC and frequencies -> range_classifier -> report
// A linear chirp of B MHz per 400 ns mixed with itself 640 samples later is a
// tone at 0.625 B, which IFM1 measures on samples 640..1023 of the pulse
// (128-sample history + 256 correlated samples, so the pulse must last
// 400 ns). A stationary pulse becomes DC instead. When IFM1's DC term is below
// `dc_chirp_max` a chirp is taken as present, the nearest of the 1024 de-chirp
// signals is selected and the first 384 samples are de-chirped before IFM2;
// otherwise they pass unchanged. The classifier then checks all five
// measurements against the per-class windows (class 0 linear chirp, class 1
// stationary) and the pulse is reported, or dropped if nothing matches.
//
// Following the document: the stages, the 250 ns delay, the 1024-entry
// de-chirp table, the 384 de-chirped samples, the power/DC measurements and
// range classification. This design's choices: the IFM1 measurement is
// started on the live stream at sample 640 after the arrival estimate; the
// pulse start is replayed from a ring buffer for de-chirping; the chirp-
// present decision is a DC threshold; thresholds are inputs. One pulse is
// processed at a time; an arrival during processing is counted in
// `ev_overrun` and skipped. A report leaves about 225 windows after the
// arrival, so pulses 500 ns (160 windows) apart are all measured.
//
// Report fields: cls (SIG_LINEAR / SIG_STATIONARY), toa (window index),
// lin_rate_q4 (MHz per 400 ns x16), carrier_q4 (MHz x16), pw (pulse width
// in windows from the detector, 0 if the pulse had not ended by the report).
module linear_chirp_receiver
  import chirp_pkg::*;
#(
  parameter int DELAY   = 640,   // chirp mixing delay, samples
  parameter int BUF_DEPTH = 512, // ring buffer words
  parameter int NCLS    = 2,
  parameter int NMEAS   = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  adc_t              din [LANES],
  input  logic [PWR_W-1:0]  dc_chirp_max,
  input  logic [MEAS_W-1:0] cls_lo [NCLS][NMEAS],
  input  logic [MEAS_W-1:0] cls_hi [NCLS][NMEAS],
  input  logic [NCLS-1:0]   cls_en,
  output logic              rep_valid,
  output rx_report_t        rep,
  output logic              ev_toa,
  output logic              ev_overrun,
  output logic              ev_dechirp,
  output logic              ev_noclass
);
  localparam int AW    = $clog2(BUF_DEPTH);
  localparam int START = DELAY / LANES;     // IFM1 start word after the arrival
  localparam int NDW   = 48;                // 384 de-chirped samples

  typedef enum logic [2:0] {S_IDLE, S_ARM, S_M1, S_P2, S_M2, S_CL} st_t;
  st_t st;

  // ------------------------------------------------------------ front end
  logic [TS_W-1:0] widx;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) widx <= '0; else widx <= widx + 1'b1;

  logic toa_v, tod_v, inp, ver, rej, abt;
  logic [TS_W-1:0] toa_i, tod_i;
  logic [15:0] pw_w, pw_q;

  toa_detector u_toa (
    .clk, .rst_n, .din, .win_idx(widx),
    .toa_valid(toa_v), .toa_idx(toa_i), .tod_valid(tod_v), .tod_idx(tod_i),
    .pw(pw_w), .in_pulse(inp), .verifying(ver), .reject(rej), .aborted(abt)
  );

  cplx2_t ht [LANES];
  hilbert_transform u_ht (.clk, .rst_n, .din, .dout(ht));

  logic [TS_W-1:0] ht_idx, mix_idx;
  assign ht_idx  = widx - TS_W'(HT_LAT);
  assign mix_idx = ht_idx - 1'b1;

  logic [AW-1:0] raddr;
  cplx2_t rdata [LANES];
  sample_ring_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .we(1'b1), .waddr(AW'(ht_idx)), .wdata(ht), .raddr, .rdata
  );

  // -------------------------------------------------- chirp rate (IFM1)
  cplx2_t mix [LANES];
  logic   mix_v;
  delay_conj_mixer #(.DELAY(DELAY)) u_mix (
    .clk, .rst_n, .in_valid(1'b1), .din(ht), .out_valid(mix_v), .dout(mix)
  );

  logic [TS_W-1:0] base;
  logic ifm1_start, ifm1_v;
  ifm_result_t r1, r1_q;
  assign ifm1_start = (st == S_ARM) && (mix_idx == base + TS_W'(START));

  digital_ifm u_ifm1 (
    .clk, .rst_n, .start(ifm1_start), .in_valid(mix_v), .din(mix),
    .res_valid(ifm1_v), .res(r1)
  );

  logic [15:0] rate_w;
  logic [IDX_W-1:0] idx_w;
  rate_to_index #(.GAIN(real'(DELAY) / 1024.0)) u_r2i (
    .code(r1.freq), .rate_q4(rate_w), .idx(idx_w)
  );

  // ------------------------------------------------ de-chirp + carrier
  logic [IDX_W-1:0] idx_q;
  logic [15:0] rate_q;
  logic chirp_q;
  logic [5:0] k, k1, k2;
  logic v1, v2;
  cplx2_t dch [LANES];
  cplx2_t y2 [LANES];

  dechirp_lut #(.ORDER(2)) u_lut (.clk, .rst_n, .idx(idx_q), .word(7'(k)), .dout(dch));

  assign raddr = AW'(base + TS_W'(k));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; k1 <= '0; k2 <= '0;
      for (int l = 0; l < LANES; l++) y2[l] <= '0;
    end else begin
      v1 <= (st == S_P2);
      k1 <= k;
      v2 <= v1;
      k2 <= k1;
      for (int l = 0; l < LANES; l++)
        y2[l] <= chirp_q ? cmul(rdata[l], dch[l]) : rdata[l];
    end
  end

  logic ifm2_v;
  ifm_result_t r2, r2_q;
  digital_ifm u_ifm2 (
    .clk, .rst_n, .start(v2 && k2 == 0), .in_valid(v2), .din(y2),
    .res_valid(ifm2_v), .res(r2)
  );

  // ------------------------------------------------------ classification
  logic cls_start, cls_v, cls_any;
  logic [MEAS_W-1:0] meas [NMEAS];
  logic [$clog2(NCLS+1)-1:0] cls_i;
  logic [NCLS-1:0] cls_m;
  logic [15:0] carr_q4;

  assign carr_q4 = code_to_mhz_q4(r2_q.freq);
  assign meas[0] = MEAS_W'(r1_q.dc);
  assign meas[1] = MEAS_W'(r1_q.pwr);
  assign meas[2] = MEAS_W'(r2_q.pwr);
  assign meas[3] = rate_q;
  assign meas[4] = carr_q4;

  range_classifier #(.NMEAS(NMEAS), .NCLASS(NCLS)) u_cls (
    .clk, .rst_n, .start(cls_start), .meas, .lo(cls_lo), .hi(cls_hi),
    .cls_en, .valid(cls_v), .any(cls_any), .cls(cls_i), .match(cls_m)
  );

  // --------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; base <= '0; k <= '0; idx_q <= '0; rate_q <= '0; chirp_q <= 1'b0;
      r1_q <= '0; r2_q <= '0; cls_start <= 1'b0;
      rep_valid <= 1'b0; rep <= '0; pw_q <= '0;
      ev_overrun <= 1'b0; ev_dechirp <= 1'b0; ev_noclass <= 1'b0;
    end else begin
      cls_start  <= 1'b0;
      rep_valid  <= 1'b0;
      ev_overrun <= toa_v && (st != S_IDLE);
      ev_dechirp <= 1'b0;
      ev_noclass <= 1'b0;
      if (tod_v && st != S_IDLE && pw_q == '0) pw_q <= pw_w;   // this pulse's departure
      case (st)
        S_IDLE:
          if (toa_v) begin
            pw_q  <= '0;
            base <= toa_i;
            st   <= S_ARM;
          end
        S_ARM:
          if (ifm1_start) st <= S_M1;
        S_M1:
          if (ifm1_v) begin
            r1_q    <= r1;
            idx_q   <= idx_w;
            rate_q  <= rate_w;
            chirp_q <= r1.dc < dc_chirp_max;
            ev_dechirp <= r1.dc < dc_chirp_max;
            k       <= '0;
            st      <= S_P2;
          end
        S_P2: begin
          k <= k + 1'b1;
          if (int'(k) == NDW - 1) st <= S_M2;
        end
        S_M2:
          if (ifm2_v) begin
            r2_q      <= r2;
            cls_start <= 1'b1;
            st        <= S_CL;
          end
        default:                                  // S_CL
          if (cls_v) begin
            st <= S_IDLE;
            if (cls_any) begin
              rep_valid       <= 1'b1;
              rep.cls         <= (cls_i == 0) ? SIG_LINEAR : SIG_STATIONARY;
              rep.toa         <= base;
              rep.pw          <= pw_q;
              rep.nl_rate_q4  <= '0;
              rep.lin_rate_q4 <= (cls_i == 0) ? rate_q : 16'd0;
              rep.carrier_q4  <= carr_q4;
            end else begin
              ev_noclass <= 1'b1;
            end
          end
      endcase
    end
  end

  assign ev_toa = toa_v;
endmodule
