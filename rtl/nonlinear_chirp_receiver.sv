// nonlinear_chirp_receiver: measures the nonlinear (cubic-phase) chirp rate,
// the linear chirp rate and the starting frequency of short pulses, and
// classifies each pulse as nonlinear, linear, nonlinear + linear or
// stationary.
//
// Data path (8 samples per clock, 320 MHz for 2.56 GSPS):
//   ADC words -> toa_detector; ADC words -> hilbert_transform -> s(n)
//   stage 1: s -> mixer (213 samples) -> mixer (426 samples) -> IFM1
//            the cubic phase becomes a tone at 2*213*426/1024^2 * Bnl;
//            a power meter watches the first mixer's output
//   stage 2: replayed s(0..703) * conj-cubic de-chirp(idx1) -> mixer (320)
//            -> IFM2 on samples 320..703: tone at 320/1024 * Blin
//   stage 3: replayed s(0..383) * cubic de-chirp * linear de-chirp -> IFM3
//            -> starting frequency
//   range_classifier on 7 power measurements and 3 frequencies -> report
// A chirp is taken as present at stage 1 (stage 2) when the DC term of IFM1
// (IFM2) is below `nl_dc_max` (`lin_dc_max`); otherwise the stage passes the
// samples without de-chirping.
//
// Following the document: three IFMs, two mixings for the cubic term with
// delays in ratio 1:2 summing to 250 ns (here 213 and 426 samples), the
// 125 ns (320-sample) linear delay with a 275 ns nonlinear de-chirp signal,
// two 1024-entry de-chirp tables, seven power measurements (power and DC after
// each mixing, power of IFM3) and per-class lower/upper windows with four
// classes. This design's choices: stage 1 runs on the live stream from the
// arrival estimate; stages 2 and 3 replay the pulse start from a ring buffer
// one after the other; chirp-present decisions are DC thresholds; thresholds
// are inputs. One pulse is processed at a time (about 330 windows, 1 us,
// from arrival to report); an arrival while busy is counted in `ev_overrun`.
//
// Report: cls, toa (window), pw (pulse width in windows from the detector, 0
// if the pulse had not ended by the report), nl_rate_q4 (MHz per 400 ns^2
// x16), lin_rate_q4 (MHz per 400 ns x16), carrier_q4 (MHz x16).
// Classes: 0 nonlinear, 1 linear, 2 nonlinear + linear, 3 stationary.
// Measurement order for the class windows: 0 DC after mixer 1, 1 power after
// mixer 1, 2 IFM1 DC, 3 IFM1 power, 4 IFM2 DC, 5 IFM2 power, 6 IFM3 power,
// 7 nonlinear rate, 8 linear rate, 9 carrier (rates and carrier in MHz x16).
module nonlinear_chirp_receiver
  import chirp_pkg::*;
#(
  parameter int D1        = 213,   // first cubic mixing delay, samples
  parameter int D2        = 426,   // second cubic mixing delay, samples
  parameter int DL        = 320,   // linear mixing delay, samples
  parameter int BUF_DEPTH = 512,
  parameter int NCLS      = 4,
  parameter int NMEAS     = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  adc_t              din [LANES],
  input  logic [PWR_W-1:0]  nl_dc_max,
  input  logic [PWR_W-1:0]  lin_dc_max,
  input  logic [MEAS_W-1:0] cls_lo [NCLS][NMEAS],
  input  logic [MEAS_W-1:0] cls_hi [NCLS][NMEAS],
  input  logic [NCLS-1:0]   cls_en,
  output logic              rep_valid,
  output rx_report_t        rep,
  output logic              ev_toa,
  output logic              ev_overrun,
  output logic              ev_nl_dechirp,
  output logic              ev_lin_dechirp,
  output logic              ev_noclass
);
  localparam int AW     = $clog2(BUF_DEPTH);
  localparam int START1 = (D1 + D2 + LANES - 1) / LANES;   // 80 words
  localparam int LW     = DL / LANES;                      // 40 words
  localparam int NW2    = LW + 48;                         // 88 words (704 samples)
  localparam int NW3    = 48;
  localparam real G_NL  = 2.0 * real'(D1) * real'(D2) / (1024.0 * 1024.0);
  localparam real G_LIN = real'(DL) / 1024.0;

  typedef enum logic [2:0] {S_IDLE, S_ARM, S_M1, S_P2, S_M2, S_P3, S_M3, S_CL} st_t;
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

  logic [TS_W-1:0] ht_idx, m1_idx, m2_idx;
  assign ht_idx = widx - TS_W'(HT_LAT);
  assign m1_idx = ht_idx - 1'b1;
  assign m2_idx = ht_idx - TS_W'(2);

  logic [AW-1:0] raddr;
  cplx2_t rdata [LANES];
  sample_ring_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .we(1'b1), .waddr(AW'(ht_idx)), .wdata(ht), .raddr, .rdata
  );

  // ------------------------------------------- stage 1: nonlinear rate
  cplx2_t m1 [LANES];
  cplx2_t m2 [LANES];
  logic   m1_v, m2_v;
  delay_conj_mixer #(.DELAY(D1)) u_mix1 (
    .clk, .rst_n, .in_valid(1'b1), .din(ht), .out_valid(m1_v), .dout(m1)
  );
  delay_conj_mixer #(.DELAY(D2)) u_mix2 (
    .clk, .rst_n, .in_valid(m1_v), .din(m1), .out_valid(m2_v), .dout(m2)
  );

  logic [TS_W-1:0] base, rel1;
  logic ifm1_start, ifm1_v, pm1_en;
  ifm_result_t r1, r1_q;
  logic [PWR_W-1:0] pm1_pwr, pm1_dc, pm1_pwr_q, pm1_dc_q;

  assign ifm1_start = (st == S_ARM) && (m2_idx == base + TS_W'(START1));
  assign rel1       = m1_idx - base;
  // mixer-1 output over the same samples that IFM1 correlates
  assign pm1_en     = (st == S_ARM || st == S_M1) && m1_v &&
                      rel1 >= TS_W'(START1 + 16) && rel1 < TS_W'(START1 + 48);

  power_meter u_pm1 (
    .clk, .rst_n, .clear(toa_v && st == S_IDLE), .en(pm1_en), .din(m1),
    .pwr(pm1_pwr), .dc(pm1_dc)
  );

  digital_ifm u_ifm1 (
    .clk, .rst_n, .start(ifm1_start), .in_valid(m2_v), .din(m2),
    .res_valid(ifm1_v), .res(r1)
  );

  logic [15:0] nl_rate_w, lin_rate_w;
  logic [IDX_W-1:0] nl_idx_w, lin_idx_w;
  ifm_result_t r2, r2_q, r3, r3_q;

  rate_to_index #(.GAIN(G_NL))  u_r2i_nl  (.code(r1.freq), .rate_q4(nl_rate_w),  .idx(nl_idx_w));
  rate_to_index #(.GAIN(G_LIN)) u_r2i_lin (.code(r2.freq), .rate_q4(lin_rate_w), .idx(lin_idx_w));

  // --------------------------------------- stages 2 and 3: replay paths
  logic [IDX_W-1:0] nl_idx_q, lin_idx_q;
  logic [15:0] nl_rate_q, lin_rate_q;
  logic nl_q, lin_q;
  logic [6:0] k, k1, k2;
  logic v1, v2, p3_1, p3_2;
  cplx2_t dnl [LANES];
  cplx2_t dli [LANES];
  cplx2_t y2 [LANES];

  dechirp_lut #(.ORDER(3)) u_lut_nl  (.clk, .rst_n, .idx(nl_idx_q),  .word(k), .dout(dnl));
  dechirp_lut #(.ORDER(2)) u_lut_lin (.clk, .rst_n, .idx(lin_idx_q), .word(k), .dout(dli));

  assign raddr = AW'(base + TS_W'(k));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; k1 <= '0; k2 <= '0; p3_1 <= 1'b0; p3_2 <= 1'b0;
      for (int l = 0; l < LANES; l++) y2[l] <= '0;
    end else begin
      v1   <= (st == S_P2) || (st == S_P3);
      p3_1 <= (st == S_P3);
      k1   <= k;
      v2   <= v1;
      p3_2 <= p3_1;
      k2   <= k1;
      for (int l = 0; l < LANES; l++) begin
        cplx2_t t;
        t = nl_q ? cmul(rdata[l], dnl[l]) : rdata[l];
        if (p3_1 && lin_q) t = cmul(t, dli[l]);
        y2[l] <= t;
      end
    end
  end

  cplx2_t m3 [LANES];
  logic   m3_v;
  logic [6:0] k3;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) k3 <= '0; else k3 <= k2;

  delay_conj_mixer #(.DELAY(DL)) u_mix3 (
    .clk, .rst_n, .in_valid(v2 && !p3_2), .din(y2), .out_valid(m3_v), .dout(m3)
  );

  logic ifm2_v, ifm3_v;
  digital_ifm u_ifm2 (
    .clk, .rst_n, .start(m3_v && k3 == 7'(LW)), .in_valid(m3_v), .din(m3),
    .res_valid(ifm2_v), .res(r2)
  );
  digital_ifm u_ifm3 (
    .clk, .rst_n, .start(v2 && p3_2 && k2 == 0), .in_valid(v2 && p3_2), .din(y2),
    .res_valid(ifm3_v), .res(r3)
  );

  // ------------------------------------------------------ classification
  logic cls_start, cls_v, cls_any;
  logic [MEAS_W-1:0] meas [NMEAS];
  logic [$clog2(NCLS+1)-1:0] cls_i;
  logic [NCLS-1:0] cls_m;
  logic [15:0] carr_q4;

  assign carr_q4  = code_to_mhz_q4(r3_q.freq);
  assign meas[0]  = MEAS_W'(pm1_dc_q);
  assign meas[1]  = MEAS_W'(pm1_pwr_q);
  assign meas[2]  = MEAS_W'(r1_q.dc);
  assign meas[3]  = MEAS_W'(r1_q.pwr);
  assign meas[4]  = MEAS_W'(r2_q.dc);
  assign meas[5]  = MEAS_W'(r2_q.pwr);
  assign meas[6]  = MEAS_W'(r3_q.pwr);
  assign meas[7]  = nl_rate_q;
  assign meas[8]  = lin_rate_q;
  assign meas[9]  = carr_q4;

  range_classifier #(.NMEAS(NMEAS), .NCLASS(NCLS)) u_cls (
    .clk, .rst_n, .start(cls_start), .meas, .lo(cls_lo), .hi(cls_hi),
    .cls_en, .valid(cls_v), .any(cls_any), .cls(cls_i), .match(cls_m)
  );

  function automatic sig_class_t cls_map(input logic [$clog2(NCLS+1)-1:0] c);
    case (c)
      0:       return SIG_NONLINEAR;
      1:       return SIG_LINEAR;
      2:       return SIG_NL_LINEAR;
      default: return SIG_STATIONARY;
    endcase
  endfunction

  // --------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; base <= '0; k <= '0;
      nl_idx_q <= '0; lin_idx_q <= '0; nl_rate_q <= '0; lin_rate_q <= '0;
      nl_q <= 1'b0; lin_q <= 1'b0;
      r1_q <= '0; r2_q <= '0; r3_q <= '0; pm1_pwr_q <= '0; pm1_dc_q <= '0;
      cls_start <= 1'b0; rep_valid <= 1'b0; rep <= '0; pw_q <= '0;
      ev_overrun <= 1'b0; ev_nl_dechirp <= 1'b0; ev_lin_dechirp <= 1'b0; ev_noclass <= 1'b0;
    end else begin
      cls_start      <= 1'b0;
      rep_valid      <= 1'b0;
      ev_overrun     <= toa_v && (st != S_IDLE);
      ev_nl_dechirp  <= 1'b0;
      ev_lin_dechirp <= 1'b0;
      ev_noclass     <= 1'b0;
      if (tod_v && st != S_IDLE && pw_q == '0) pw_q <= pw_w;   // this pulse's departure
      case (st)
        S_IDLE:
          if (toa_v) begin
            pw_q  <= '0;
            base  <= toa_i;
            nl_q  <= 1'b0;
            lin_q <= 1'b0;
            st    <= S_ARM;
          end
        S_ARM:
          if (ifm1_start) st <= S_M1;
        S_M1:
          if (ifm1_v) begin
            r1_q      <= r1;
            pm1_pwr_q <= pm1_pwr;
            pm1_dc_q  <= pm1_dc;
            nl_idx_q  <= nl_idx_w;
            nl_rate_q <= nl_rate_w;
            nl_q      <= r1.dc < nl_dc_max;
            ev_nl_dechirp <= r1.dc < nl_dc_max;
            k         <= '0;
            st        <= S_P2;
          end
        S_P2: begin
          k <= k + 1'b1;
          if (int'(k) == NW2 - 1) st <= S_M2;
        end
        S_M2:
          if (ifm2_v) begin
            r2_q       <= r2;
            lin_idx_q  <= lin_idx_w;
            lin_rate_q <= lin_rate_w;
            lin_q      <= r2.dc < lin_dc_max;
            ev_lin_dechirp <= r2.dc < lin_dc_max;
            k          <= '0;
            st         <= S_P3;
          end
        S_P3: begin
          k <= k + 1'b1;
          if (int'(k) == NW3 - 1) st <= S_M3;
        end
        S_M3:
          if (ifm3_v) begin
            r3_q      <= r3;
            cls_start <= 1'b1;
            st        <= S_CL;
          end
        default:                                  // S_CL
          if (cls_v) begin
            st <= S_IDLE;
            if (cls_any) begin
              sig_class_t c;
              c = cls_map(cls_i);
              rep_valid       <= 1'b1;
              rep.cls         <= c;
              rep.toa         <= base;
              rep.pw          <= pw_q;
              rep.nl_rate_q4  <= (c == SIG_NONLINEAR || c == SIG_NL_LINEAR) ? nl_rate_q : 16'd0;
              rep.lin_rate_q4 <= (c == SIG_LINEAR || c == SIG_NL_LINEAR) ? lin_rate_q : 16'd0;
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
