// variable_chirp_receiver: measures linear chirps whose pulse width is not
// known in advance, from the first and the last 384 samples of the pulse.
//
// The arrival and departure found by the toa_detector bracket the pulse.
// The first 384 complex samples are copied, at arrival, from the stream ring
// buffer into two 48-word stores: one in arrival order (FIFO) and one in
// reverse order (FILO, words and lanes reversed). At departure the last 384
// samples are read back from the ring buffer and, in one 48-clock pass,
//   IFM1 gets last(n) * conj(first(n))       a tone at alpha * (PW - 384)
//   IFM2 gets first(n) * conj(first(383-n))  a tone at 2 f0 + alpha * 383
// so chirp rate and carrier are measured at the same time, without
// de-chirping. chirp_correction then scales both with the measured pulse
// width PW: rate over the pulse = F1 * PW / (PW - 384), carrier =
// (F2 - rate * 384 / PW) / 2. A range_classifier separates linear chirps
// (class 0) from stationary pulses (class 1). Measurement order: 0 IFM1 DC,
// 1 IFM1 power, 2 IFM2 DC, 3 IFM2 power, 4 rate, 5 carrier (MHz x16).
//
// Following the document: first/last 384 samples, FIFO plus reversed FILO,
// element-wise products with one side conjugated, two IFMs in parallel, and
// the pulse-width corrections (Eq. 31-32). This design's choices: the
// product for the chirp takes the conjugate of the first samples (the
// document writes first times conj(last), which gives the same rate with a
// negative sign); the chirp rate is reported as the frequency swept over the
// whole pulse; pulse width is resolved to one window (8 samples); a pulse
// shorter than MIN_PW_W windows is counted in `ev_short` and not reported.
//
// Report fields: cls, toa, pw (windows), lin_rate_q4 (MHz over the pulse
// x16), carrier_q4 (MHz x16). About 140 clocks pass from departure to report.
// Once the last 384 samples have been read (48 clocks after the departure)
// the next arrival is accepted and held until the report is out; its first
// 384 samples are then copied from the 256-word ring buffer, which still
// holds them. Pulses separated by 100 ns are therefore all measured; an
// arrival that cannot be taken is counted in `ev_overrun`.
module variable_chirp_receiver
  import chirp_pkg::*;
#(
  parameter int BUF_DEPTH = 256,   // ring buffer words
  parameter int MIN_PW_W  = 128,   // shortest measurable pulse, windows (400 ns)
  parameter int NCLS      = 2,
  parameter int NMEAS     = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  adc_t              din [LANES],
  input  logic [MEAS_W-1:0] cls_lo [NCLS][NMEAS],
  input  logic [MEAS_W-1:0] cls_hi [NCLS][NMEAS],
  input  logic [NCLS-1:0]   cls_en,
  output logic              rep_valid,
  output rx_report_t        rep,
  output logic              ev_toa,
  output logic              ev_tod,
  output logic              ev_overrun,
  output logic              ev_short,
  output logic              ev_noclass
);
  localparam int AW  = $clog2(BUF_DEPTH);
  localparam int NFW = 48;                 // 384 samples

  typedef enum logic [2:0] {S_IDLE, S_COPY, S_PULSE, S_RUN, S_MEAS, S_CORR, S_CL} st_t;
  st_t st;

  // ------------------------------------------------------------ front end
  logic [TS_W-1:0] widx;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) widx <= '0; else widx <= widx + 1'b1;

  logic toa_v, tod_v, inp, ver, rej, abt;
  logic [TS_W-1:0] toa_i, tod_i;
  logic [15:0] pw_w;
  toa_detector u_toa (
    .clk, .rst_n, .din, .win_idx(widx),
    .toa_valid(toa_v), .toa_idx(toa_i), .tod_valid(tod_v), .tod_idx(tod_i),
    .pw(pw_w), .in_pulse(inp), .verifying(ver), .reject(rej), .aborted(abt)
  );

  cplx2_t ht [LANES];
  hilbert_transform u_ht (.clk, .rst_n, .din, .dout(ht));

  logic [TS_W-1:0] ht_idx;
  assign ht_idx = widx - TS_W'(HT_LAT);

  logic [AW-1:0] raddr;
  cplx2_t rdata [LANES];
  sample_ring_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .we(1'b1), .waddr(AW'(ht_idx)), .wdata(ht), .raddr, .rdata
  );

  // ---------------------------------------------- first-384 FIFO / FILO
  logic [TS_W-1:0] base, tod_q, m_base;
  logic [15:0] pw_q, m_pw;
  logic tod_pend, pend;
  logic [5:0] k, k1, k2;
  logic v1, v2, cp1;
  cplx2_t first [LANES];
  cplx2_t rev [LANES];
  cplx2_t rev_w [LANES];
  logic f_we;
  logic [5:0] f_wa, r_wa;

  always_comb
    for (int l = 0; l < LANES; l++) rev_w[l] = rdata[LANES - 1 - l];

  assign f_we = cp1;
  assign f_wa = k1;
  assign r_wa = 6'(NFW - 1) - k1;

  sample_ring_buffer #(.DEPTH(64)) u_fifo (
    .clk, .we(f_we), .waddr(f_wa), .wdata(rdata), .raddr(k), .rdata(first)
  );
  sample_ring_buffer #(.DEPTH(64)) u_filo (
    .clk, .we(f_we), .waddr(r_wa), .wdata(rev_w), .raddr(k), .rdata(rev)
  );

  assign raddr = (st == S_COPY) ? AW'(base + TS_W'(k))
                                : AW'(tod_q - TS_W'(NFW) + TS_W'(k));

  // ------------------------------------------------------- IFM inputs
  cplx2_t y1 [LANES];
  cplx2_t y2 [LANES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; cp1 <= 1'b0; k1 <= '0; k2 <= '0;
      for (int l = 0; l < LANES; l++) begin y1[l] <= '0; y2[l] <= '0; end
    end else begin
      cp1 <= (st == S_COPY);
      v1  <= (st == S_RUN);
      k1  <= k;
      v2  <= v1;
      k2  <= k1;
      for (int l = 0; l < LANES; l++) begin
        y1[l] <= cmul_conj(rdata[l], first[l]);
        y2[l] <= cmul_conj(first[l], rev[l]);
      end
    end
  end

  logic ifm1_v, ifm2_v;
  ifm_result_t r1, r2, r1_q, r2_q;
  digital_ifm u_ifm1 (
    .clk, .rst_n, .start(v2 && k2 == 0), .in_valid(v2), .din(y1),
    .res_valid(ifm1_v), .res(r1)
  );
  digital_ifm u_ifm2 (
    .clk, .rst_n, .start(v2 && k2 == 0), .in_valid(v2), .din(y2),
    .res_valid(ifm2_v), .res(r2)
  );

  // ------------------------------------------------------- correction
  logic corr_start, corr_done;
  logic [15:0] rate_q4, carr_q4;
  chirp_correction u_corr (
    .clk, .rst_n, .start(corr_start), .f_rate(r1_q.freq), .f_carr(r2_q.freq),
    .pw_samp({m_pw[12:0], 3'b000}), .done(corr_done),
    .rate_q4, .carrier_q4(carr_q4)
  );

  // ------------------------------------------------------ classification
  logic cls_start, cls_v, cls_any;
  logic [MEAS_W-1:0] meas [NMEAS];
  logic [$clog2(NCLS+1)-1:0] cls_i;
  logic [NCLS-1:0] cls_m;

  assign meas[0] = MEAS_W'(r1_q.dc);
  assign meas[1] = MEAS_W'(r1_q.pwr);
  assign meas[2] = MEAS_W'(r2_q.dc);
  assign meas[3] = MEAS_W'(r2_q.pwr);
  assign meas[4] = rate_q4;
  assign meas[5] = carr_q4;

  range_classifier #(.NMEAS(NMEAS), .NCLASS(NCLS)) u_cls (
    .clk, .rst_n, .start(cls_start), .meas, .lo(cls_lo), .hi(cls_hi),
    .cls_en, .valid(cls_v), .any(cls_any), .cls(cls_i), .match(cls_m)
  );

  // --------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; base <= '0; tod_q <= '0; pw_q <= '0; tod_pend <= 1'b0; k <= '0;
      m_base <= '0; m_pw <= '0; pend <= 1'b0;
      r1_q <= '0; r2_q <= '0; corr_start <= 1'b0; cls_start <= 1'b0;
      rep_valid <= 1'b0; rep <= '0;
      ev_overrun <= 1'b0; ev_short <= 1'b0; ev_noclass <= 1'b0;
    end else begin
      corr_start <= 1'b0;
      cls_start  <= 1'b0;
      rep_valid  <= 1'b0;
      // a new arrival is taken while the previous pulse is only being
      // finished (IFM results, correction, classification)
      ev_overrun <= toa_v && (st == S_COPY || st == S_PULSE || st == S_RUN || pend);
      if (toa_v && !pend && (st == S_MEAS || st == S_CORR || st == S_CL)) begin
        pend     <= 1'b1;
        base     <= toa_i;
        tod_pend <= 1'b0;
      end
      ev_short   <= 1'b0;
      ev_noclass <= 1'b0;
      if (tod_v && (st == S_COPY || st == S_PULSE || pend)) begin
        tod_q    <= tod_i;
        pw_q     <= 16'(tod_i - base);
        tod_pend <= 1'b1;
      end
      case (st)
        S_IDLE:
          if (toa_v) begin
            base     <= toa_i;
            k        <= '0;
            tod_pend <= 1'b0;
            st       <= S_COPY;
          end
        S_COPY: begin
          k <= k + 1'b1;
          if (int'(k) == NFW - 1) st <= S_PULSE;
        end
        S_PULSE:
          if (tod_pend) begin
            tod_pend <= 1'b0;
            k        <= '0;
            if (pw_q < 16'(MIN_PW_W)) begin
              ev_short <= 1'b1;
              st       <= S_IDLE;
            end else begin
              m_base <= base;
              m_pw   <= pw_q;
              st     <= S_RUN;
            end
          end
        S_RUN: begin
          k <= k + 1'b1;
          if (int'(k) == NFW - 1) st <= S_MEAS;
        end
        S_MEAS:
          if (ifm1_v) begin
            r1_q       <= r1;
            r2_q       <= r2;
            corr_start <= 1'b1;
            st         <= S_CORR;
          end
        S_CORR:
          if (corr_done) begin
            cls_start <= 1'b1;
            st        <= S_CL;
          end
        default:                                  // S_CL
          if (cls_v) begin
            pend <= 1'b0;
            k    <= '0;
            st   <= (pend || toa_v) ? S_COPY : S_IDLE;
            if (cls_any) begin
              rep_valid       <= 1'b1;
              rep.cls         <= (cls_i == 0) ? SIG_LINEAR : SIG_STATIONARY;
              rep.toa         <= m_base;
              rep.pw          <= m_pw;
              rep.nl_rate_q4  <= '0;
              rep.lin_rate_q4 <= (cls_i == 0) ? rate_q4 : 16'd0;
              rep.carrier_q4  <= carr_q4;
            end else begin
              ev_noclass <= 1'b1;
            end
          end
      endcase
    end
  end

  assign ev_toa = toa_v;
  assign ev_tod = tod_v;
endmodule
