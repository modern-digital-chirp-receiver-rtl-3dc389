// toa_detector: time-of-arrival / time-of-departure detector working on
// 8-sample windows of the real 4-bit ADC stream.
//
// Per window (one clock) two fast criteria are formed:
//   criterion 1: mean |x| >= 1.25, i.e. sum |x| >= C1_SUM = 10;
//   criterion 2: at least C2_CNT = 3 samples with |x| >= C2_MAG.
// A window "hits" when either criterion holds. When HIT_K = 5 of the last
// HIT_N = 6 windows hit, a candidate arrival is taken at the first hitting
// window of that group and criterion 3 verifies it: over the next C3_WIN = 64
// windows (200 ns) at least C3_MIN = 42 must have mean |x| >= 1.0
// (sum |x| >= C3_SUM = 8). If so `toa_valid` pulses with `toa_idx`;
// otherwise the candidate is rejected (`reject`). While verifying, 5 of 6
// missing windows aborted the candidate (`aborted`). After an arrival, 5 of 6
// windows with neither criterion mark the departure: `tod_valid` pulses with
// `tod_idx` (first missing window of the group) and `pw = tod_idx - toa_idx`,
// and the detector returns to searching.
//
// The three criteria, 5-of-6 rule, 64-window evaluation, 42-of-64 count and
// thresholds 1.25 and 1 follow the document. The criterion-2 magnitude
// threshold C2_MAG is not given there and is a parameter; arrivals and
// departures are resolved to one window (8 samples), the choice of this
// design.
//
// Timing: `win_idx` is the caller's index of the window on `din`. A window is
// registered once, so decisions appear 2 clocks after the deciding window
// entered; `toa_valid` comes at least 70 windows after the arrival window.
module toa_detector
  import chirp_pkg::*;
#(
  parameter int C1_SUM = 10,   // 8 * 1.25
  parameter int C2_MAG = 3,    // assumed
  parameter int C2_CNT = 3,
  parameter int HIT_N  = 6,
  parameter int HIT_K  = 5,
  parameter int C3_SUM = 8,    // 8 * 1.0
  parameter int C3_WIN = 64,
  parameter int C3_MIN = 42
) (
  input  logic             clk,
  input  logic             rst_n,
  input  adc_t             din [LANES],
  input  logic [TS_W-1:0]  win_idx,
  output logic             toa_valid,
  output logic [TS_W-1:0]  toa_idx,
  output logic             tod_valid,
  output logic [TS_W-1:0]  tod_idx,
  output logic [15:0]      pw,
  output logic             in_pulse,
  output logic             verifying,
  output logic             reject,
  output logic             aborted
);
  typedef enum logic [1:0] {S_SEARCH, S_VERIFY, S_PULSE} state_t;

  // ------------------------------------------------------- window stage
  logic             hit_q, c3_q;
  logic [TS_W-1:0]  idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q <= 1'b0; c3_q <= 1'b0; idx_q <= '0;
    end else begin
      logic [6:0] s;
      logic [3:0] n2;
      s = '0; n2 = '0;
      for (int l = 0; l < LANES; l++) begin
        logic [3:0] a;
        a  = din[l] < 0 ? 4'(-din[l]) : 4'(din[l]);
        s  = s + 7'(a);
        n2 = n2 + 4'(int'(a) >= C2_MAG);
      end
      hit_q <= (int'(s) >= C1_SUM) || (int'(n2) >= C2_CNT);
      c3_q  <= int'(s) >= C3_SUM;
      idx_q <= win_idx;
    end
  end

  // ----------------------------------------------------------- decision
  state_t            st;
  logic [HIT_N-1:0]  hist;      // bit 0 = newest window
  logic [HIT_N-1:0]  h_new, m_new;
  logic [7:0]        wcnt, c3cnt;
  logic [TS_W-1:0]   first_idx;

  assign h_new = {hist[HIT_N-2:0], hit_q};
  assign m_new = ~h_new;
  // index of the oldest window of the group that carries the mark
  always_comb begin
    first_idx = idx_q;
    for (int i = 0; i < HIT_N; i++)
      if (((st == S_SEARCH) ? h_new[i] : m_new[i])) first_idx = idx_q - TS_W'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_SEARCH; hist <= '0; wcnt <= '0; c3cnt <= '0;
      toa_valid <= 1'b0; tod_valid <= 1'b0; reject <= 1'b0; aborted <= 1'b0;
      toa_idx <= '0; tod_idx <= '0; pw <= '0;
    end else begin
      toa_valid <= 1'b0; tod_valid <= 1'b0; reject <= 1'b0; aborted <= 1'b0;
      hist <= h_new;
      case (st)
        S_SEARCH:
          if ($countones(h_new) >= HIT_K) begin
            st      <= S_VERIFY;
            toa_idx <= first_idx;
            wcnt    <= '0;
            c3cnt   <= '0;
            hist    <= '1;                   // start the miss count clean
          end
        S_VERIFY: begin
          c3cnt <= c3cnt + 8'(c3_q);
          wcnt  <= wcnt + 8'd1;
          if ($countones(m_new) >= HIT_K) begin
            st    <= S_SEARCH;
            aborted <= 1'b1;
            hist  <= '0;
          end else if (int'(wcnt) == C3_WIN - 1) begin
            if (int'(c3cnt) + int'(c3_q) >= C3_MIN) begin
              st        <= S_PULSE;
              toa_valid <= 1'b1;
            end else begin
              st     <= S_SEARCH;
              reject <= 1'b1;
              hist   <= '0;
            end
          end
        end
        default:                              // S_PULSE
          if ($countones(m_new) >= HIT_K) begin
            st        <= S_SEARCH;
            tod_valid <= 1'b1;
            tod_idx   <= first_idx;
            pw        <= 16'(first_idx - toa_idx);
            hist      <= '0;
          end
      endcase
    end
  end

  assign in_pulse  = (st == S_PULSE);
  assign verifying = (st == S_VERIFY);
endmodule
