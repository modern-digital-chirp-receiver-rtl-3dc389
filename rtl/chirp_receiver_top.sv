// chirp_receiver_top: the three digital chirp receivers side by side.
//
// Each receiver is a complete design for one signal family and has its own
// ADC input (8 x 4-bit samples per clock from the 2.56 GSPS converter after
// 1:8 demultiplexing, 320 MHz clock), its own classification thresholds and
// its own pulse report:
//   nl_*   nonlinear_chirp_receiver  cubic + linear chirps and tones
//   lin_*  linear_chirp_receiver     linear chirps and tones, 400 ns pulses
//   var_*  variable_chirp_receiver   linear chirps of any width >= 400 ns
// The three share nothing but clock and reset; on the hardware the document
// describes, each was loaded on its own. Every report is also stored in a
// report_fifo per receiver; once a FIFO holds RPT_DEPTH reports it is
// emptied as a burst on rd_valid / rd_ready / rd_data (index 0 linear,
// 1 nonlinear, 2 variable), the stream a host link would carry. The ADC and
// the link itself are outside this design: their signals are the ports.
// Reports also leave at once on the *_rep ports. All parameters keep the
// receivers' defaults.
module chirp_receiver_top
  import chirp_pkg::*;
#(
  parameter int RPT_DEPTH = 8      // reports per readout burst
) (
  input  logic              clk,
  input  logic              rst_n,
  // nonlinear chirp receiver
  input  adc_t              nl_din [LANES],
  input  logic [PWR_W-1:0]  nl_nl_dc_max,
  input  logic [PWR_W-1:0]  nl_lin_dc_max,
  input  logic [MEAS_W-1:0] nl_cls_lo [4][10],
  input  logic [MEAS_W-1:0] nl_cls_hi [4][10],
  input  logic [3:0]        nl_cls_en,
  output logic              nl_rep_valid,
  output rx_report_t        nl_rep,
  output logic [4:0]        nl_events,    // toa, overrun, nl de-chirp, lin de-chirp, no class
  // linear chirp receiver
  input  adc_t              lin_din [LANES],
  input  logic [PWR_W-1:0]  lin_dc_max,
  input  logic [MEAS_W-1:0] lin_cls_lo [2][5],
  input  logic [MEAS_W-1:0] lin_cls_hi [2][5],
  input  logic [1:0]        lin_cls_en,
  output logic              lin_rep_valid,
  output rx_report_t        lin_rep,
  output logic [3:0]        lin_events,   // toa, overrun, de-chirp, no class
  // variable chirp receiver
  input  adc_t              var_din [LANES],
  input  logic [MEAS_W-1:0] var_cls_lo [2][6],
  input  logic [MEAS_W-1:0] var_cls_hi [2][6],
  input  logic [1:0]        var_cls_en,
  output logic              var_rep_valid,
  output rx_report_t        var_rep,
  output logic [4:0]        var_events,   // toa, tod, overrun, short pulse, no class
  // report readout (0 linear, 1 nonlinear, 2 variable)
  input  logic [2:0]        rd_ready,
  output logic [2:0]        rd_valid,
  output rx_report_t        rd_data [3],
  output logic [2:0]        rd_draining,  // FIFO full, burst in progress
  output logic [2:0]        rd_drop       // report lost during a burst
);
  nonlinear_chirp_receiver u_nl (
    .clk, .rst_n, .din(nl_din), .nl_dc_max(nl_nl_dc_max), .lin_dc_max(nl_lin_dc_max),
    .cls_lo(nl_cls_lo), .cls_hi(nl_cls_hi), .cls_en(nl_cls_en),
    .rep_valid(nl_rep_valid), .rep(nl_rep),
    .ev_toa(nl_events[0]), .ev_overrun(nl_events[1]), .ev_nl_dechirp(nl_events[2]),
    .ev_lin_dechirp(nl_events[3]), .ev_noclass(nl_events[4])
  );

  linear_chirp_receiver u_lin (
    .clk, .rst_n, .din(lin_din), .dc_chirp_max(lin_dc_max),
    .cls_lo(lin_cls_lo), .cls_hi(lin_cls_hi), .cls_en(lin_cls_en),
    .rep_valid(lin_rep_valid), .rep(lin_rep),
    .ev_toa(lin_events[0]), .ev_overrun(lin_events[1]), .ev_dechirp(lin_events[2]),
    .ev_noclass(lin_events[3])
  );

  variable_chirp_receiver u_var (
    .clk, .rst_n, .din(var_din),
    .cls_lo(var_cls_lo), .cls_hi(var_cls_hi), .cls_en(var_cls_en),
    .rep_valid(var_rep_valid), .rep(var_rep),
    .ev_toa(var_events[0]), .ev_tod(var_events[1]), .ev_overrun(var_events[2]),
    .ev_short(var_events[3]), .ev_noclass(var_events[4])
  );

  logic       f_in_v [3];
  rx_report_t f_in_d [3];
  assign f_in_v[0] = lin_rep_valid;  assign f_in_d[0] = lin_rep;
  assign f_in_v[1] = nl_rep_valid;   assign f_in_d[1] = nl_rep;
  assign f_in_v[2] = var_rep_valid;  assign f_in_d[2] = var_rep;

  for (genvar i = 0; i < 3; i++) begin : g_fifo
    logic [$clog2(RPT_DEPTH):0] cnt;
    report_fifo #(.DEPTH(RPT_DEPTH)) u_fifo (
      .clk, .rst_n, .in_valid(f_in_v[i]), .in_data(f_in_d[i]),
      .out_valid(rd_valid[i]), .out_ready(rd_ready[i]), .out_data(rd_data[i]),
      .draining(rd_draining[i]), .drop(rd_drop[i]), .count(cnt)
    );
  end
endmodule
