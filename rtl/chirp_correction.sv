// chirp_correction: pulse-width correction of the variable chirp receiver.
//
// The variable receiver mixes the last 384 samples of a pulse with the first
// 384, so the delay between them is PW - 384 samples instead of the fixed
// 640 of the linear receiver, and it mixes the first 384 samples with their
// own time reverse to reach the carrier. With the IFM codes F1 (chirp tone)
// and F2 (carrier tone) and the pulse width PW in samples, the rate swept
// over the whole pulse and the carrier are, in IFM code units
//     Bc = F1 * PW / (PW - 384)
//     Cc = ((F2 - Bc * 384 / PW) mod 2^16) / 2
// which are the document's corrections (rate * (PW/(PW-384)) / (1024/640)
// and (carrier - rate * 384/PW) / 2) expressed on raw codes. Two sequential
// divisions (udiv_seq) do the work; results are converted to MHz x16.
// F1 is taken as signed: a falling rate (F1 >= 2^15) enters the carrier
// correction with its sign and is reported as rate 0, since the receiver
// reports rising chirps only; this, like the code-level arithmetic, is this
// design's choice.
//
// Timing: pulse `start` with the inputs valid; `done` pulses about 70 clocks
// later. PW must exceed 384 samples (the receiver's minimum is 1024).
module chirp_correction
  import chirp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [FREQ_W-1:0]  f_rate,
  input  logic [FREQ_W-1:0]  f_carr,
  input  logic [15:0]        pw_samp,
  output logic               done,
  output logic [15:0]        rate_q4,
  output logic [15:0]        carrier_q4
);
  typedef enum logic [1:0] {C_IDLE, C_DIV1, C_DIV2} cst_t;
  cst_t st;

  logic        d_start, d_done;
  logic [31:0] d_num, d_quo;
  logic [15:0] d_den;
  logic [17:0] bc;
  logic [FREQ_W-1:0] carr, f2;
  logic [15:0] pw;
  logic        neg;
  logic [FREQ_W-1:0] fmag;

  // F1 is a signed turn fraction: a stationary pulse gives a tone near 0
  // that may fall just below zero.
  assign fmag = f_rate[FREQ_W-1] ? FREQ_W'(-f_rate) : f_rate;

  udiv_seq #(.NW(32), .DW(16)) u_div (
    .clk, .rst_n, .start(d_start), .num(d_num), .den(d_den),
    .done(d_done), .quo(d_quo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; d_start <= 1'b0; d_num <= '0; d_den <= '0;
      bc <= '0; carr <= '0; f2 <= '0; pw <= '0; neg <= 1'b0; done <= 1'b0;
    end else begin
      d_start <= 1'b0;
      done    <= 1'b0;
      case (st)
        C_IDLE:
          if (start) begin
            pw      <= pw_samp;
            f2      <= f_carr;
            neg     <= f_rate[FREQ_W-1];
            d_num   <= 32'(fmag) * 32'(pw_samp);
            d_den   <= pw_samp - 16'd384;
            d_start <= 1'b1;
            st      <= C_DIV1;
          end
        C_DIV1:
          if (d_done) begin
            bc      <= (d_quo > 32'h3FFFF) ? 18'h3FFFF : 18'(d_quo);
            d_num   <= ((d_quo > 32'h3FFFF) ? 32'h3FFFF : d_quo) * 32'd384;
            d_den   <= pw;
            d_start <= 1'b1;
            st      <= C_DIV2;
          end
        default:
          if (d_done) begin
            logic [FREQ_W-1:0] diff;
            diff = neg ? f2 + FREQ_W'(d_quo)     // modulo one turn
                       : f2 - FREQ_W'(d_quo);
            carr <= diff >> 1;
            done <= 1'b1;
            st   <= C_IDLE;
          end
      endcase
    end
  end

  logic [17:0] r5;
  assign r5         = 18'((21'(bc) * 21'd5) >> 3);
  assign rate_q4    = neg ? 16'd0 : (r5 > 18'hFFFF) ? 16'hFFFF : 16'(r5);
  assign carrier_q4 = code_to_mhz_q4(carr);
endmodule
