// cordic_atan2: iterative vectoring CORDIC giving the phase of (x, y).
//
// Used by the digital IFM to turn each autocorrelator sum into a phase angle
// (arctan of imaginary over real part). The vector is first folded into the
// right half plane (adding half a turn when x < 0), then ITER micro-rotations
// by +-atan(2^-i) drive y to zero while the rotation angles are summed.
//
// Interface: pulse `start` with x/y held valid; `done` pulses ITER+1 clocks
// later with `angle`, an unsigned ANG_W-bit fraction of a turn (0 = +x axis,
// counter-clockwise positive); the angle of (0,0) is meaningless. The micro-rotation angle
// table is atan(2^-i) / (2*pi) * 2^16, rounded.
module cordic_atan2 #(
  parameter int IN_W  = 12,
  parameter int ANG_W = 16,
  parameter int ITER  = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [IN_W-1:0]  y,
  output logic                    done,
  output logic [ANG_W-1:0]        angle
);
  localparam int W = IN_W + 3;   // headroom for the CORDIC gain of 1.65

  function automatic logic [15:0] atan_tab(input int i);
    case (i)
      0: return 16'd8192;  1: return 16'd4836;  2: return 16'd2555;
      3: return 16'd1297;  4: return 16'd651;   5: return 16'd326;
      6: return 16'd163;   7: return 16'd81;    8: return 16'd41;
      9: return 16'd20;    10: return 16'd10;   11: return 16'd5;
      12: return 16'd3;    13: return 16'd1;    default: return 16'd1;
    endcase
  endfunction

  logic signed [W-1:0] xr, yr;
  logic [15:0]         zr;
  logic [4:0]          it;
  logic                busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; yr <= '0; zr <= '0; it <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        it   <= '0;
        if (x < 0) begin
          xr <= -W'(x); yr <= -W'(y); zr <= 16'h8000;
        end else begin
          xr <= W'(x);  yr <= W'(y);  zr <= 16'h0000;
        end
      end else if (busy) begin
        if (yr >= 0) begin
          xr <= xr + (yr >>> it);
          yr <= yr - (xr >>> it);
          zr <= zr + atan_tab(int'(it));
        end else begin
          xr <= xr - (yr >>> it);
          yr <= yr + (xr >>> it);
          zr <= zr - atan_tab(int'(it));
        end
        if (int'(it) == ITER - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          it <= it + 5'd1;
        end
      end
    end
  end

  assign angle = zr[15 -: ANG_W];
endmodule
