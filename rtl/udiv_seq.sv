// udiv_seq: unsigned restoring divider, one quotient bit per clock.
//
// Pulse `start` with num/den; `done` pulses NW+1 clocks later with
// quo = num / den (all ones when den is 0). Used by the pulse-width
// correction of the variable chirp receiver.
module udiv_seq #(
  parameter int NW = 32,
  parameter int DW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NW-1:0]  num,
  input  logic [DW-1:0]  den,
  output logic           done,
  output logic [NW-1:0]  quo
);
  logic [NW-1:0]  q;
  logic [DW-1:0]  rem;
  logic [DW-1:0]  d;
  logic [$clog2(NW+1)-1:0] cnt;
  logic           busy;
  logic [DW:0]    trial;

  assign trial = {rem, q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; d <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q <= num; rem <= '0; d <= den; cnt <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, d}) begin
          rem <= DW'(trial - {1'b0, d});
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= DW'(trial);
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (int'(cnt) == NW - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quo = q;
endmodule
