// report_fifo: collects a receiver's pulse reports and hands them to the
// readout link in bursts.
//
// The FIFO fills with every report the receiver produces. When it holds
// DEPTH reports it switches to draining: `out_valid` stays high and the
// stored reports leave oldest first, one per clock in which `out_ready` is
// high. When the last one has left, filling starts again. A report that
// arrives while the FIFO drains is not stored and is flagged on `drop` for
// one clock. `draining` shows the mode; `count` the number of stored reports.
//
// Timing: a report on `in_valid` is stored at that clock edge. The clock on
// which the DEPTH-th report is stored, draining begins, and `out_data` is
// valid from the next clock on; a stalled `out_ready` holds it.
//
// Following the document: report FIFOs that are filled until full and then
// emptied towards the host. This design's choices: one FIFO per receiver on
// the processing clock, a depth of 8 reports, and reports that arrive during
// a burst being dropped; the Ethernet link and its 100 MHz clock are not
// part of this design, so `out_*` is a plain valid/ready stream.
module report_fifo
  import chirp_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  rx_report_t               in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output rx_report_t               out_data,
  output logic                     draining,
  output logic                     drop,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = $clog2(DEPTH);

  rx_report_t mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  always_ff @(posedge clk)
    if (in_valid && !draining) mem[wptr] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0; draining <= 1'b0; drop <= 1'b0;
    end else begin
      drop <= in_valid && draining;
      if (!draining) begin
        if (in_valid) begin
          wptr  <= (int'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
          count <= count + 1'b1;
          if (int'(count) == DEPTH - 1) draining <= 1'b1;
        end
      end else if (out_ready) begin
        rptr  <= (int'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
        count <= count - 1'b1;
        if (int'(count) == 1) draining <= 1'b0;
      end
    end
  end

  assign out_valid = draining;
  assign out_data  = mem[rptr];
endmodule
