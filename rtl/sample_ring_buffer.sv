// sample_ring_buffer: circular store of the complex sample stream, one word
// of 8 complex 2-bit samples per entry.
//
// The receivers write every Hilbert-transform output word at the address
// given by its window index (modulo DEPTH) and later read back the start of
// a detected pulse, which has already gone by when the arrival is confirmed
// (70 windows after it). This plays the part of the document's sample FIFOs:
// the linear and nonlinear receivers replay the first 384 (or 704) samples
// of a pulse for de-chirping, the variable receiver the first and last 384.
// The document names FIFOs but not their organisation; a dual-port RAM with
// one write and one registered read port is this design's choice.
//
// Timing: write on `we`; `rdata` holds the word at `raddr` one clock later.
module sample_ring_buffer
  import chirp_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  cplx2_t                    wdata [LANES],
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output cplx2_t                    rdata [LANES]
);
  logic [LANES*4-1:0] mem [DEPTH];
  logic [LANES*4-1:0] q, wpack;

  always_comb
    for (int l = 0; l < LANES; l++) wpack[l*4 +: 4] = wdata[l];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wpack;
    q <= mem[raddr];
  end

  always_comb
    for (int l = 0; l < LANES; l++) rdata[l] = q[l*4 +: 4];
endmodule
