// tb_sample_ring_buffer: self-checking test of the pulse sample buffer.
//
// Writes random complex words continuously at a wrapping address, as the
// receivers do, and reads back words written 1 to DEPTH-1 clocks earlier,
// comparing them with a copy kept here. Reads are registered: data appears
// one clock after the address. Runs at the default depth of 512 words and
// at 64 words.
module tb_sample_ring_buffer;
  import chirp_pkg::*;

  logic clk = 0;
  always #1 clk = ~clk;

  logic we = 0;
  logic [8:0] wa = '0, ra = '0;
  logic [5:0] wb = '0, rb = '0;
  cplx2_t wd [LANES];
  cplx2_t qa [LANES], qb [LANES];

  sample_ring_buffer dut_a (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(qa));
  sample_ring_buffer #(.DEPTH(64)) dut_b (.clk, .we, .waddr(wb), .wdata(wd), .raddr(rb), .rdata(qb));

  int checks = 0, failures = 0;
  cplx2_t hist [2048][LANES];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit same(cplx2_t a [LANES], cplx2_t b [LANES]);
    for (int l = 0; l < LANES; l++) if (a[l] != b[l]) return 0;
    return 1;
  endfunction

  initial begin
    int ba, bb;
    for (int l = 0; l < LANES; l++) wd[l] = '0;
    for (int t = 0; t < 2048; t++) begin
      @(negedge clk);
      if (t > 601) begin                    // result of the read issued last clock
        check(same(qa, hist[ba]), "depth 512 read");
        check(same(qb, hist[bb]), "depth 64 read");
      end
      we = 1;
      for (int l = 0; l < LANES; l++) begin
        wd[l] = '{re: 2'($urandom_range(0, 3)), im: 2'($urandom_range(0, 3))};
        hist[t][l] = wd[l];
      end
      wa = 9'(t); wb = 6'(t);
      if (t > 600) begin
        ba = t - $urandom_range(1, 511);
        bb = t - $urandom_range(1, 63);
        ra = 9'(ba); rb = 6'(bb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
