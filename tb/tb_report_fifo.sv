// tb_report_fifo: checks the report FIFO against a queue model.
//
// Random reports arrive on about one clock in three and the readout side is
// ready on about two clocks in three, so the FIFO fills, drains in bursts
// with stalls, and drops reports that arrive during a burst. Every clock
// the outputs (valid, data at the head, count, draining, drop) are compared
// with the model; the number of bursts and drops must both be non-zero.
// Inputs change on the falling edge; outputs are checked before the rising
// edge. Runs with DEPTH 8 (the default) and 5.
module tb_report_fifo;
  import chirp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  function automatic rx_report_t rnd_rep();
    rx_report_t r;
    r.cls         = sig_class_t'($urandom_range(0, 4));
    r.toa         = $urandom;
    r.pw          = 16'($urandom);
    r.nl_rate_q4  = 16'($urandom);
    r.lin_rate_q4 = 16'($urandom);
    r.carrier_q4  = 16'($urandom);
    return r;
  endfunction

  // two instances: default depth and an odd depth
  logic       iv [2];
  rx_report_t id [2];
  logic       ordy [2];
  logic       ov [2], dr [2], dp [2];
  rx_report_t od [2];
  logic [3:0] c8;
  logic [3:0] c5;

  report_fifo u8 (
    .clk, .rst_n, .in_valid(iv[0]), .in_data(id[0]), .out_valid(ov[0]),
    .out_ready(ordy[0]), .out_data(od[0]), .draining(dr[0]), .drop(dp[0]), .count(c8)
  );
  report_fifo #(.DEPTH(5)) u5 (
    .clk, .rst_n, .in_valid(iv[1]), .in_data(id[1]), .out_valid(ov[1]),
    .out_ready(ordy[1]), .out_data(od[1]), .draining(dr[1]), .drop(dp[1]), .count(c5)
  );

  rx_report_t q [2][$];
  bit m_drain [2] = '{1'b0, 1'b0};
  bit m_drop  [2] = '{1'b0, 1'b0};
  int depth   [2] = '{8, 5};
  int bursts = 0, drops = 0, stalls = 0;

  initial
    for (int i = 0; i < 2; i++) begin iv[i] = 1'b0; id[i] = '0; ordy[i] = 1'b0; end

  always @(negedge clk)
    for (int i = 0; i < 2; i++) begin
      iv[i]   <= rst_n && ($urandom_range(0, 2) == 0);
      id[i]   <= rnd_rep();
      ordy[i] <= ($urandom_range(0, 2) != 0);
    end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) begin
      int cnt;
      cnt = (i == 0) ? int'(c8) : int'(c5);
      check(ov[i] == m_drain[i], "out_valid");
      check(dr[i] == m_drain[i], "draining");
      check(dp[i] == m_drop[i], "drop");
      check(cnt == q[i].size(), $sformatf("count %0d vs %0d", cnt, q[i].size()));
      if (ov[i] && q[i].size() > 0) check(od[i] == q[i][0], "head report");
      // model update at this edge
      m_drop[i] = iv[i] && m_drain[i];
      if (m_drop[i]) drops++;
      if (!m_drain[i]) begin
        if (iv[i]) begin
          q[i].push_back(id[i]);
          if (q[i].size() == depth[i]) begin m_drain[i] = 1'b1; bursts++; end
        end
      end else if (ordy[i]) begin
        void'(q[i].pop_front());
        if (q[i].size() == 0) m_drain[i] = 1'b0;
      end else begin
        stalls++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3000) @(posedge clk);
    $display("bursts=%0d drops=%0d stalls=%0d", bursts, drops, stalls);
    check(bursts > 0, "a burst happened");
    check(drops > 0, "a report was dropped during a burst");
    check(stalls > 0, "the readout stalled during a burst");
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
