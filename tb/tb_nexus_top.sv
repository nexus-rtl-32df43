// tb_nexus_top: end-to-end test of the whole interconnect at its default
// size (16 ports, 36-bit data, 2 pipelined repeaters per link, 2 slots per
// converter). Every module runs on its own clock (periods 6.0 to 13.5 ns)
// and the fabric on a 3 ns clock.
//   Phase 1: all modules send random bursts (1..5 words) to random
//            destinations while the receivers stall at random; half-cycle
//            metastability resolution.
//   Phase 2: the same with full-cycle resolution on every port.
//   Phase 3: ports 3 and 7 go to loopback and the BIST on port 15 sends a
//            burst around 15 -> 3 -> 7 -> 15 several times.
// Checked: every word arrives exactly once, in order per source and
// destination, with ctl = FROM = source on first words and the tail in the
// right place; the BIST ends without error after the right number of trips;
// and each mechanism happened at least once: output contention in the
// crossbar, Grant low at a sender, Request held by a receiver that is not
// granting, multi-word bursts, repeater backpressure, both resolution modes,
// loopback bounces and a BIST run.
`timescale 1ns/1ps
module tb_nexus_top;
  import nexus_pkg::*;
  localparam int N = NX_NPORTS, DW = NX_DATA_W, CW = NX_CTRL_W, NB = 12;

  logic clk_x = 0, rst_n = 0;
  logic [N-1:0] clk_m = '0, res_full_cycle = '0, lb_en = '0;
  logic [N-1:0] tx_req, tx_grant, tx_tail, rx_req, rx_grant, rx_tail;
  logic [N-1:0][DW-1:0] tx_data, rx_data;
  logic [N-1:0][CW-1:0] tx_ctl, rx_ctl;
  logic bist_en = 0, bist_start = 0, bist_busy, bist_done, bist_error;
  logic [CW-1:0] bist_port_a = 3, bist_port_b = 7;
  logic [7:0] bist_iters = 5, bist_trips;
  logic [3:0] bist_len = 4;
  logic [DW-1:0] bist_seed = 36'h5A5A_1234_5;
  int checks = 0, failures = 0;

  always #1.5 clk_x = ~clk_x;
  for (genvar p = 0; p < N; p++) begin : g_clk
    logic ck = 0;
    always #(3.0 + 0.25 * p) ck = ~ck;
    assign clk_m[p] = ck;
  end

  nexus_top dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [DW-1:0] word(input int s, input int d, input int b, input int w);
    return {4'(s), 4'(d), 12'(b), 16'(w)};
  endfunction

  // ---- mechanism counters ----
  int n_contention = 0, n_tx_stall = 0, n_rx_stall = 0, n_multi = 0, n_rep_hold = 0;
  int n_half = 0, n_full = 0, n_bist = 0;
  int sent = 0, recv = 0;
  int phase = 0;

  always @(posedge clk_x) if (rst_n) begin
    for (int j = 0; j < N; j++) begin
      int n; n = 0;
      for (int i = 0; i < N; i++) n += int'(dut.u_xbar.req[i][j]);
      if (n > 1) n_contention++;
    end
    for (int p = 0; p < N; p++)
      if (dut.xi_valid[p] && !dut.xi_ready[p]) n_rep_hold++;
  end

  // ---- traffic ----
  int dst[N][NB], len[N][NB];
  logic [DW:0] exp_q[N][N][$];       // {tail, data} expected per source/destination
  int n_done_tx = 0;

  for (genvar p = 0; p < N; p++) begin : g_mod
    bit first_rx = 1;
    int rx_src = 0;
    // receiver: random Grant
    always @(negedge g_clk[p].ck) rx_grant[p] = ($urandom % 4) != 0;
    always @(posedge g_clk[p].ck) if (rst_n) begin
      if (tx_req[p] && !tx_grant[p]) n_tx_stall++;
      if (rx_req[p] && !rx_grant[p]) n_rx_stall++;
      if (tx_req[p] && tx_grant[p]) begin
        exp_q[p][int'(tx_data[p][31:28])].push_back({tx_tail[p], tx_data[p]});
        sent++;
      end
      if (rx_req[p] && rx_grant[p]) begin
        logic [DW:0] e;
        if (first_rx) rx_src = int'(rx_ctl[p]);
        else check(rx_ctl[p] == 0, "ctl on a later word");
        if (exp_q[rx_src][p].size() == 0) check(0, $sformatf("%0t port %0d: word %h from nowhere src %0d tail %b ctl %h lb %b sent %0d", $time, p, rx_data[p], rx_src, rx_tail[p], rx_ctl[p], lb_en, sent));
        else begin
          e = exp_q[rx_src][p].pop_front();
          check({rx_tail[p], rx_data[p]} == e,
                $sformatf("port %0d: got %h exp %h (FROM %0d)", p, {rx_tail[p], rx_data[p]}, e, rx_src));
          if (first_rx) check(rx_data[p][35:32] == 4'(rx_src), "FROM differs from source");
        end
        recv++;
        first_rx = rx_tail[p];
      end
    end
    // sender: a clocked process offering the words of its bursts with
    // random gaps; a word is taken on a rising edge with Request and Grant
    int b = 0, w = 0, gap = 0, round = 0;
    always @(posedge g_clk[p].ck) begin
      if (rst_n) begin
        if (tx_req[p] && tx_grant[p]) begin
          if (w == len[p][b] - 1) begin w = 0; b++; end else w++;
          if (b == NB) begin b = 0; round++; n_done_tx++; end
          gap = $urandom % 3;
        end
        if (!tx_req[p] || tx_grant[p]) begin
          if (gap > 0) begin
            gap--;
            tx_req[p] <= 1'b0;
          end else if (phase >= 1 && round < phase) begin
            tx_req[p]  <= 1'b1;
            tx_tail[p] <= (w == len[p][b] - 1);
            tx_data[p] <= word(p, dst[p][b], round * NB + b, w);
            tx_ctl[p]  <= (w == 0) ? 4'(dst[p][b]) : 4'(0);
          end else tx_req[p] <= 1'b0;
        end
      end
    end
    initial begin
      tx_req[p] = 0; tx_tail[p] = 0; tx_data[p] = '0; tx_ctl[p] = '0;
    end
  end

  task automatic drain(input int limit);
    int t;
    t = 0;
    while (recv < sent && t < limit) begin @(posedge clk_x); t++; end
    repeat (50) @(posedge clk_x);
    check(recv == sent, $sformatf("sent %0d words, received %0d", sent, recv));
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        check(exp_q[s][d].size() == 0, $sformatf("%0d words lost %0d->%0d", exp_q[s][d].size(), s, d));
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < N; p++)
      for (int b = 0; b < NB; b++) begin
        dst[p][b] = $urandom % N;
        len[p][b] = 1 + $urandom % 5;
        if (len[p][b] > 1) n_multi++;
      end
    #20 rst_n = 1;
    #20;
    // phase 1: half-cycle resolution
    res_full_cycle = '0; n_half++;
    phase = 1;
    wait (n_done_tx == N);
    drain(20000);
    // phase 2: full-cycle resolution
    res_full_cycle = '1; n_full++;
    phase = 2;
    wait (n_done_tx == 2 * N);
    drain(20000);
    // phase 3: loopback ports and BIST
    res_full_cycle = '0;
    lb_en[3] = 1; lb_en[7] = 1;
    bist_en = 1;
    @(negedge clk_x); bist_start = 1; @(negedge clk_x); bist_start = 0;
    begin
      int t; t = 0;
      while (!bist_done && t < 50000) begin @(posedge clk_x); t++; end
      check(bist_done, "BIST did not finish");
      check(!bist_error, "BIST reported an error");
      check(bist_trips == bist_iters, $sformatf("BIST trips %0d", bist_trips));
      if (bist_done && !bist_error) n_bist++;
      $display("BIST: %0d round trips 15->3->7->15 of %0d-word bursts in %0d fabric clocks",
               bist_trips, bist_len, t);
    end
    check(sent == recv, "module traffic during BIST");
    $display("words %0d, contention %0d, tx stalls %0d, rx stalls %0d, multi-word bursts %0d, repeater holds %0d",
             recv, n_contention, n_tx_stall, n_rx_stall, n_multi, n_rep_hold);
    check(n_contention > 0, "no output contention");
    check(n_tx_stall > 0, "no sender stall");
    check(n_rx_stall > 0, "no receiver stall");
    check(n_multi > 0, "no multi-word burst");
    check(n_rep_hold > 0, "no repeater backpressure");
    check(n_half > 0 && n_full > 0, "resolution modes not both used");
    check(n_bist > 0 && bist_trips > 1, "no loopback bounce / BIST run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
