// tb_nx_crossbar: self-checking test of the 16-port crossbar.
// Every input sends random-length bursts to random outputs, offering TO and
// words independently; outputs accept FROM and words with random stalls.
// Each word carries {source, destination, burst number, word number}, so the
// checker can tell that every burst arrives whole, in order per
// source/destination pair, with the right FROM, never interleaved with
// another burst, and that nothing is lost or duplicated. It also checks the
// latency of a burst into an idle crossbar (first word at the output after
// the third clock edge once TO and word are offered), that contention really happened,
// and that back-to-back 2-word bursts from one input run at one word per
// clock (the arbitration does not slow bursts of two words or more).
module tb_nx_crossbar;
  localparam int N = 16, DW = 36, NB = 30;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready, in_tail, to_valid, to_ready;
  logic [N-1:0] out_valid, out_ready, out_tail, from_valid, from_ready;
  logic [N-1:0][DW-1:0] in_data, out_data;
  logic [N-1:0][3:0] to_port, from_port;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  nx_crossbar #(.NPORTS(N), .DATA_W(DW)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [DW-1:0] word(input int s, input int d, input int b, input int w);
    return {4'(s), 4'(d), 12'(b), 16'(w)};
  endfunction

  // ---- stimulus plan ----
  int dst[N][NB], len[N][NB];
  int words_sent = 0, words_recv = 0, bursts_recv = 0, contention = 0;
  bit random_phase = 0;
  bit out_ready_all = 0;
  int tnow = 0, first_w = -1;
  always @(negedge clk) tnow++;

  // per input: TO process and word process
  for (genvar i = 0; i < N; i++) begin : g_src
    int tb_b = 0, wb = 0, ww = 0;
    always @(posedge clk) if (rst_n && random_phase) begin
      if (to_valid[i] && to_ready[i]) tb_b++;
      if (in_valid[i] && in_ready[i]) begin
        words_sent++;
        if (ww == len[i][wb] - 1) begin ww = 0; wb++; end else ww++;
      end
    end
    always @(negedge clk) if (random_phase) begin
      to_valid[i] = (tb_b < NB);
      to_port[i]  = (tb_b < NB) ? 4'(dst[i][tb_b]) : '0;
      in_valid[i] = (wb < NB) && (wb < tb_b || (wb == tb_b && ($urandom % 2)));
      in_data[i]  = (wb < NB) ? word(i, dst[i][wb], wb, ww) : '0;
      in_tail[i]  = (wb < NB) && (ww == len[i][wb] - 1);
    end
  end

  // per output: checker
  for (genvar j = 0; j < N; j++) begin : g_sink
    bit in_burst = 0;
    int src = 0, w = 0;
    int next_b[N];
    initial for (int k = 0; k < N; k++) next_b[k] = 0;
    always @(negedge clk) begin
      from_ready[j] = random_phase ? (!in_burst && ($urandom % 3 != 0)) : 1'b1;
      out_ready[j]  = random_phase ? (in_burst && ($urandom % 3 != 0)) : 1'b1;
    end
    always @(posedge clk) if (rst_n && random_phase) begin
      if (from_valid[j] && from_ready[j]) begin
        in_burst = 1; src = from_port[j]; w = 0;
        while (next_b[src] < NB && dst[src][next_b[src]] != j) next_b[src]++;
      end else if (out_valid[j] && out_ready[j]) begin
        check(out_data[j] == word(src, j, next_b[src], w),
              $sformatf("out %0d: got %h exp %h", j, out_data[j], word(src, j, next_b[src], w)));
        check(out_tail[j] == (w == len[src][next_b[src]] - 1), "tail position");
        words_recv++;
        if (out_tail[j]) begin in_burst = 0; next_b[src]++; bursts_recv++; end
        else w++;
      end
    end
  end

  // contention: two or more inputs requesting the same output in one clock
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) begin
      int n; n = 0;
      for (int i = 0; i < N; i++) n += int'(dut.req[i][j]);
      if (n > 1) contention++;
    end
  end

  initial begin
    #3000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t, nw;
    in_valid = 0; to_valid = 0; in_data = '0; in_tail = 0; to_port = '0;
    for (int i = 0; i < N; i++)
      for (int b = 0; b < NB; b++) begin
        dst[i][b] = $urandom % N;
        len[i][b] = 1 + $urandom % 5;
      end
    repeat (3) @(posedge clk); rst_n = 1;

    // 1) latency into an idle crossbar: input 3 -> output 9, one word
    out_ready_all = 1;
    @(negedge clk);
    to_valid[3] = 1; to_port[3] = 9; in_valid[3] = 1; in_data[3] = 36'h123456789; in_tail[3] = 1;
    t = 0;
    while (!out_valid[9] && t < 20) begin
      @(posedge clk); #1; t++;
      if (t == 1) to_valid[3] = 0;     // TO taken on the first edge
    end
    check(t == 3, $sformatf("idle latency %0d clocks, expected 3", t));
    check(out_data[9] == 36'h123456789 && out_tail[9], "first burst data");
    @(negedge clk); @(negedge clk); in_valid[3] = 0;   // the word passed on the edge between
    repeat (4) @(negedge clk);

    // 2) back-to-back 2-word bursts from input 5 alternating between outputs 1 and 2
    nw = 0;
    fork
      begin : drive_to
        for (int b = 0; b < 10; b++) begin
          to_valid[5] = 1; to_port[5] = 4'(1 + b % 2);
          #1;
          while (!to_ready[5]) @(negedge clk);
          @(negedge clk);
        end
        to_valid[5] = 0;
      end
      begin : drive_words
        for (int k = 0; k < 20; k++) begin
          in_valid[5] = 1; in_data[5] = 36'(k); in_tail[5] = 1'(k % 2);
          #1;
          while (!in_ready[5]) @(negedge clk);
          if (first_w < 0) first_w = tnow;
          nw++;
          @(negedge clk);
        end
        in_valid[5] = 0;
      end
      begin : count
        while (nw < 20 && tnow < 400) @(negedge clk);
        check(tnow - first_w <= 21, $sformatf("20 words of 2-word bursts took %0d clocks", tnow - first_w));
      end
    join
    repeat (4) @(negedge clk);

    // 3) random traffic on all ports
    out_ready_all = 0;
    random_phase = 1;
    t = 0;
    while (bursts_recv < N * NB && t < 100000) begin @(posedge clk); t++; end
    check(bursts_recv == N * NB, $sformatf("%0d of %0d bursts arrived", bursts_recv, N * NB));
    check(words_recv == words_sent, "word count");
    check(contention > 0, "no output contention happened");
    $display("random phase: %0d bursts, %0d words, %0d contended arbitrations, %0d clocks",
             bursts_recv, words_recv, contention, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
