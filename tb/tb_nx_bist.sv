// tb_nx_bist: self-checking test of the BIST assist module.
// The rest of the interconnect is replaced by a model of a round trip
// through two ports in loopback: it takes a burst and its TO from the BIST,
// applies the two FROM/data swaps that ports A and B make, and returns it
// with FROM = B after a random delay, offering words with random gaps. The
// test checks that every launched burst is addressed to A and carries the
// expected first word, that the BIST repeats the round trip exactly `iters`
// times, raises `done` without `error`, and that a single corrupted bit in
// the returning data makes `error` rise.
module tb_nx_bist;
  localparam int DW = 36, CW = 4, BIST = 15;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, error;
  logic [CW-1:0] port_a, port_b, to_port, from_port;
  logic [7:0] iters, trips;
  logic [3:0] len;
  logic [DW-1:0] seed, x_out_data, x_in_data;
  logic x_out_valid, x_out_ready, x_out_tail, to_valid, to_ready;
  logic x_in_valid, x_in_ready, x_in_tail, from_valid, from_ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  nx_bist #(.DATA_W(DW), .CTRL_W(CW)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- round-trip model ----
  logic [DW:0] buf_q[$];      // {tail, data} of the burst in flight
  logic [CW-1:0] to_q[$];
  int launched = 0;
  bit corrupt = 0;
  always @(posedge clk) if (rst_n) begin
    if (to_valid && to_ready) begin
      to_q.push_back(to_port);
      check(to_port == port_a, "burst not sent to port A");
      launched++;
    end
    if (x_out_valid && x_out_ready) buf_q.push_back({x_out_tail, x_out_data});
  end
  always @(negedge clk) begin
    x_out_ready = ($urandom % 3) != 0;
    to_ready    = ($urandom % 3) != 0;
  end

  // return path: one burst at a time once it is complete
  initial begin
    x_in_valid = 0; from_valid = 0; x_in_data = 0; x_in_tail = 0; from_port = 0;
    forever begin
      @(negedge clk);
      if (to_q.size() > 0 && buf_q.size() > 0 && buf_q[buf_q.size() - 1][DW]) begin
        logic [CW-1:0] t;
        t = to_q.pop_front();
        repeat ($urandom % 8) @(negedge clk);
        from_valid = 1; from_port = port_b;
        for (bit first = 1; ; first = 0) begin
          logic [DW:0] w;
          w = buf_q.pop_front();
          x_in_valid = 1; x_in_tail = w[DW]; x_in_data = w[DW-1:0];
          if (first) begin
            // port A: TO <- low bits (B), low bits <- FROM (BIST)
            // port B: TO <- low bits (BIST), low bits <- FROM (A)
            check(w[CW-1:0] == port_b, "first word does not carry port B");
            x_in_data[CW-1:0] = t;
          end
          if (corrupt && !first) begin x_in_data[7] = ~x_in_data[7]; corrupt = 0; end
          #1;
          while (!x_in_ready) @(negedge clk);
          @(negedge clk);
          from_valid = 0;
          x_in_valid = 0;
          if (w[DW]) break;
          repeat ($urandom % 2) @(negedge clk);
        end
      end
    end
  end

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int n, input int l, input bit bad);
    int t;
    @(negedge clk);
    port_a = 4'(3 + n % 5); port_b = 4'(9 + n % 4); iters = 8'(n); len = 4'(l);
    seed = {$urandom, 4'($urandom)};
    launched = 0;
    corrupt = bad && (l > 1);
    start = 1; @(negedge clk); start = 0;
    check(busy, "not busy after start");
    t = 0;
    while (!done && t < 20000) begin @(negedge clk); t++; end
    check(done, "BIST never finished");
    check(trips == 8'(n), $sformatf("trips %0d expected %0d", trips, n));
    check(launched == n, $sformatf("%0d bursts sent to A, expected %0d", launched, n));
    if (bad && l > 1) check(error, "corruption not detected");
    else              check(!error, "error flagged on clean run");
    check(!busy, "busy after done");
  endtask

  initial begin
    start = 0; port_a = 0; port_b = 0; iters = 0; len = 0; seed = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(1, 1, 0);
    run(3, 4, 0);
    run(7, 2, 0);
    run(5, 6, 1);
    run(2, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
