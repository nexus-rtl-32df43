// tb_nx_pipelined_repeater: self-checking test of the half-buffer repeater.
// Random valid/ready traffic; every token must come out once, in order,
// unchanged. With a sink that is always ready, N tokens must take 2N clocks
// (one token per full handshake cycle), and a held token must stay stable.
module tb_nx_pipelined_repeater;
  localparam int W = 37;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  always #5 clk = ~clk;

  nx_pipelined_repeater #(.W(W)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) q.push_back(in_data);
    if (out_valid && out_ready) begin
      if (q.size() == 0) check(0, "token out of nothing");
      else begin
        logic [W-1:0] e;
        e = q.pop_front();
        check(out_data == e, $sformatf("data %h exp %h", out_data, e));
      end
    end
  end

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, n;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random traffic
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid = ($urandom % 3) != 0;
        in_data  = {$urandom, $urandom};
      end
      out_ready = ($urandom % 2) != 0;
      if (out_valid) check(in_ready == 0, "accepts while holding");
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    check(q.size() == 0, "tokens lost");
    // rate: always-ready sink, always-valid source
    n = 0;
    @(negedge clk); in_valid = 1; in_data = 1;
    t0 = 0;
    for (int c = 0; c < 40; c++) begin
      @(posedge clk); if (out_valid && out_ready) n++;
    end
    @(negedge clk); in_valid = 0;
    check(n == 20, $sformatf("rate: %0d tokens in 40 clocks, expected 20", n));
    // stability under stall
    @(negedge clk); out_ready = 0; in_valid = 1; in_data = 37'h1234567;
    @(negedge clk); in_valid = 1; in_data = 37'h7654321;
    repeat (3) @(negedge clk);
    check(out_valid && out_data == 37'h1234567, "held token changed");
    out_ready = 1; in_valid = 0;
    repeat (4) @(posedge clk);
    q.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
