// tb_nx_output_control: self-checking test of the output control unit.
// Random sets of inputs request the output and hold their request until
// acknowledged. Every request must be granted exactly once; each grant must
// put the winner's number on both FROM and M; no grant may happen while
// FROM or M is still full; and with all 16 inputs requesting at once, the
// grants must visit all 16 (no input starves).
module tb_nx_output_control;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, req_ack;
  logic from_valid, from_ready, m_valid, m_ready;
  logic [3:0] from_port, m_port;
  int checks = 0, failures = 0;
  int exp_f[$], exp_m[$];
  int grants[N];

  always #5 clk = ~clk;
  nx_output_control #(.NPORTS(N)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (req_ack != 0) begin
      int w;
      check($onehot(req_ack) && (req_ack & ~req) == 0, "bad acknowledge");
      check(!(from_valid && !from_ready) && !(m_valid && !m_ready), "grant while FROM/M full");
      w = $clog2(req_ack);
      grants[w]++;
      exp_f.push_back(w); exp_m.push_back(w);
    end
    if (from_valid && from_ready) begin
      check(exp_f.size() > 0 && from_port == 4'(exp_f[0]), "FROM port");
      void'(exp_f.pop_front());
    end
    if (m_valid && m_ready) begin
      check(exp_m.size() > 0 && m_port == 4'(exp_m[0]), "M port");
      void'(exp_m.pop_front());
    end
  end

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // requests are raised by the stimulus and dropped when acknowledged
  logic [N-1:0] raise = '0;
  int total = 0;
  always @(posedge clk) req <= (req & ~req_ack) | raise;

  initial begin
    req = '0; from_ready = 0; m_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // all inputs at once, FROM/M always taken: 16 grants in 16 clocks
    @(negedge clk); raise = '1; from_ready = 1; m_ready = 1;
    @(negedge clk); raise = '0;
    repeat (16) @(negedge clk);
    check(req == '0, "not all 16 granted in 16 clocks");
    for (int k = 0; k < N; k++) check(grants[k] == 1, $sformatf("input %0d granted %0d times", k, grants[k]));
    // random load with stalls on FROM and M
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      raise = '0;
      for (int k = 0; k < N; k++) if (!req[k] && ($urandom % 30) == 0) begin raise[k] = 1; total++; end
      from_ready = 1'($urandom); m_ready = 1'($urandom);
    end
    @(negedge clk); raise = '0; from_ready = 1; m_ready = 1;
    repeat (60) @(posedge clk);
    check(req == '0 && exp_f.size() == 0 && exp_m.size() == 0, "requests or FROM/M tokens left");
    begin
      int g; g = 0;
      for (int k = 0; k < N; k++) g += grants[k];
      check(g == total + 16, $sformatf("grants %0d requests %0d", g, total + 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
