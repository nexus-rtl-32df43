// tb_nx_input_control: self-checking test of the input control unit.
// Each TO must produce one S token with the same port and one request on
// the matching request wire; no second TO may be taken (and no second
// request raised) before the first request is acknowledged, however long
// the output takes to grant it.
module tb_nx_input_control;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic to_valid, to_ready, s_valid, s_ready;
  logic [3:0] to_port, s_port;
  logic [N-1:0] req, req_ack;
  int checks = 0, failures = 0;
  int exp_s[$], exp_r[$];

  always #5 clk = ~clk;
  nx_input_control #(.NPORTS(N)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // output side model: grant the request after a random wait
  int wait_cnt = 0;
  always @(negedge clk) begin
    req_ack = '0;
    s_ready = 1'($urandom);
    if (rst_n && req != 0) begin
      check($onehot(req), "more than one request");
      if (wait_cnt == 0) begin
        req_ack = req;
        wait_cnt = $urandom % 5;
      end else wait_cnt--;
    end
  end

  int outstanding = 0;
  always @(posedge clk) if (rst_n) begin
    if (to_valid && to_ready) begin
      check(outstanding == 0 || (req_ack != 0), "TO taken with a request outstanding");
      exp_s.push_back(to_port); exp_r.push_back(to_port);
    end
    if (s_valid && s_ready) begin
      check(exp_s.size() > 0 && s_port == 4'(exp_s[0]), "S port");
      void'(exp_s.pop_front());
    end
    if (req_ack != 0) begin
      check(exp_r.size() > 0 && req == (16'(1) << exp_r[0]), "request wire");
      void'(exp_r.pop_front());
    end
    outstanding = exp_r.size();
  end

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    to_valid = 0; to_port = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    n = 0;
    while (n < 100) begin
      @(negedge clk);
      if (to_valid && to_ready) begin n++; to_valid = 0; end
      if (!to_valid && ($urandom % 2)) begin to_valid = 1; to_port = 4'($urandom); end
      #1;
      // grant in this clock (req_ack set at negedge) lets a new TO in
    end
    @(negedge clk); to_valid = 0;
    repeat (20) @(posedge clk);
    check(exp_s.size() == 0 && exp_r.size() == 0, "tokens left behind");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
