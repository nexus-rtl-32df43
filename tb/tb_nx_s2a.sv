// tb_nx_s2a: self-checking test of the synchronous-to-asynchronous converter.
// The module clock (10 ns) and the fabric clock (7 ns) are unrelated. The
// module side offers bursts with random gaps; the fabric side takes words
// and TO tokens with random stalls. Every word must come out once and in
// order, and each burst must produce exactly one TO, equal to the first
// word's ctl and taken before that word. The module must see Grant drop
// when both slots are in use and the fabric is stalled, and the test is
// run once with each metastability resolution setting.
`timescale 1ns/1ps
module tb_nx_s2a;
  localparam int DW = 36, CW = 4;
  logic clk_m = 0, clk_x = 0, rst_n = 0;
  logic res_full_cycle, m_req, m_grant, m_tail, x_valid, x_ready, x_tail, to_valid, to_ready;
  logic [DW-1:0] m_data, x_data;
  logic [CW-1:0] m_ctl, to_port;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk_m = ~clk_m;
  always #3.5 clk_x = ~clk_x;

  nx_s2a #(.DATA_W(DW), .CTRL_W(CW), .SLOTS(2)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  typedef struct { logic [DW-1:0] d; logic t; logic [CW-1:0] c; bit first; } w_t;
  w_t q[$];
  int sent = 0, recv = 0;
  bit first_m = 1, pending_to = 0;
  logic [CW-1:0] to_seen;

  // module side
  always @(posedge clk_m) if (rst_n) begin
    if (m_req && m_grant) begin
      q.push_back('{m_data, m_tail, m_ctl, first_m});
      first_m = m_tail; sent++;
    end
    if (m_req && !m_grant) stalls++;
  end
  // fabric side
  always @(posedge clk_x) if (rst_n) begin
    if (to_valid && to_ready) begin
      check(!pending_to, "two TO tokens for one burst");
      pending_to = 1; to_seen = to_port;
    end
    if (x_valid && x_ready) begin
      w_t e;
      if (q.size() == 0) check(0, "word from nowhere");
      else begin
        e = q.pop_front();
        check(x_data == e.d && x_tail == e.t, $sformatf("word %h exp %h", x_data, e.d));
        if (e.first) begin
          check(pending_to && to_seen == e.c, "TO missing or wrong");
          pending_to = 0;
        end
      end
      recv++;
    end
  end
  always @(negedge clk_x) begin
    x_ready  = ($urandom % 4) != 0 && !(stall_phase);
    to_ready = ($urandom % 3) != 0;
  end
  bit stall_phase = 0;

  initial begin
    #400000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m_req = 0; m_data = 0; m_tail = 0; m_ctl = 0; res_full_cycle = 0;
    #30 rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      res_full_cycle = 1'(mode);
      for (int b = 0; b < 40; b++) begin
        int len; len = 1 + $urandom % 5;
        if (b == 20) begin
          stall_phase = 1;
          fork begin #150; stall_phase = 0; end join_none
        end
        for (int w = 0; w < len; w++) begin
          @(negedge clk_m);
          m_req = 1; m_data = {$urandom, 4'(w)}; m_tail = (w == len - 1); m_ctl = 4'($urandom);
          #1;
          while (!m_grant) @(negedge clk_m);
          @(negedge clk_m);
          m_req = 0;
          if ($urandom % 2) repeat ($urandom % 3) @(negedge clk_m);
        end
      end
      repeat (30) @(negedge clk_m);
      check(q.size() == 0 && recv == sent, $sformatf("sent %0d received %0d", sent, recv));
    end
    check(stalls > 0, "Grant never dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
