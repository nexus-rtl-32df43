// tb_nx_a2s: self-checking test of the asynchronous-to-synchronous converter.
// The fabric clock (7 ns) and module clock (10 ns) are unrelated. The fabric
// side offers bursts (words plus one FROM per burst) with random timing and
// the module grants with random stalls. Every word must reach the module
// once, in order, with ctl = FROM on a first word and 0 otherwise. Single
// words sent into an idle converter must be requested at the first module
// rising edge 1/2 to 3/2 module clocks after the fabric handed them over
// (1 to 2 with full-cycle resolution).
`timescale 1ns/1ps
module tb_nx_a2s;
  localparam int DW = 36, CW = 4;
  localparam real TM = 10.0;
  logic clk_m = 0, clk_x = 0, rst_n = 0;
  logic res_full_cycle, m_req, m_grant, m_tail, x_valid, x_ready, x_tail, from_valid, from_ready;
  logic [DW-1:0] m_data, x_data;
  logic [CW-1:0] m_ctl, from_port;
  int checks = 0, failures = 0;

  always #(TM / 2) clk_m = ~clk_m;
  always #3.5 clk_x = ~clk_x;

  nx_a2s #(.DATA_W(DW), .CTRL_W(CW), .SLOTS(2)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  typedef struct { logic [DW-1:0] d; logic t; logic [CW-1:0] c; } w_t;
  w_t q[$];
  int sent = 0, recv = 0;
  bit first_x = 1, grant_rand = 1;
  real t_hand;

  always @(posedge clk_x) if (rst_n) begin
    if (x_valid && x_ready) begin
      q.push_back('{x_data, x_tail, first_x ? from_port : '0});
      first_x = x_tail; sent++; t_hand = $realtime;
    end
  end
  always @(posedge clk_m) if (rst_n) begin
    if (m_req && m_grant) begin
      w_t e;
      if (q.size() == 0) check(0, "word from nowhere");
      else begin
        e = q.pop_front();
        check(m_data == e.d && m_tail == e.t && m_ctl == e.c,
              $sformatf("word %h/%b/%h exp %h/%b/%h", m_data, m_tail, m_ctl, e.d, e.t, e.c));
      end
      recv++;
    end
  end
  always @(negedge clk_m) m_grant = grant_rand ? (($urandom % 3) != 0) : 1'b1;

  initial begin
    #400000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    x_valid = 0; x_data = 0; x_tail = 0; from_valid = 0; from_port = 0; res_full_cycle = 0;
    #30 rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      res_full_cycle = 1'(mode);
      // random bursts
      grant_rand = 1;
      for (int b = 0; b < 40; b++) begin
        int len; len = 1 + $urandom % 5;
        from_valid = 1; from_port = 4'($urandom);
        for (int w = 0; w < len; w++) begin
          @(negedge clk_x);
          x_valid = 1; x_data = {$urandom, 4'(w)}; x_tail = (w == len - 1);
          #0.1;
          while (!x_ready) @(negedge clk_x);
          @(negedge clk_x);
          x_valid = 0; from_valid = 0;
          if ($urandom % 2) repeat ($urandom % 3) @(negedge clk_x);
        end
      end
      repeat (20) @(negedge clk_m);
      check(q.size() == 0 && recv == sent, $sformatf("sent %0d received %0d", sent, recv));
      // latency of single words into an idle converter
      grant_rand = 0;
      for (int k = 0; k < 12; k++) begin
        real dt;
        repeat (2 + $urandom % 3) @(negedge clk_x);
        from_valid = 1; from_port = 4'(k); x_valid = 1; x_data = 36'(k); x_tail = 1;
        @(posedge clk_x); #0.1;
        x_valid = 0; from_valid = 0;
        wait (m_req == 1);
        @(posedge clk_m);
        dt = ($realtime - t_hand) / TM;
        if (mode == 0) check(dt >= 0.5 && dt <= 1.5 + 0.01, $sformatf("latency %f clocks", dt));
        else           check(dt >= 1.0 && dt <= 2.0 + 0.01, $sformatf("latency %f clocks (full cycle)", dt));
        @(negedge clk_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
