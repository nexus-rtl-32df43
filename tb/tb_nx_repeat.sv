// tb_nx_repeat: self-checking test of the repeat-until-tail unit.
// A control token must be shown as two 1-of-4 codes for every clock until
// `last` is seen, then dropped (codes neutral); a second token offered while
// the first is held must wait, and may be taken in the same clock as `last`.
module tb_nx_repeat;
  import nexus_pkg::*;
  logic clk = 0, rst_n = 0;
  logic c_valid, c_ready, last;
  logic [3:0] c_port;
  e1of4_t code_lo, code_hi;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  nx_repeat #(.NPORTS(16)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit shows(input int p);
    return code_lo == e1of4_enc(2'(p % 4)) && code_hi == e1of4_enc(2'(p / 4));
  endfunction

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    c_valid = 0; last = 0; c_port = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(code_lo == 0 && code_hi == 0 && c_ready, "not neutral after reset");
    for (int b = 0; b < 20; b++) begin
      int p, len;
      p = $urandom % 16; len = 1 + $urandom % 6;
      c_valid = 1; c_port = 4'(p);
      @(negedge clk);
      c_valid = 1; c_port = 4'(p ^ 5);       // next token waits
      for (int w = 0; w < len; w++) begin
        check(shows(p), $sformatf("burst %0d word %0d: codes %b %b for port %0d", b, w, code_hi, code_lo, p));
        check(c_ready == 0 || w == len - 1, "second token taken early");
        last = (w == len - 1);
        @(negedge clk);
        last = 0;
      end
      // the waiting token (p^5) was taken together with last
      check(shows(p ^ 5), "token not taken with last");
      c_valid = 0;
      last = 1; @(negedge clk); last = 0;
      check(code_lo == 0 && code_hi == 0, "not dropped after last");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
