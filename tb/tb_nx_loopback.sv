// tb_nx_loopback: self-checking test of the converter loopback mux.
// Normal mode: module egress must reach the S2A side unchanged and the A2S
// side must reach the module unchanged. Loopback mode: the module must be
// cut off (no Request, no Grant), every word from the A2S side must be
// passed to the S2A side, and on each first word the low 4 data bits must
// become the new TO while the old FROM replaces them in the data.
module tb_nx_loopback;
  localparam int DW = 36, CW = 4;
  logic clk = 0, rst_n = 0, lb_en;
  logic tx_req, tx_grant, tx_tail, rx_req, rx_grant, rx_tail;
  logic s_req, s_grant, s_tail, a_req, a_grant, a_tail;
  logic [DW-1:0] tx_data, rx_data, s_data, a_data;
  logic [CW-1:0] tx_ctl, rx_ctl, s_ctl, a_ctl;
  int checks = 0, failures = 0, bounced = 0;

  always #5 clk = ~clk;
  nx_loopback #(.DATA_W(DW), .CTRL_W(CW)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    lb_en = 0; tx_req = 0; rx_grant = 0; s_grant = 0; a_req = 0;
    tx_data = 0; tx_tail = 0; tx_ctl = 0; a_data = 0; a_tail = 0; a_ctl = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // normal mode: random values pass straight through
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      tx_req = 1'($urandom); s_grant = 1'($urandom); a_req = 1'($urandom); rx_grant = 1'($urandom);
      tx_data = {$urandom, 4'($urandom)}; tx_tail = 1'($urandom); tx_ctl = 4'($urandom);
      a_data = {$urandom, 4'($urandom)}; a_tail = 1'($urandom); a_ctl = 4'($urandom);
      #1;
      check(s_req == tx_req && tx_grant == s_grant && s_data == tx_data && s_tail == tx_tail && s_ctl == tx_ctl,
            "egress not passed through");
      check(rx_req == a_req && a_grant == rx_grant && rx_data == a_data && rx_tail == a_tail && rx_ctl == a_ctl,
            "ingress not passed through");
    end
    @(negedge clk); tx_req = 0; a_req = 0;
    // loopback mode: bursts from the A2S side bounce back
    lb_en = 1;
    tx_req = 1;      // the module is ignored
    for (int b = 0; b < 20; b++) begin
      int len; logic [3:0] from;
      len = 1 + $urandom % 4; from = 4'($urandom);
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        a_req = 1; a_tail = (w == len - 1); a_data = {$urandom, 4'($urandom)};
        a_ctl = (w == 0) ? from : 4'h0;
        s_grant = 0;
        repeat ($urandom % 2) begin #1; check(a_grant == 0, "grant without S2A grant"); @(negedge clk); end
        s_grant = 1;
        #1;
        check(rx_req == 0 && tx_grant == 0, "module not cut off");
        check(s_req == 1 && a_grant == 1 && s_tail == a_tail, "handshake not looped");
        if (w == 0) begin
          check(s_ctl == a_data[3:0] && s_data == {a_data[DW-1:4], from}, "first word not swapped");
          bounced++;
        end else begin
          check(s_data == a_data, "later word changed");
        end
        @(posedge clk);
      end
    end
    @(negedge clk); a_req = 0; s_grant = 0;
    check(bounced == 20, "bursts bounced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
