// tb_nx_sync_control: self-checking test of the converter control circuit.
// A model of the far side flips a slot's toggle at a random time within the
// module clock period; the first rising edge that sees the token
// (async_ready) must come 1/2 to 3/2 clocks later with half-cycle resolution, and 1 to 2 clocks later with
// full-cycle resolution. A transfer (go) may happen only when both sides are
// ready, must flip the slot's near toggle and move to the next slot. Both
// the S2A form (slots start with a token) and the A2S form (start empty)
// are tested.
`timescale 1ns/1ps
module tb_nx_sync_control;
  localparam int SLOTS = 2;
  localparam real TM = 10.0;
  logic clk = 0, rst_n = 0;
  logic res_full_cycle;
  logic [SLOTS-1:0] far_a, near_a, far_s, near_s;
  logic sync_ready_a, sync_ready_s, async_ready_a, async_ready_s, go_a, go_s;
  logic [0:0] ptr_a, ptr_s;
  int checks = 0, failures = 0;

  always #(TM / 2) clk = ~clk;

  // A2S form: a token is a full slot
  nx_sync_control #(.SLOTS(SLOTS), .TOKENS_INIT(1'b0)) u_a (
    .clk, .rst_n, .res_full_cycle, .far_tgl(far_a), .near_tgl(near_a),
    .sync_ready(sync_ready_a), .async_ready(async_ready_a), .go(go_a), .ptr(ptr_a));
  // S2A form: a token is a free slot
  nx_sync_control #(.SLOTS(SLOTS), .TOKENS_INIT(1'b1)) u_s (
    .clk, .rst_n, .res_full_cycle, .far_tgl(far_s), .near_tgl(near_s),
    .sync_ready(sync_ready_s), .async_ready(async_ready_s), .go(go_s), .ptr(ptr_s));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    far_a = 0; far_s = 0; sync_ready_a = 0; sync_ready_s = 0; res_full_cycle = 0;
    #(3 * TM) rst_n = 1;
    // S2A form: both slots free at start
    @(negedge clk);
    check(async_ready_s == 1, "S2A form does not start with a token");
    sync_ready_s = 1;
    @(negedge clk); check(near_s == 2'b01 && ptr_s == 1, "first S2A transfer");
    @(negedge clk); check(near_s == 2'b11 && ptr_s == 0, "second S2A transfer");
    check(async_ready_s == 0, "S2A grants with no space left");
    @(negedge clk); check(near_s == 2'b11, "S2A transfer without space");
    sync_ready_s = 0;
    far_s = 2'b11;      // far side hands both slots back
    repeat (3) @(negedge clk);
    check(async_ready_s == 1, "S2A space not returned");

    // A2S form: latency from far toggle to async_ready
    for (int mode = 0; mode < 2; mode++) begin
      res_full_cycle = 1'(mode);
      for (int k = 0; k < 20; k++) begin
        real t0, dt, off;
        @(posedge clk);
        off = 0.05 + (TM - 0.1) * ($urandom % 1000) / 1000.0;
        #(off);
        t0 = $realtime;
        far_a[ptr_a] = ~far_a[ptr_a];
        wait (async_ready_a == 1);
        @(posedge clk);          // first rising edge that sees the token
        dt = ($realtime - t0) / TM;
        if (mode == 0) check(dt >= 0.5 && dt <= 1.5, $sformatf("half-cycle latency %f clocks", dt));
        else           check(dt >= 1.0 && dt <= 2.0, $sformatf("full-cycle latency %f clocks", dt));
        // the module takes the word: go for exactly one clock
        #0.1; sync_ready_a = 1;
        @(posedge clk); #0.1;
        check(go_a == 0 && async_ready_a == 0, "A2S consumed twice");
        sync_ready_a = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
