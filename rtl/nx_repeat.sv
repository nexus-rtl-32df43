// nx_repeat: repeat-until-tail unit on one split or merge control channel.
//
// The control blocks produce one port number per burst; the datapath needs
// that port number for every word of the burst. This unit takes one control
// token, presents it to the datapath as two 1-of-4 codes for as long as the
// burst lasts, and drops it when the tail copy from the datapath reports a
// word with tail=1 (last). So the rest of the crossbar never needs to know
// how long a burst is, and a link opens when a control token arrives and
// closes when the last word has passed.
//
// Own choices: the unit holds one token in a register; a new token may be
// taken in the same clock the old one is dropped, so back-to-back bursts
// need no idle clock. While empty the codes are neutral (all zero).
// Timing: a token accepted on clock edge k is presented from edge k on.
module nx_repeat import nexus_pkg::*; #(
  parameter int unsigned NPORTS = nexus_pkg::NX_NPORTS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      c_valid,
  output logic                      c_ready,
  input  logic [$clog2(NPORTS)-1:0] c_port,
  input  logic                      last,     // tail copy: last word passed
  output e1of4_t                    code_lo,
  output e1of4_t                    code_hi
);

  localparam int unsigned PW = $clog2(NPORTS);

  logic          held;
  logic [3:0]    port;

  assign c_ready = ~held | last;
  assign code_lo = held ? e1of4_enc(port[1:0]) : '0;
  assign code_hi = held ? e1of4_enc(port[3:2]) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= 1'b0;
      port <= '0;
    end else if (c_valid && c_ready) begin
      held <= 1'b1;
      port <= 4'(c_port);
    end else if (last) begin
      held <= 1'b0;
    end
  end

  a_last_needs_link: assert property (@(posedge clk) disable iff (!rst_n)
    last |-> held);

  initial assert (NPORTS <= 16 && PW >= 1) else $error("nx_repeat: NPORTS must be 2..16");

endmodule
