// nx_pipelined_repeater: one pipelined repeater (half buffer) on a long link.
//
// A pipelined repeater breaks a long channel into two shorter handshakes so
// the link keeps its rate over distance. It stores half a token: at any time
// either its input channel or its output channel is empty, so it never
// accepts a new token while it still holds one. That rule is kept exactly
// here: in_ready is the inverse of "holding a token".
//
// The asynchronous channel is modelled as a valid/ready token channel
// sampled on the fabric clock clk. One clock stands for one half of a
// four-phase handshake (the set phase or the return-to-neutral phase), so a
// half buffer passes one token every two clocks, as a real half buffer passes
// one token per full handshake cycle. The gate structure of the real stage
// (C-elements per rail, NAND completion) is replaced by this behaviour.
//
// Interface: in_* from upstream, out_* to downstream, both on clk.
// Latency: one clock from in_valid&in_ready to out_valid.
module nx_pipelined_repeater #(
  parameter int unsigned W = nexus_pkg::NX_DATA_W + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  logic full;

  assign in_ready  = ~full;
  assign out_valid = full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= 1'b0;
      out_data <= '0;
    end else if (full) begin
      if (out_ready) full <= 1'b0;
    end else if (in_valid) begin
      full     <= 1'b1;
      out_data <= in_data;
    end
  end

  // Half-token rule: the stage never holds a token and accepts another.
  a_half_token: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && in_ready && full));

endmodule
