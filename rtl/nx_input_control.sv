// nx_input_control: input control unit of one crossbar port.
//
// It takes the TO token that heads each burst, copies the destination to the
// split control channel S (toward this row's repeat unit), and sends one
// request token to the output control unit of that destination over a
// request channel (one data wire plus acknowledge; there are NPORTS such
// channels per input). The acknowledge comes back when the output has
// granted this input.
//
// Deadlock rule: an input has at most one request outstanding. A new TO is
// taken only once the previous request has been granted (or is granted in
// the same clock) and the previous S token has moved on. This is the
// "blocking" form of the rule: the first request token holds back the next
// one until it wins, with no separate grant channel.
// Timing: S and the request are presented the clock after TO is taken.
module nx_input_control #(
  parameter int unsigned NPORTS = nexus_pkg::NX_NPORTS,
  localparam int unsigned PW    = $clog2(NPORTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              to_valid,
  output logic              to_ready,
  input  logic [PW-1:0]     to_port,
  output logic              s_valid,
  input  logic              s_ready,
  output logic [PW-1:0]     s_port,
  output logic [NPORTS-1:0] req,      // request rail, one per output
  input  logic [NPORTS-1:0] req_ack   // grant acknowledge, one per output
);

  logic          rq_v;
  logic [PW-1:0] rq_dst;
  logic          rq_done, s_done;

  assign rq_done  = ~rq_v | req_ack[rq_dst];
  assign s_done   = ~s_valid | s_ready;
  assign to_ready = rq_done & s_done;

  always_comb begin
    req = '0;
    req[rq_dst] = rq_v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_v    <= 1'b0;
      rq_dst  <= '0;
      s_valid <= 1'b0;
      s_port  <= '0;
    end else begin
      if (rq_v && req_ack[rq_dst]) rq_v <= 1'b0;
      if (s_valid && s_ready)      s_valid <= 1'b0;
      if (to_valid && to_ready) begin
        rq_v    <= 1'b1;
        rq_dst  <= to_port;
        s_valid <= 1'b1;
        s_port  <= to_port;
      end
    end
  end

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req));
  a_ack_only_requested: assert property (@(posedge clk) disable iff (!rst_n) (req_ack & ~req) == '0);

endmodule
