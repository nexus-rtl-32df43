// nx_loopback: test loopback mux on the synchronous side of a converter.
//
// In normal mode (lb_en=0) it connects the module to its converters: module
// egress (tx_*) to the S2A (s_*), A2S (a_*) to module ingress (rx_*).
// In loopback mode (lb_en=1) the module is cut off and every burst arriving
// from the A2S is sent straight back into the S2A. On the first word of each
// burst the FROM field and the low CTRL_W data bits are swapped: the old
// data bits become the new TO and the old FROM takes their place in the
// data. A burst can therefore carry its next hop in its first word, and
// after being bounced it carries the port it came from.
//
// Own choices: the swapped data bits are bits [CTRL_W-1:0]; the burst
// position is tracked by a first-word flag updated on every transfer through
// the loop; lb_en should only change while no burst is passing. Module clock
// domain, combinational except for the first-word flag.
module nx_loopback #(
  parameter int unsigned DATA_W = nexus_pkg::NX_DATA_W,
  parameter int unsigned CTRL_W = nexus_pkg::NX_CTRL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lb_en,
  // module egress
  input  logic              tx_req,
  output logic              tx_grant,
  input  logic [DATA_W-1:0] tx_data,
  input  logic              tx_tail,
  input  logic [CTRL_W-1:0] tx_ctl,
  // module ingress
  output logic              rx_req,
  input  logic              rx_grant,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_tail,
  output logic [CTRL_W-1:0] rx_ctl,
  // toward the S2A
  output logic              s_req,
  input  logic              s_grant,
  output logic [DATA_W-1:0] s_data,
  output logic              s_tail,
  output logic [CTRL_W-1:0] s_ctl,
  // from the A2S
  input  logic              a_req,
  output logic              a_grant,
  input  logic [DATA_W-1:0] a_data,
  input  logic              a_tail,
  input  logic [CTRL_W-1:0] a_ctl
);

  logic first;

  always_comb begin
    if (lb_en) begin
      s_req    = a_req;
      a_grant  = s_grant;
      s_tail   = a_tail;
      s_data   = a_data;
      s_ctl    = '0;
      if (first) begin
        s_ctl                = a_data[CTRL_W-1:0];
        s_data[CTRL_W-1:0]   = a_ctl;
      end
      tx_grant = 1'b0;
      rx_req   = 1'b0;
    end else begin
      s_req    = tx_req;
      tx_grant = s_grant;
      s_data   = tx_data;
      s_tail   = tx_tail;
      s_ctl    = tx_ctl;
      rx_req   = a_req;
      a_grant  = rx_grant;
    end
  end

  assign rx_data = a_data;
  assign rx_tail = a_tail;
  assign rx_ctl  = a_ctl;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                             first <= 1'b1;
    else if (lb_en && a_req && s_grant)     first <= a_tail;

endmodule
