// nexus_top: a complete Nexus interconnect for NPORTS synchronous modules.
//
// Every module has its own clock clk_m[p] and talks to the interconnect
// through two request/grant FIFO channels: egress (tx_*, module to Nexus)
// and ingress (rx_*, Nexus to module). A word is {ctl, tail, data}; a burst
// is one or more words ending with tail=1, and ctl of the first word is the
// destination port (TO) on egress and the source port (FROM) on ingress.
//
// Per port, from the module outward:
//   nx_loopback -> nx_s2a -> nx_link (word) + nx_link (TO)   -> crossbar input
//   crossbar output -> nx_link (word) + nx_link (FROM) -> nx_a2s -> nx_loopback
// The converters move each word between the module clock and the fabric;
// the links are chains of NREP pipelined repeaters; nx_crossbar routes whole
// bursts with per-output arbitration. On port BIST_PORT the built-in self
// test module nx_bist can take the place of the converters (bist_en=1).
//
// The fabric, asynchronous in the original, runs here on clk_x, which has
// no frequency or phase relation to any clk_m. One reset, rst_n, is applied
// asynchronously to all domains and must be released while the clocks run.
// res_full_cycle[p] selects 1/2 or 1 module clock of metastability
// resolution for port p's converters; lb_en[p] puts port p in loopback.
// Both, and bist_en, should only change while the port is idle.
module nexus_top #(
  parameter int unsigned NPORTS    = nexus_pkg::NX_NPORTS,
  parameter int unsigned DATA_W    = nexus_pkg::NX_DATA_W,
  parameter int unsigned CTRL_W    = nexus_pkg::NX_CTRL_W,
  parameter int unsigned NREP      = 2,
  parameter int unsigned SLOTS     = 2,
  parameter int unsigned BIST_PORT = NPORTS - 1
) (
  input  logic                          clk_x,
  input  logic                          rst_n,
  input  logic [NPORTS-1:0]             clk_m,
  input  logic [NPORTS-1:0]             res_full_cycle,
  input  logic [NPORTS-1:0]             lb_en,
  // module egress
  input  logic [NPORTS-1:0]             tx_req,
  output logic [NPORTS-1:0]             tx_grant,
  input  logic [NPORTS-1:0][DATA_W-1:0] tx_data,
  input  logic [NPORTS-1:0]             tx_tail,
  input  logic [NPORTS-1:0][CTRL_W-1:0] tx_ctl,
  // module ingress
  output logic [NPORTS-1:0]             rx_req,
  input  logic [NPORTS-1:0]             rx_grant,
  output logic [NPORTS-1:0][DATA_W-1:0] rx_data,
  output logic [NPORTS-1:0]             rx_tail,
  output logic [NPORTS-1:0][CTRL_W-1:0] rx_ctl,
  // built-in self test on port BIST_PORT (fabric clock domain)
  input  logic                          bist_en,
  input  logic                          bist_start,
  input  logic [CTRL_W-1:0]             bist_port_a,
  input  logic [CTRL_W-1:0]             bist_port_b,
  input  logic [7:0]                    bist_iters,
  input  logic [3:0]                    bist_len,
  input  logic [DATA_W-1:0]             bist_seed,
  output logic                          bist_busy,
  output logic                          bist_done,
  output logic                          bist_error,
  output logic [7:0]                    bist_trips
);

  localparam int unsigned PW = $clog2(NPORTS);
  localparam int unsigned WW = DATA_W + 1;   // word channel: {tail, data}

  // crossbar side of every port
  logic [NPORTS-1:0]             xi_valid, xi_ready, xi_tail, ti_valid, ti_ready;
  logic [NPORTS-1:0][DATA_W-1:0] xi_data, xo_data;
  logic [NPORTS-1:0][PW-1:0]     ti_port, fo_port;
  logic [NPORTS-1:0]             xo_valid, xo_ready, xo_tail, fo_valid, fo_ready;

  // converter end of every link (fabric side of the converters or the BIST)
  logic [NPORTS-1:0]             ce_valid, ce_ready, ce_tail, ct_valid, ct_ready;
  logic [NPORTS-1:0][DATA_W-1:0] ce_data, ci_data;
  logic [NPORTS-1:0][CTRL_W-1:0] ct_port, cf_port;
  logic [NPORTS-1:0]             ci_valid, ci_ready, ci_tail, cf_valid, cf_ready;

  // BIST port
  logic              b_valid, b_tail, bt_valid, bi_ready, bf_ready;
  logic [DATA_W-1:0] b_data;
  logic [CTRL_W-1:0] bt_port;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    // synchronous side
    logic              s_req, s_grant, s_tail, a_req, a_grant, a_tail;
    logic [DATA_W-1:0] s_data, a_data;
    logic [CTRL_W-1:0] s_ctl, a_ctl;
    // fabric side of the converters
    logic              e_valid, e_ready, e_tail, t_valid, t_ready;
    logic [DATA_W-1:0] e_data;
    logic [CTRL_W-1:0] t_port;
    logic              i_ready, f_ready;
    logic              use_bist;

    assign use_bist = bist_en && (p == BIST_PORT);

    nx_loopback #(.DATA_W(DATA_W), .CTRL_W(CTRL_W)) u_lb (
      .clk(clk_m[p]), .rst_n, .lb_en(lb_en[p]),
      .tx_req(tx_req[p]), .tx_grant(tx_grant[p]), .tx_data(tx_data[p]),
      .tx_tail(tx_tail[p]), .tx_ctl(tx_ctl[p]),
      .rx_req(rx_req[p]), .rx_grant(rx_grant[p]), .rx_data(rx_data[p]),
      .rx_tail(rx_tail[p]), .rx_ctl(rx_ctl[p]),
      .s_req, .s_grant, .s_data, .s_tail, .s_ctl,
      .a_req, .a_grant, .a_data, .a_tail, .a_ctl
    );

    nx_s2a #(.DATA_W(DATA_W), .CTRL_W(CTRL_W), .SLOTS(SLOTS)) u_s2a (
      .clk_m(clk_m[p]), .rst_n, .res_full_cycle(res_full_cycle[p]),
      .m_req(s_req), .m_grant(s_grant), .m_data(s_data), .m_tail(s_tail), .m_ctl(s_ctl),
      .clk_x, .x_valid(e_valid), .x_ready(e_ready), .x_data(e_data), .x_tail(e_tail),
      .to_valid(t_valid), .to_ready(t_ready), .to_port(t_port)
    );

    nx_a2s #(.DATA_W(DATA_W), .CTRL_W(CTRL_W), .SLOTS(SLOTS)) u_a2s (
      .clk_x, .rst_n,
      .x_valid(ci_valid[p] & ~use_bist), .x_ready(i_ready), .x_data(ci_data[p]), .x_tail(ci_tail[p]),
      .from_valid(cf_valid[p] & ~use_bist), .from_ready(f_ready), .from_port(cf_port[p]),
      .clk_m(clk_m[p]), .res_full_cycle(res_full_cycle[p]),
      .m_req(a_req), .m_grant(a_grant), .m_data(a_data), .m_tail(a_tail), .m_ctl(a_ctl)
    );

    // converter end of the links: converters, or the BIST on its port
    always_comb begin
      if (use_bist) begin
        ce_valid[p] = b_valid;   ce_data[p] = b_data;   ce_tail[p] = b_tail;
        ct_valid[p] = bt_valid;  ct_port[p] = bt_port;
        ci_ready[p] = bi_ready;  cf_ready[p] = bf_ready;
        e_ready     = 1'b0;      t_ready    = 1'b0;
      end else begin
        ce_valid[p] = e_valid;   ce_data[p] = e_data;   ce_tail[p] = e_tail;
        ct_valid[p] = t_valid;   ct_port[p] = t_port;
        ci_ready[p] = i_ready;   cf_ready[p] = f_ready;
        e_ready     = ce_ready[p];
        t_ready     = ct_ready[p];
      end
    end

    // links between the port and the crossbar
    nx_link #(.W(WW), .NREP(NREP)) u_eg_word (
      .clk(clk_x), .rst_n,
      .in_valid(ce_valid[p]), .in_ready(ce_ready[p]), .in_data({ce_tail[p], ce_data[p]}),
      .out_valid(xi_valid[p]), .out_ready(xi_ready[p]), .out_data({xi_tail[p], xi_data[p]})
    );
    logic [CTRL_W-1:0] ti_full, fo_full;
    nx_link #(.W(CTRL_W), .NREP(NREP)) u_eg_to (
      .clk(clk_x), .rst_n,
      .in_valid(ct_valid[p]), .in_ready(ct_ready[p]), .in_data(ct_port[p]),
      .out_valid(ti_valid[p]), .out_ready(ti_ready[p]), .out_data(ti_full)
    );
    assign ti_port[p] = PW'(ti_full);
    nx_link #(.W(WW), .NREP(NREP)) u_in_word (
      .clk(clk_x), .rst_n,
      .in_valid(xo_valid[p]), .in_ready(xo_ready[p]), .in_data({xo_tail[p], xo_data[p]}),
      .out_valid(ci_valid[p]), .out_ready(ci_ready[p]), .out_data({ci_tail[p], ci_data[p]})
    );
    assign fo_full = CTRL_W'(fo_port[p]);
    nx_link #(.W(CTRL_W), .NREP(NREP)) u_in_from (
      .clk(clk_x), .rst_n,
      .in_valid(fo_valid[p]), .in_ready(fo_ready[p]), .in_data(fo_full),
      .out_valid(cf_valid[p]), .out_ready(cf_ready[p]), .out_data(cf_port[p])
    );
  end

  nx_bist #(.DATA_W(DATA_W), .CTRL_W(CTRL_W)) u_bist (
    .clk(clk_x), .rst_n,
    .start(bist_start & bist_en), .port_a(bist_port_a), .port_b(bist_port_b),
    .iters(bist_iters), .len(bist_len), .seed(bist_seed),
    .busy(bist_busy), .done(bist_done), .error(bist_error), .trips(bist_trips),
    .x_out_valid(b_valid), .x_out_ready(ce_ready[BIST_PORT] & bist_en),
    .x_out_data(b_data), .x_out_tail(b_tail),
    .to_valid(bt_valid), .to_ready(ct_ready[BIST_PORT] & bist_en), .to_port(bt_port),
    .x_in_valid(ci_valid[BIST_PORT] & bist_en), .x_in_ready(bi_ready),
    .x_in_data(ci_data[BIST_PORT]), .x_in_tail(ci_tail[BIST_PORT]),
    .from_valid(cf_valid[BIST_PORT] & bist_en), .from_ready(bf_ready),
    .from_port(cf_port[BIST_PORT])
  );

  nx_crossbar #(.NPORTS(NPORTS), .DATA_W(DATA_W)) u_xbar (
    .clk(clk_x), .rst_n,
    .in_valid(xi_valid), .in_ready(xi_ready), .in_data(xi_data), .in_tail(xi_tail),
    .to_valid(ti_valid), .to_ready(ti_ready), .to_port(ti_port),
    .out_valid(xo_valid), .out_ready(xo_ready), .out_data(xo_data), .out_tail(xo_tail),
    .from_valid(fo_valid), .from_ready(fo_ready), .from_port(fo_port)
  );

endmodule
