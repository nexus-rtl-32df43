// nx_crossbar: the Nexus crossbar, NPORTS ports of DATA_W data bits + tail.
//
// Each input port has a word channel (data + tail) and a TO channel; each
// output port has a word channel and a FROM channel. The crossbar is built
// from small units joined by internal channels:
//   input control  -> split control S  -> split repeat  -> datapath rows
//   input control  -> request (NPORTS x NPORTS wires)  -> output control
//   output control -> merge control M  -> merge repeat  -> datapath columns
//   output control -> FROM
// A TO token opens a request; when the output control grants it, both
// repeat units hold their port numbers, the datapath grid point connects,
// and every word of the burst flows until the word with tail=1 passes, which
// releases both repeat units. Bursts are never split, interleaved, dropped
// or duplicated. All units run on the fabric clock clk.
// Latency, empty crossbar, TO and first word offered together: TO taken at
// edge 0, request seen and granted at edge 1, merge repeat loaded at edge 2,
// first word passes in the clock after edge 2.
module nx_crossbar #(
  parameter int unsigned NPORTS = nexus_pkg::NX_NPORTS,
  parameter int unsigned DATA_W = nexus_pkg::NX_DATA_W,
  localparam int unsigned PW    = $clog2(NPORTS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPORTS-1:0]             in_valid,
  output logic [NPORTS-1:0]             in_ready,
  input  logic [NPORTS-1:0][DATA_W-1:0] in_data,
  input  logic [NPORTS-1:0]             in_tail,
  input  logic [NPORTS-1:0]             to_valid,
  output logic [NPORTS-1:0]             to_ready,
  input  logic [NPORTS-1:0][PW-1:0]     to_port,
  output logic [NPORTS-1:0]             out_valid,
  input  logic [NPORTS-1:0]             out_ready,
  output logic [NPORTS-1:0][DATA_W-1:0] out_data,
  output logic [NPORTS-1:0]             out_tail,
  output logic [NPORTS-1:0]             from_valid,
  input  logic [NPORTS-1:0]             from_ready,
  output logic [NPORTS-1:0][PW-1:0]     from_port
);

  // request channels: req[i][j] from input i to output j, ack likewise
  logic [NPORTS-1:0][NPORTS-1:0] req, req_ack, req_t, req_ack_t;
  logic [NPORTS-1:0][3:0] sa, sb, ma, mb;
  logic [NPORTS-1:0]      s_valid, s_ready, m_valid, m_ready, in_last, out_last;
  logic [NPORTS-1:0][PW-1:0] s_port, m_port;

  always_comb
    for (int i = 0; i < NPORTS; i++)
      for (int j = 0; j < NPORTS; j++) begin
        req_t[j][i]   = req[i][j];
        req_ack[i][j] = req_ack_t[j][i];
      end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    nx_input_control #(.NPORTS(NPORTS)) u_ic (
      .clk, .rst_n,
      .to_valid(to_valid[p]), .to_ready(to_ready[p]), .to_port(to_port[p]),
      .s_valid(s_valid[p]), .s_ready(s_ready[p]), .s_port(s_port[p]),
      .req(req[p]), .req_ack(req_ack[p])
    );
    nx_repeat #(.NPORTS(NPORTS)) u_srep (
      .clk, .rst_n,
      .c_valid(s_valid[p]), .c_ready(s_ready[p]), .c_port(s_port[p]),
      .last(in_last[p]), .code_lo(sa[p]), .code_hi(sb[p])
    );
    nx_output_control #(.NPORTS(NPORTS)) u_oc (
      .clk, .rst_n,
      .req(req_t[p]), .req_ack(req_ack_t[p]),
      .from_valid(from_valid[p]), .from_ready(from_ready[p]), .from_port(from_port[p]),
      .m_valid(m_valid[p]), .m_ready(m_ready[p]), .m_port(m_port[p])
    );
    nx_repeat #(.NPORTS(NPORTS)) u_mrep (
      .clk, .rst_n,
      .c_valid(m_valid[p]), .c_ready(m_ready[p]), .c_port(m_port[p]),
      .last(out_last[p]), .code_lo(ma[p]), .code_hi(mb[p])
    );
  end

  nx_xbar_datapath #(.NPORTS(NPORTS), .DATA_W(DATA_W)) u_dp (
    .sa, .sb, .ma, .mb,
    .in_valid, .in_ready, .in_data, .in_tail,
    .out_valid, .out_ready, .out_data, .out_tail,
    .in_last, .out_last
  );

endmodule
