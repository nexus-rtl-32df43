// nx_link: a chain of NREP pipelined repeaters carrying one channel across
// the chip. With NREP=0 it is a plain wire. Each stage adds one clock of
// latency; the chain passes one token every two clocks (see
// nx_pipelined_repeater).
module nx_link #(
  parameter int unsigned W    = nexus_pkg::NX_DATA_W + 1,
  parameter int unsigned NREP = 2
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

  logic [NREP:0]        v, r;
  logic [NREP:0][W-1:0] d;

  assign v[0]      = in_valid;
  assign d[0]      = in_data;
  assign in_ready  = r[0];
  assign out_valid = v[NREP];
  assign out_data  = d[NREP];
  assign r[NREP]   = out_ready;

  for (genvar k = 0; k < NREP; k++) begin : g_rep
    nx_pipelined_repeater #(.W(W)) u_rep (
      .clk, .rst_n,
      .in_valid(v[k]), .in_ready(r[k]), .in_data(d[k]),
      .out_valid(v[k+1]), .out_ready(r[k+1]), .out_data(d[k+1])
    );
  end

endmodule
