// nx_xbar_grid: one slice of the crossbar datapath, an NPORTS x NPORTS
// demux-mux grid W bits wide (4 bits for a data slice, 1 bit for the tail).
//
// Each input row broadcasts its split control (two 1-of-4 codes, sa = low
// digit, sb = high digit of the destination output) and its data L. Each
// output column broadcasts its merge control (ma = low digit, mb = high digit
// of the source input). A grid point (i,j) "hits" when the split code of row
// i selects column j and the merge code of column j selects row i; only then
// does row i's data reach column j's output bus R, and only then is column
// j's acknowledge routed back to row i. A neutral (all-zero) code selects
// nothing, so a row or column without a control token is idle.
//
// The hit term and the names sa/sb/ma/mb/L/R/hit follow the grid point
// circuit of the design. The real circuit drives an inverted, precharged
// output bus; here R is in true polarity and the bus is an AND-OR tree.
// Handshake: per row, l_valid with l_ack returned; per column, r_valid out
// with r_ready in. Purely combinational.
module nx_xbar_grid #(
  parameter int unsigned NPORTS = nexus_pkg::NX_NPORTS,
  parameter int unsigned W      = 4
) (
  input  logic [NPORTS-1:0][3:0]   sa,       // split, low digit, per input row
  input  logic [NPORTS-1:0][3:0]   sb,       // split, high digit, per input row
  input  logic [NPORTS-1:0][3:0]   ma,       // merge, low digit, per output column
  input  logic [NPORTS-1:0][3:0]   mb,       // merge, high digit, per output column
  input  logic [NPORTS-1:0][W-1:0] l_data,
  input  logic [NPORTS-1:0]        l_valid,
  output logic [NPORTS-1:0]        l_ack,    // ready back to each row
  output logic [NPORTS-1:0][W-1:0] r_data,
  output logic [NPORTS-1:0]        r_valid,
  input  logic [NPORTS-1:0]        r_ready
);

  logic [NPORTS-1:0][NPORTS-1:0] hit;  // hit[i][j]: row i connected to column j

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int j = 0; j < NPORTS; j++)
        hit[i][j] = sa[i][j % 4] & sb[i][j / 4] & ma[j][i % 4] & mb[j][i / 4];
  end

  always_comb begin
    r_data  = '0;
    r_valid = '0;
    l_ack   = '0;
    for (int i = 0; i < NPORTS; i++)
      for (int j = 0; j < NPORTS; j++) begin
        r_data[j]  = r_data[j]  | ({W{hit[i][j]}} & l_data[i]);
        r_valid[j] = r_valid[j] | (hit[i][j] & l_valid[i]);
        l_ack[i]   = l_ack[i]   | (hit[i][j] & r_ready[j]);
      end
  end

endmodule
