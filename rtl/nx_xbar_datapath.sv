// nx_xbar_datapath: the full crossbar datapath, DATA_W data bits plus tail.
//
// The data is split into DATA_W/4 slices of 4 bits, each switched by its own
// nx_xbar_grid, and the tail bit is switched by a 1-bit grid. All slices see
// the same split and merge codes (in the real layout these are distributed
// to each slice with some pipelining; here they are wired directly, so every
// slice switches the same word in the same clock). A word at an input fires
// when its row is connected and the column is ready; the word leaves the
// output in the same clock.
//
// The tail grid also provides the copies of the tail bit used by the repeat
// units: in_last[i] pulses when input i passes a word with tail=1, and
// out_last[j] when output j does. These end each burst's link.
// Purely combinational.
module nx_xbar_datapath #(
  parameter int unsigned NPORTS = nexus_pkg::NX_NPORTS,
  parameter int unsigned DATA_W = nexus_pkg::NX_DATA_W
) (
  input  logic [NPORTS-1:0][3:0]        sa,
  input  logic [NPORTS-1:0][3:0]        sb,
  input  logic [NPORTS-1:0][3:0]        ma,
  input  logic [NPORTS-1:0][3:0]        mb,
  input  logic [NPORTS-1:0]             in_valid,
  output logic [NPORTS-1:0]             in_ready,
  input  logic [NPORTS-1:0][DATA_W-1:0] in_data,
  input  logic [NPORTS-1:0]             in_tail,
  output logic [NPORTS-1:0]             out_valid,
  input  logic [NPORTS-1:0]             out_ready,
  output logic [NPORTS-1:0][DATA_W-1:0] out_data,
  output logic [NPORTS-1:0]             out_tail,
  output logic [NPORTS-1:0]             in_last,   // tail copy, input side
  output logic [NPORTS-1:0]             out_last   // tail copy, output side
);

  localparam int unsigned NCHUNK = DATA_W / nexus_pkg::NX_CHUNK_W;

  logic [NCHUNK:0][NPORTS-1:0] c_ack, c_valid;

  for (genvar c = 0; c < NCHUNK; c++) begin : g_chunk
    logic [NPORTS-1:0][3:0] l, r;
    for (genvar p = 0; p < NPORTS; p++) begin : g_p
      assign l[p] = in_data[p][4*c +: 4];
      assign out_data[p][4*c +: 4] = r[p];
    end
    nx_xbar_grid #(.NPORTS(NPORTS), .W(4)) u_grid (
      .sa, .sb, .ma, .mb,
      .l_data(l), .l_valid(in_valid), .l_ack(c_ack[c]),
      .r_data(r), .r_valid(c_valid[c]), .r_ready(out_ready)
    );
  end

  nx_xbar_grid #(.NPORTS(NPORTS), .W(1)) u_tail (
    .sa, .sb, .ma, .mb,
    .l_data(in_tail), .l_valid(in_valid), .l_ack(c_ack[NCHUNK]),
    .r_data(out_tail), .r_valid(c_valid[NCHUNK]), .r_ready(out_ready)
  );

  // A word completes only when every slice has completed.
  always_comb begin
    in_ready  = '1;
    out_valid = '1;
    for (int c = 0; c <= NCHUNK; c++) begin
      in_ready  &= c_ack[c];
      out_valid &= c_valid[c];
    end
  end

  assign in_last  = in_valid & in_ready & in_tail;
  assign out_last = out_valid & out_ready & out_tail;

endmodule
