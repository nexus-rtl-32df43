// nx_output_control: output control unit of one crossbar port.
//
// It waits for request tokens from the input control units, grants one of
// them, acknowledges that request, and sends the winner's port number both on
// FROM (to the destination module, beside the first word of the burst) and on
// the merge control channel M (toward this column's repeat unit).
//
// In the asynchronous original the first request to arrive wins and a
// metastability filter settles near-simultaneous arrivals. In this clocked
// model requests seen in the same clock are simultaneous; they are settled
// round-robin, starting after the last winner (an own choice). A grant is
// made only when both the FROM and M registers are free or being emptied in
// that clock.
// Timing: FROM and M are presented the clock after the grant.
module nx_output_control #(
  parameter int unsigned NPORTS = nexus_pkg::NX_NPORTS,
  localparam int unsigned PW    = $clog2(NPORTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] req,
  output logic [NPORTS-1:0] req_ack,
  output logic              from_valid,
  input  logic              from_ready,
  output logic [PW-1:0]     from_port,
  output logic              m_valid,
  input  logic              m_ready,
  output logic [PW-1:0]     m_port
);

  logic [PW-1:0] rr;      // first input considered in the next arbitration
  logic [PW-1:0] pick;
  logic          any, free;

  assign free = (~from_valid | from_ready) & (~m_valid | m_ready);

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int k = 0; k < NPORTS; k++) begin
      automatic logic [PW-1:0] idx = PW'((int'(rr) + k) % NPORTS);
      if (!any && req[idx]) begin
        any  = 1'b1;
        pick = idx;
      end
    end
  end

  always_comb begin
    req_ack = '0;
    if (free && any) req_ack[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr         <= '0;
      from_valid <= 1'b0;
      from_port  <= '0;
      m_valid    <= 1'b0;
      m_port     <= '0;
    end else begin
      if (from_valid && from_ready) from_valid <= 1'b0;
      if (m_valid && m_ready)       m_valid    <= 1'b0;
      if (free && any) begin
        from_valid <= 1'b1;
        from_port  <= pick;
        m_valid    <= 1'b1;
        m_port     <= pick;
        rr         <= PW'((int'(pick) + 1) % NPORTS);
      end
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_ack));

endmodule
