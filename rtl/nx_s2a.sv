// nx_s2a: synchronous-to-asynchronous converter (module egress).
//
// Module side (clk_m): a request/grant FIFO interface. On a rising edge with
// m_req and m_grant both high, the word {m_ctl, m_tail, m_data} is taken.
// m_ctl is the TO port and is only looked at on the first word of a burst.
// Fabric side (clk_x): a word channel (data + tail) and a TO channel, one TO
// token per burst, sent before the burst's first word.
//
// The word is latched into one of SLOTS flip-flop registers in the module
// clock domain; nx_sync_control grants only while a slot is free. The fabric
// side reads a slot once it sees the slot's toggle flip and hands the slot
// back by flipping its own toggle. The slot register is not rewritten until
// that hand-back has crossed back, so the fabric side always reads stable
// data. The slots are the "extra tokens" of buffer space the control starts
// with.
//
// Own choices: SLOTS=2; the fabric side, which in the original needs no
// clock, runs on clk_x here and passes the module toggles through a two
// flip-flop synchronizer.
module nx_s2a #(
  parameter int unsigned DATA_W = nexus_pkg::NX_DATA_W,
  parameter int unsigned CTRL_W = nexus_pkg::NX_CTRL_W,
  parameter int unsigned SLOTS  = 2,
  localparam int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic              clk_m,
  input  logic              rst_n,
  input  logic              res_full_cycle,
  input  logic              m_req,
  output logic              m_grant,
  input  logic [DATA_W-1:0] m_data,
  input  logic              m_tail,
  input  logic [CTRL_W-1:0] m_ctl,
  input  logic              clk_x,
  output logic              x_valid,
  input  logic              x_ready,
  output logic [DATA_W-1:0] x_data,
  output logic              x_tail,
  output logic              to_valid,
  input  logic              to_ready,
  output logic [CTRL_W-1:0] to_port
);

  typedef struct packed {
    logic [CTRL_W-1:0] ctl;
    logic              tail;
    logic [DATA_W-1:0] data;
  } slot_t;

  slot_t            slot [SLOTS];
  logic [SLOTS-1:0] m_tgl, x_tgl;
  logic             go;
  logic [SW-1:0]    wp;

  // ---------------- module clock domain ----------------
  nx_sync_control #(.SLOTS(SLOTS), .TOKENS_INIT(1'b1)) u_ctrl (
    .clk(clk_m), .rst_n, .res_full_cycle,
    .far_tgl(x_tgl), .near_tgl(m_tgl),
    .sync_ready(m_req), .async_ready(m_grant), .go, .ptr(wp)
  );

  always_ff @(posedge clk_m or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) slot[s] <= '0;
    end else if (go) begin
      slot[wp] <= '{ctl: m_ctl, tail: m_tail, data: m_data};
    end
  end

  // ---------------- fabric clock domain ----------------
  logic [SLOTS-1:0] m_tgl_q1, m_tgl_q2;
  logic [SW-1:0]    rp;
  logic             full, first, to_done;

  always_ff @(posedge clk_x or negedge rst_n)
    if (!rst_n) {m_tgl_q2, m_tgl_q1} <= '0;
    else        {m_tgl_q2, m_tgl_q1} <= {m_tgl_q1, m_tgl};

  assign full     = m_tgl_q2[rp] ^ x_tgl[rp];
  assign to_valid = full & first & ~to_done;
  assign to_port  = slot[rp].ctl;
  assign x_valid  = full & (~first | to_done);
  assign x_data   = slot[rp].data;
  assign x_tail   = slot[rp].tail;

  always_ff @(posedge clk_x or negedge rst_n) begin
    if (!rst_n) begin
      x_tgl   <= '0;
      rp      <= '0;
      first   <= 1'b1;
      to_done <= 1'b0;
    end else begin
      if (to_valid && to_ready) to_done <= 1'b1;
      if (x_valid && x_ready) begin
        x_tgl[rp] <= ~x_tgl[rp];
        rp        <= (int'(rp) == SLOTS - 1) ? '0 : rp + 1'b1;
        first     <= x_tail;
        to_done   <= 1'b0;
      end
    end
  end

endmodule
