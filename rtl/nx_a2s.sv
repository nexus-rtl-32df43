// nx_a2s: asynchronous-to-synchronous converter (module ingress).
//
// Fabric side (clk_x): a word channel (data + tail) and a FROM channel, one
// FROM token per burst, taken together with the burst's first word.
// Module side (clk_m): a request/grant FIFO interface. m_req is high while a
// word is ready; on a rising edge with m_req and m_grant both high the word
// {m_ctl, m_tail, m_data} is consumed. m_ctl holds FROM on the first word of
// a burst and zero on the others.
//
// A word is accepted only when the whole word (and, for a first word, the
// FROM) is present and a slot is free, and is written to a slot register in
// one step; the slot's toggle then tells the module side, through
// nx_sync_control, that the slot is full. Since a slot is only announced
// once it is completely written, skew between bits cannot corrupt a word.
// The module side hands the slot back by flipping its own toggle. From a
// slot toggle flipping to m_req rising takes 1/2 to 3/2 module clocks
// (1 to 2 with res_full_cycle=1).
//
// Own choices: SLOTS=2; the fabric side runs on clk_x and passes the module
// toggles through a two flip-flop synchronizer.
module nx_a2s #(
  parameter int unsigned DATA_W = nexus_pkg::NX_DATA_W,
  parameter int unsigned CTRL_W = nexus_pkg::NX_CTRL_W,
  parameter int unsigned SLOTS  = 2,
  localparam int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic              clk_x,
  input  logic              rst_n,
  input  logic              x_valid,
  output logic              x_ready,
  input  logic [DATA_W-1:0] x_data,
  input  logic              x_tail,
  input  logic              from_valid,
  output logic              from_ready,
  input  logic [CTRL_W-1:0] from_port,
  input  logic              clk_m,
  input  logic              res_full_cycle,
  output logic              m_req,
  input  logic              m_grant,
  output logic [DATA_W-1:0] m_data,
  output logic              m_tail,
  output logic [CTRL_W-1:0] m_ctl
);

  typedef struct packed {
    logic [CTRL_W-1:0] ctl;
    logic              tail;
    logic [DATA_W-1:0] data;
  } slot_t;

  slot_t            slot [SLOTS];
  logic [SLOTS-1:0] m_tgl, x_tgl;

  // ---------------- fabric clock domain ----------------
  logic [SLOTS-1:0] m_tgl_q1, m_tgl_q2;
  logic [SW-1:0]    wp;
  logic             free, first, take;

  always_ff @(posedge clk_x or negedge rst_n)
    if (!rst_n) {m_tgl_q2, m_tgl_q1} <= '0;
    else        {m_tgl_q2, m_tgl_q1} <= {m_tgl_q1, m_tgl};

  assign free       = ~(m_tgl_q2[wp] ^ x_tgl[wp]);
  assign x_ready    = free & (~first | from_valid);
  assign from_ready = free & first & x_valid;
  assign take       = x_valid & x_ready;

  always_ff @(posedge clk_x or negedge rst_n) begin
    if (!rst_n) begin
      x_tgl <= '0;
      wp    <= '0;
      first <= 1'b1;
      for (int s = 0; s < SLOTS; s++) slot[s] <= '0;
    end else if (take) begin
      slot[wp]  <= '{ctl: first ? from_port : '0, tail: x_tail, data: x_data};
      x_tgl[wp] <= ~x_tgl[wp];
      wp        <= (int'(wp) == SLOTS - 1) ? '0 : wp + 1'b1;
      first     <= x_tail;
    end
  end

  // ---------------- module clock domain ----------------
  logic          go;
  logic [SW-1:0] rp;

  nx_sync_control #(.SLOTS(SLOTS), .TOKENS_INIT(1'b0)) u_ctrl (
    .clk(clk_m), .rst_n, .res_full_cycle,
    .far_tgl(x_tgl), .near_tgl(m_tgl),
    .sync_ready(m_grant), .async_ready(m_req), .go, .ptr(rp)
  );

  assign m_data = slot[rp].data;
  assign m_tail = slot[rp].tail;
  assign m_ctl  = slot[rp].ctl;

  // A word is consumed only while it is offered.
  a_go_only_on_req: assert property (@(posedge clk_m) disable iff (!rst_n) go |-> m_req);

endmodule
