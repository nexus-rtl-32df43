// nx_sync_control: synchronization control shared by the S2A and A2S clock
// domain converters, in the module clock domain.
//
// The converter's storage is SLOTS registers used in ring order. Each slot
// has a toggle owned by this side (near_tgl, flipped when the module side
// completes a transfer on that slot) and a toggle owned by the other side
// (far_tgl, flipped when the fabric side completes its half). The far toggle
// of the current slot is the only signal that crosses into this clock
// domain, so every transfer has exactly one potentially metastable
// synchronization, whatever the data width.
//
// On each rising edge the control decides whether a transfer advances:
//   async_ready = slot ptr holds a token for this side
//   go          = async_ready & sync_ready
// In the S2A, sync_ready is the module's Request and async_ready is the
// Grant (a token = free space; all slots start with one, TOKENS_INIT=1).
// In the A2S, async_ready is the Request to the module and sync_ready its
// Grant (a token = a full slot; none at start, TOKENS_INIT=0).
//
// Metastability resolution time is selectable (res_full_cycle): 0 samples
// the far toggle on the falling edge, leaving half a clock to resolve before
// the rising edge that uses it; 1 samples it on the rising edge, leaving a
// whole clock. A far toggle therefore becomes visible 1/2 to 3/2 clocks
// after it changes (1 to 2 clocks with res_full_cycle=1). The sampling
// flip-flops stand in for the cross-coupled NAND arbiter and metastability
// filter of the original circuit. res_full_cycle should only change while
// the converter is idle.
module nx_sync_control #(
  parameter int unsigned SLOTS       = 2,
  parameter bit          TOKENS_INIT = 1'b1,
  localparam int unsigned SW         = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             res_full_cycle,
  input  logic [SLOTS-1:0] far_tgl,
  output logic [SLOTS-1:0] near_tgl,
  input  logic             sync_ready,
  output logic             async_ready,
  output logic             go,
  output logic [SW-1:0]    ptr
);

  logic [SLOTS-1:0] s_neg, s_pos, far_s;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) s_neg <= '0;
    else        s_neg <= far_tgl;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s_pos <= '0;
    else        s_pos <= far_tgl;

  assign far_s       = res_full_cycle ? s_pos : s_neg;
  assign async_ready = (far_s[ptr] ^ near_tgl[ptr]) ^ TOKENS_INIT;
  assign go          = async_ready & sync_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      near_tgl <= '0;
      ptr      <= '0;
    end else if (go) begin
      near_tgl[ptr] <= ~near_tgl[ptr];
      ptr           <= (int'(ptr) == SLOTS - 1) ? '0 : ptr + 1'b1;
    end
  end

endmodule
