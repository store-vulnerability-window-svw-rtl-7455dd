// inv_shadow: flags the loads that were in flight during a coherence
// invalidation (the natural filter of the inter-thread ordering check).
//
// When an invalidation arrives, the load queue tail pointer is remembered.
// Until the load queue head reaches that pointer, every load between the
// head and the remembered tail was in the window when another core wrote
// memory and must be flagged for re-execution; the SVW filter (SSBF_SM)
// then decides which of them really re-execute. A later invalidation moves
// the remembered tail forward, extending the shadow.
//
// Interface: lq_head and lq_tail are load queue pointers with one extra
// wrap bit (PW = log2(entries) + 1 bits), so that a full and an empty queue
// differ. For each of LANES load-queue indices (the loads at the
// re-execution head) in_shadow says whether the load lies in the shadow.
// The remembered tail updates at the clock edge; in_shadow is
// combinational. Reset clears the shadow.
//
// Remembering the tail pointer and re-executing until it becomes the head
// follows the SVW proposal; the pointer encoding is this design's choice.
module inv_shadow
  import svw_pkg::*;
#(
  parameter int ENTRIES = LQ_SIZE,
  parameter int LANES   = 2,
  localparam int IW     = $clog2(ENTRIES),
  localparam int PW     = IW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inv_en,
  input  logic [PW-1:0] lq_head,     // oldest load in the queue
  input  logic [PW-1:0] lq_tail,     // next entry to allocate
  input  logic [IW-1:0] idx      [LANES],
  output logic          in_shadow [LANES],
  output logic          active
);
  logic [PW-1:0] stail_q;
  logic          active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stail_q  <= '0;
      active_q <= 1'b0;
    end else if (inv_en) begin
      stail_q  <= lq_tail;
      active_q <= lq_tail != lq_head;
    end else if (active_q && lq_head == stail_q) begin
      active_q <= 1'b0;
    end
  end

  assign active = active_q;

  // a load at index i is in the shadow when its distance from the head is
  // smaller than the distance of the remembered tail from the head
  always_comb
    for (int l = 0; l < LANES; l++) begin
      logic [IW-1:0] d_load, d_tail;
      logic [PW-1:0] span;
      d_load = IW'(idx[l] - lq_head[IW-1:0]);
      span   = PW'(stail_q - lq_head);
      d_tail = span[IW-1:0];
      in_shadow[l] = active_q && (span[IW] || d_load < d_tail);
    end

endmodule
