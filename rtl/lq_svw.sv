// lq_svw: the SVW field added to every load queue entry.
//
// At dispatch a load's SVW is set to SSN_RETIRE: the load is vulnerable to
// every store still in flight and to coherence invalidations from then on.
// An eliminated (redundant) load is vulnerable from its original load
// onwards, so it takes MIN(IT-entry SSN, SSN_RETIRE), the SSN the
// integration table passed along. When a load forwards its value from an
// in-flight store, it can no longer be hurt by that store or anything
// older, and its SVW is raised to the forwarding store's SSN ("update on
// forward"). A filt_ok bit per entry lets dispatch turn the filter off for
// a load (squash reuse, for which the filter is not safe).
//
// Interface: DISP dispatch write ports, FWD forwarding-update write ports
// and RD combinational read ports (one per SVW-stage lane). A forwarding
// update wins over a dispatch to the same entry in the same cycle; port i+1
// wins over port i. Writes take effect at the clock edge. Reset clears all.
//
// The three SVW definitions and the update on forward are the SVW proposal's;
// port counts, write priority and reset are this design's choices.
module lq_svw
  import svw_pkg::*;
#(
  parameter int ENTRIES = LQ_SIZE,
  parameter int DISP    = 2,
  parameter int FWD     = 2,
  parameter int RD      = 2,
  localparam int IW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ssn_t          ssn_retire,
  // dispatch
  input  logic          disp_en     [DISP],
  input  logic [IW-1:0] disp_idx    [DISP],
  input  logic          disp_elim   [DISP],   // eliminated redundant load
  input  ssn_t          disp_it_ssn [DISP],   // SSN from the IT entry
  input  logic          disp_filt_ok[DISP],   // 0: never filter this load
  // update on forward
  input  logic          fwd_en      [FWD],
  input  logic [IW-1:0] fwd_idx     [FWD],
  input  ssn_t          fwd_ssn     [FWD],    // SSN of the forwarding store
  // SVW-stage read
  input  logic [IW-1:0] rd_idx      [RD],
  output ssn_t          rd_svw      [RD],
  output logic          rd_filt_ok  [RD]
);
  ssn_t svw_q    [ENTRIES];
  logic filt_q   [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        svw_q[e]  <= '0;
        filt_q[e] <= 1'b0;
      end
    end else begin
      for (int d = 0; d < DISP; d++)
        if (disp_en[d]) begin
          if (disp_elim[d] && disp_it_ssn[d] < ssn_retire)
            svw_q[disp_idx[d]] <= disp_it_ssn[d];
          else
            svw_q[disp_idx[d]] <= ssn_retire;
          filt_q[disp_idx[d]] <= disp_filt_ok[d];
        end
      for (int f = 0; f < FWD; f++)
        if (fwd_en[f]) svw_q[fwd_idx[f]] <= fwd_ssn[f];
    end
  end

  always_comb
    for (int r = 0; r < RD; r++) begin
      rd_svw[r]     = svw_q[rd_idx[r]];
      rd_filt_ok[r] = filt_q[rd_idx[r]];
    end

endmodule
