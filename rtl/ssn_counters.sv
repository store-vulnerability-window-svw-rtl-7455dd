// ssn_counters: the two global store sequence number counters.
//
// SSN_RENAME is the SSN of the youngest renamed store; the stores renamed
// in a cycle take SSN_RENAME+1, SSN_RENAME+2, ... in program order.
// SSN_RETIRE is the SSN of the last store written to the data cache. The
// in-flight stores therefore hold SSN_RETIRE+1 .. SSN_RENAME, so no SSN
// needs to be stored in the SQ (the "implicit SQ SSN" rule).
//
// rename_wrap pulses in the cycle SSN_RENAME passes through zero; it is used
// to flash-clear the integration table so that no eliminated load's
// vulnerability window spans the wrap-around point. A pipeline flush
// restores SSN_RENAME to flush_ssn, the SSN of the youngest surviving store
// (given by the store queue); a flush that moves it backwards across zero
// is conservatively reported as a wrap too. Both counters reset to 0, and
// reset SSBF entries also hold 0, so nothing is vulnerable after reset.
//
// Timing: counters update at the clock edge; outputs are registers.
// Counting stores at rename and retirement and the wrap-triggered clear
// follow the SVW proposal; the flush interface, the up-to-REN stores per cycle
// and one store retirement per cycle (a single retirement port) are this
// design's choices.
module ssn_counters
  import svw_pkg::*;
#(
  parameter int REN = 2   // stores renamed per cycle, at most
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(REN+1)-1:0] ren_cnt,   // stores renamed this cycle
  input  logic                   ret_store,   // a store retires this cycle
  input  logic                   flush,       // squash younger stores
  input  ssn_t                   flush_ssn,   // SSN of youngest survivor
  output ssn_t                   ssn_rename,
  output ssn_t                   ssn_retire,
  output logic                   rename_wrap
);
  ssn_t rename_d;

  always_comb begin
    if (flush) rename_d = flush_ssn;
    else       rename_d = ssn_t'(ssn_rename + ssn_t'(ren_cnt));
    if (flush) rename_wrap = flush_ssn > ssn_rename;
    else       rename_wrap = rename_d < ssn_rename;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ssn_rename <= '0;
      ssn_retire <= '0;
    end else begin
      ssn_rename <= rename_d;
      if (ret_store) ssn_retire <= ssn_t'(ssn_retire + 1'b1);
    end
  end

  // A store can only retire after it was renamed.
  a_retire_after_rename: assert property (@(posedge clk) disable iff (!rst_n)
    ret_store |-> ssn_retire != ssn_rename);

endmodule
