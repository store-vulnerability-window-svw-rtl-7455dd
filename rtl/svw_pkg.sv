// svw_pkg: types and constants shared by the Store Vulnerability Window
// (SVW) re-execution filter.
//
// A store sequence number (SSN) is a monotonically increasing, wrapping
// count of dynamic stores. Every load carries an SVW, the SSN of the
// youngest older store it is NOT vulnerable to. The store sequence Bloom
// filter (SSBF) remembers, per hashed address, the SSN of the last store
// that wrote there; a flagged load needs to re-execute only when
// SSBF[load.addr] > load.SVW.
//
// Default sizes follow the baseline configuration: 16-bit SSNs, a
// 512-entry SSBF, a 128-entry LQ and a 64-entry SQ (which bounds the SVW
// for wrap-around handling). Address and data widths are 64 bits (a 64-bit
// ISA is simulated); the SSBF word granularity (8 bytes) and the
// coherence-line granularity (64 bytes) are this design's own choices.
package svw_pkg;

  parameter int SSN_W        = 16;   // SSN width
  parameter int ADDR_W       = 64;   // virtual/physical address width
  parameter int DATA_W       = 64;   // load value width
  parameter int SSBF_ENTRIES = 512;  // SSBF entries (1 KB with 16-bit SSNs)
  parameter int WORD_GRAN    = 3;    // log2 bytes per SSBF entry
  parameter int LINE_GRAN    = 6;    // log2 bytes per SSBF_SM entry
  parameter int LQ_SIZE      = 128;
  parameter int SQ_SIZE      = 64;   // also SVW_MAX for wrap-around handling

  parameter int PREG_W       = 9;    // 448 physical registers
  parameter int IT_ENTRIES   = 512;  // integration table entries
  parameter int IT_WAYS      = 2;

  typedef logic [SSN_W-1:0]  ssn_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Kind of an instruction as seen by the re-execution engine.
  typedef enum logic [1:0] {
    REX_OTHER = 2'd0,   // completes at once
    REX_LOAD  = 2'd1,   // load; re-executes if flagged and not filtered
    REX_STORE = 2'd2    // store; only writes its SSN into the SSBF
  } rex_kind_e;

  // One instruction at the re-execution head.
  typedef struct packed {
    rex_kind_e kind;
    logic      flagged;   // load was flagged by the optimization(s)
    logic      filt_ok;   // SVW filter may be applied (0: always re-execute)
    logic [7:0] tag;      // identifier returned with the completion
    addr_t     addr;      // load or store address
    data_t     value;     // originally loaded value (loads)
    ssn_t      svw;       // load.SVW (loads)
    ssn_t      ssn;       // store.SSN (stores)
  } rex_entry_t;

  // Operation signature of a load in the integration table: opcode,
  // immediate and physical register input.
  typedef struct packed {
    logic [7:0]        opcode;
    logic [15:0]       imm;
    logic [PREG_W-1:0] preg_in;
  } it_sig_t;

  // Implicit SQ SSNs: the store at position pos (0 = SQ head) of the
  // in-flight stores has SSN = SSN_RETIRE + 1 + pos.
  function automatic ssn_t implicit_ssn(ssn_t ssn_retire, int unsigned pos);
    return ssn_t'(ssn_retire + ssn_t'(1) + ssn_t'(pos));
  endfunction

  // The SVW filter is disabled for loads whose SVW lies within svw_max
  // stores of the wrap-around point: load.SVW > SSN_MAX - SVW_MAX.
  function automatic logic in_wrap_region(ssn_t svw, int unsigned svw_max);
    return svw > ssn_t'((2**SSN_W - 1) - svw_max);
  endfunction

endpackage
