// svw_top: Store Vulnerability Window re-execution filter attached to an
// in-order load re-execution engine.
//
// Load/store optimizations (a non-associative load queue, a split scalable
// store queue, redundant load elimination) replace associative searches
// with in-order re-execution of loads before retirement. This block cuts
// that re-execution stream down: each load carries an SVW, the SSN of the
// youngest older store it cannot be hurt by, and a store sequence Bloom
// filter records the SSN of the last store to each hashed address. A
// flagged load whose address shows no store newer than its SVW is marked
// complete without accessing the data cache.
//
// Parts and their connections:
//   ssn_counters       SSN_RENAME / SSN_RETIRE; rename_wrap clears the IT
//   integration_table  redundant-load detection; entries carry SSN_RENAME
//   lq_svw             per-LQ-entry SVW: SSN_RETIRE at dispatch,
//                      MIN(IT SSN, SSN_RETIRE) for eliminated loads, the
//                      forwarding store's SSN on forwarding
//   rex_pipeline       SVW stage (SSBF + SSBF_SM) then the shared data
//                      cache port with retirement priority and the value
//                      compare that requests a flush
//   spct               store PC of the last retired store per address,
//                      read with the address of a load that mismatched
//   inv_shadow         flags loads that were in the load queue when an
//                      invalidation arrived (until the head passes them)
//
// Store SSNs are not kept in the store queue: the caller gives the
// position of a store relative to the SQ head (rex_sq_pos, fwd_sq_pos) and
// the SSN is SSN_RETIRE + 1 + position. An invalidation from another core
// is treated as a store younger than every renamed store and writes
// SSN_RENAME + 1 into SSBF_SM. Store retirement (ret_store) uses the data
// cache port that reloads share and advances SSN_RETIRE.
//
// Timing: rename, dispatch, forwarding, retirement and invalidation inputs
// take effect at the clock edge. The SVW of a load is read in the cycle it
// is at the re-execution head. See rex_pipeline for completion timing.
// The organisation follows the SVW proposal; widths, port counts and the
// handshakes are this design's choices (see the module headers).
module svw_top
  import svw_pkg::*;
#(
  parameter int LANES   = 2,   // instructions per cycle in the SVW stage
  parameter int DISP    = 2,   // loads dispatched per cycle
  parameter int FWD     = 2,   // load issue (forwarding) ports
  parameter int REN     = 2,   // stores renamed per cycle
  parameter int DC_LAT  = 2,   // data cache access cycles
  localparam int LQW    = $clog2(LQ_SIZE),
  localparam int SQW    = $clog2(SQ_SIZE)
) (
  input  logic              clk,
  input  logic              rst_n,
  // rename: store numbering and the integration table
  input  logic [$clog2(REN+1)-1:0] ren_cnt,
  input  it_sig_t           it_lk_sig,
  output logic              it_lk_hit,
  output logic [PREG_W-1:0] it_lk_preg,
  output ssn_t              it_lk_ssn,
  input  logic              it_ins_en,
  input  it_sig_t           it_ins_sig,
  input  logic [PREG_W-1:0] it_ins_preg,
  input  logic              preg_free_en,
  input  logic [PREG_W-1:0] preg_free,
  // load dispatch
  input  logic              disp_en     [DISP],
  input  logic [LQW-1:0]    disp_idx    [DISP],
  input  logic              disp_elim   [DISP],
  input  ssn_t              disp_it_ssn [DISP],
  input  logic              disp_filt_ok[DISP],
  // store-to-load forwarding at execute
  input  logic              fwd_en      [FWD],
  input  logic [LQW-1:0]    fwd_idx     [FWD],
  input  logic [SQW-1:0]    fwd_sq_pos  [FWD],
  // store retirement and pipeline flush
  input  logic              ret_store,
  input  addr_t             ret_addr,
  input  logic [63:0]       ret_pc,
  input  logic              flush,
  input  ssn_t              flush_ssn,
  // coherence invalidation and the load queue pointers (with wrap bit)
  input  logic              inv_en,
  input  addr_t             inv_addr,
  input  logic [LQW:0]      lq_head,
  input  logic [LQW:0]      lq_tail,
  // re-execution head
  input  logic              rex_valid   [LANES],
  input  rex_kind_e         rex_kind    [LANES],
  input  logic              rex_flagged [LANES],
  input  logic [7:0]        rex_tag     [LANES],
  input  addr_t             rex_addr    [LANES],
  input  data_t             rex_value   [LANES],
  input  logic [LQW-1:0]    rex_lq_idx  [LANES],
  input  logic [SQW-1:0]    rex_sq_pos  [LANES],
  output logic              rex_ready,
  // data cache read port (shared with retirement)
  output logic              dc_rd_req,
  output addr_t             dc_rd_addr,
  input  data_t             dc_rd_data,
  // completions
  output logic              cmp_valid   [LANES],
  output logic [7:0]        cmp_tag     [LANES],
  output logic              cmp_load    [LANES],
  output logic              rld_valid,
  output logic [7:0]        rld_tag,
  output logic              flush_req,
  output logic [63:0]       mark_store_pc,   // valid with flush_req
  // state and events
  output ssn_t              ssn_rename,
  output ssn_t              ssn_retire,
  output logic              it_cleared,
  output logic              ev_stall,
  output logic              ev_port_busy,
  output logic              ev_st_wait,
  output logic              ev_shadow,       // invalidation shadow active
  output logic              ev_filtered [LANES],
  output logic              ev_wrap_off [LANES]
);
  logic rename_wrap;

  ssn_counters #(.REN(REN)) u_ssn (
    .clk, .rst_n, .ren_cnt, .ret_store, .flush, .flush_ssn,
    .ssn_rename, .ssn_retire, .rename_wrap
  );
  assign it_cleared = rename_wrap;

  integration_table u_it (
    .clk, .rst_n, .clear(rename_wrap),
    .lk_sig(it_lk_sig), .lk_hit(it_lk_hit), .lk_preg(it_lk_preg), .lk_ssn(it_lk_ssn),
    .ins_en(it_ins_en), .ins_sig(it_ins_sig), .ins_preg(it_ins_preg),
    .ins_ssn(ssn_rename),
    .free_en(preg_free_en), .free_preg(preg_free)
  );

  ssn_t           fwd_ssn  [FWD];
  logic [LQW-1:0] rd_idx   [LANES];
  ssn_t           rd_svw   [LANES];
  logic           rd_filt  [LANES];

  always_comb
    for (int f = 0; f < FWD; f++) fwd_ssn[f] = implicit_ssn(ssn_retire, int'(fwd_sq_pos[f]));

  assign rd_idx = rex_lq_idx;

  lq_svw #(.DISP(DISP), .FWD(FWD), .RD(LANES)) u_lq_svw (
    .clk, .rst_n, .ssn_retire,
    .disp_en, .disp_idx, .disp_elim, .disp_it_ssn, .disp_filt_ok,
    .fwd_en, .fwd_idx, .fwd_ssn,
    .rd_idx, .rd_svw, .rd_filt_ok(rd_filt)
  );

  // loads in flight during an invalidation are flagged as well
  logic in_shadow [LANES];
  logic shadow_active;
  inv_shadow #(.LANES(LANES)) u_shadow (
    .clk, .rst_n, .inv_en, .lq_head, .lq_tail,
    .idx(rex_lq_idx), .in_shadow, .active(shadow_active)
  );
  assign ev_shadow = shadow_active;

  rex_entry_t entry [LANES];
  always_comb
    for (int l = 0; l < LANES; l++) begin
      entry[l].kind    = rex_kind[l];
      entry[l].flagged = rex_flagged[l] || (rex_kind[l] == REX_LOAD && in_shadow[l]);
      entry[l].filt_ok = rd_filt[l];
      entry[l].tag     = rex_tag[l];
      entry[l].addr    = rex_addr[l];
      entry[l].value   = rex_value[l];
      entry[l].svw     = rd_svw[l];
      entry[l].ssn     = implicit_ssn(ssn_retire, int'(rex_sq_pos[l]));
    end

  addr_t rld_addr;
  logic  rld_mismatch;

  rex_pipeline #(.LANES(LANES), .DC_LAT(DC_LAT)) u_rex (
    .clk, .rst_n,
    .in_valid(rex_valid), .in_entry(entry), .in_ready(rex_ready),
    .inv_en, .inv_addr, .inv_ssn(ssn_t'(ssn_rename + 1'b1)),
    .ssn_retire, .ret_wr(ret_store), .dc_rd_req, .dc_rd_addr, .dc_rd_data,
    .cmp_valid, .cmp_tag, .cmp_load,
    .rld_valid, .rld_tag, .rld_addr, .rld_mismatch,
    .ev_stall, .ev_port_busy, .ev_st_wait, .ev_filtered, .ev_wrap_off
  );

  assign flush_req = rld_mismatch;

  spct u_spct (
    .clk, .rst_n,
    .wr_en(ret_store), .wr_addr(ret_addr), .wr_pc(ret_pc),
    .rd_addr(rld_addr), .rd_pc(mark_store_pc)
  );

endmodule
