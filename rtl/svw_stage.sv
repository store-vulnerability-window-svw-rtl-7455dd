// svw_stage: the SVW stage of the load re-execution pipeline.
//
// Loads and stores pass through this stage in program order, LANES per
// cycle, lane 0 oldest. A store only writes its SSN into the SSBF entry of
// its address. A load that the load/store optimization flagged for
// re-execution reads the SSBF (word granularity) and SSBF_SM (cache-line
// granularity, written by coherence invalidations) and must re-execute when
//
//   MAX(SSBF[addr], SSBF_SM[addr]) > load.SVW          (possible conflict)
//   || load.SVW > SSN_MAX - SVW_MAX                    (near wrap-around)
//   || !filt_ok                                        (filter not allowed)
//
// Otherwise it is safe and is reported complete without touching the
// data cache. Loads not flagged never re-execute.
//
// Interface: the group (grp_valid, grp) is examined combinationally and
// need_rex is valid in the same cycle; SSBF writes happen at the clock edge
// when grp_fire is high. A load sees the SSNs of stores in older lanes of
// the same group through a bypass, so a group behaves as if processed one
// instruction at a time. An invalidation (inv_en) writes inv_ssn, which the
// caller sets to SSN_RENAME+1, into SSBF_SM; loads in the same cycle see it.
//
// The filter test, the wrap-around test and the composition of the two
// filters by MAX are the SVW proposal's. The lane count, the bypass and
// applying both the SSBF_SM lookup and the wrap test to every flagged load
// (conservative) are this design's choices.
module svw_stage
  import svw_pkg::*;
#(
  parameter int LANES      = 2,
  parameter int ENTRIES    = SSBF_ENTRIES,
  parameter int SM_ENTRIES = SSBF_ENTRIES,
  parameter int SVW_MAX    = SQ_SIZE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       grp_valid [LANES],
  input  rex_entry_t grp       [LANES],
  input  logic       grp_fire,            // group leaves the stage
  input  logic       inv_en,
  input  addr_t      inv_addr,
  input  ssn_t       inv_ssn,
  output logic       need_rex  [LANES],
  output logic       ssbf_hit  [LANES],   // filter reported a conflict
  output logic       wrap_off  [LANES]    // filter disabled by wrap test
);
  localparam int IW  = $clog2(ENTRIES);
  localparam int SIW = $clog2(SM_ENTRIES);

  logic  st_wr_en   [LANES];
  addr_t st_wr_addr [LANES];
  ssn_t  st_wr_ssn  [LANES];
  addr_t rd_addr    [LANES];
  ssn_t  word_ssn   [LANES];
  ssn_t  line_ssn   [LANES];
  logic  inv_wr_en  [1];
  addr_t inv_wr_addr[1];
  ssn_t  inv_wr_ssn [1];

  always_comb
    for (int l = 0; l < LANES; l++) begin
      st_wr_en[l]   = grp_fire && grp_valid[l] && grp[l].kind == REX_STORE;
      st_wr_addr[l] = grp[l].addr;
      st_wr_ssn[l]  = grp[l].ssn;
      rd_addr[l]    = grp[l].addr;
    end

  assign inv_wr_en[0]   = inv_en;
  assign inv_wr_addr[0] = inv_addr;
  assign inv_wr_ssn[0]  = inv_ssn;

  ssbf #(.ENTRIES(ENTRIES), .GRAN(WORD_GRAN), .RD(LANES), .WR(LANES)) u_ssbf (
    .clk, .rst_n,
    .wr_en(st_wr_en), .wr_addr(st_wr_addr), .wr_ssn(st_wr_ssn),
    .rd_addr(rd_addr), .rd_ssn(word_ssn)
  );

  ssbf #(.ENTRIES(SM_ENTRIES), .GRAN(LINE_GRAN), .RD(LANES), .WR(1)) u_ssbf_sm (
    .clk, .rst_n,
    .wr_en(inv_wr_en), .wr_addr(inv_wr_addr), .wr_ssn(inv_wr_ssn),
    .rd_addr(rd_addr), .rd_ssn(line_ssn)
  );

  always_comb
    for (int l = 0; l < LANES; l++) begin
      ssn_t w, s, m;
      w = word_ssn[l];
      // same-group bypass: the youngest older store to the same entry wins
      for (int j = 0; j < l; j++)
        if (grp_valid[j] && grp[j].kind == REX_STORE &&
            grp[j].addr[WORD_GRAN +: IW] == grp[l].addr[WORD_GRAN +: IW])
          w = grp[j].ssn;
      s = line_ssn[l];
      if (inv_en && inv_addr[LINE_GRAN +: SIW] == grp[l].addr[LINE_GRAN +: SIW])
        s = inv_ssn;
      m = (w > s) ? w : s;
      ssbf_hit[l] = m > grp[l].svw;
      wrap_off[l] = in_wrap_region(grp[l].svw, SVW_MAX);
      need_rex[l] = grp_valid[l] && grp[l].kind == REX_LOAD && grp[l].flagged &&
                    (ssbf_hit[l] || wrap_off[l] || !grp[l].filt_ok);
    end

endmodule
