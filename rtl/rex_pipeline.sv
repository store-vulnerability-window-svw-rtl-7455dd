// rex_pipeline: in-order load re-execution pipeline with an SVW stage.
//
// The re-execution engine presents up to LANES instructions per cycle from
// the re-execution head of the ROB, oldest in lane 0. All loads and stores
// go through the SVW stage (svw_stage): stores write the SSBF, flagged loads
// are tested against it. Everything that does not need to re-execute is
// reported complete in the next cycle on the cmp_* outputs. Loads that do
// need to re-execute are held in a small buffer and sent, oldest first and
// one per cycle, to the data cache port that store retirement also uses.
// A reload waits until every older store has been written to the cache
// (SSN_RETIRE has reached the SSN of the youngest store that passed the
// stage before the load), and retirement has priority: while ret_wr is
// high no reload is issued. The
// reloaded word returns DC_LAT cycles after issue on dc_rd_data and is
// compared with the value the load originally obtained; a mismatch raises
// rld_mismatch, which is the flush request for the ROB.
//
// Timing: a group is accepted (in_ready) only when no re-executing load of
// the previous group is left to issue after this cycle, so the stage stalls
// while several loads of one group wait for the single port. Completions of
// filtered instructions appear one cycle after acceptance; a reload result
// appears DC_LAT cycles after its port grant (rld_valid, combinational from
// dc_rd_data in that cycle).
//
// The SVW stage placement before data-cache access, the shared port with
// retirement priority and the value comparison follow the SVW proposal. The
// lane count, the buffer, the stall rule and the completion interface are
// this design's choices.
module rex_pipeline
  import svw_pkg::*;
#(
  parameter int LANES   = 2,
  parameter int DC_LAT  = 2,              // data cache read latency
  parameter int ENTRIES = SSBF_ENTRIES,
  parameter int SVW_MAX = SQ_SIZE
) (
  input  logic       clk,
  input  logic       rst_n,
  // instructions at the re-execution head
  input  logic       in_valid [LANES],
  input  rex_entry_t in_entry [LANES],
  output logic       in_ready,
  // coherence invalidations
  input  logic       inv_en,
  input  addr_t      inv_addr,
  input  ssn_t       inv_ssn,
  // shared data cache port
  input  ssn_t       ssn_retire,          // SSN of the last retired store
  input  logic       ret_wr,              // retirement writes the port now
  output logic       dc_rd_req,
  output addr_t      dc_rd_addr,
  input  data_t      dc_rd_data,
  // completions without data cache access
  output logic       cmp_valid [LANES],
  output logic [7:0] cmp_tag   [LANES],
  output logic       cmp_load  [LANES],   // completion is a filtered load
  // completions of re-executed loads
  output logic       rld_valid,
  output logic [7:0] rld_tag,
  output addr_t      rld_addr,
  output logic       rld_mismatch,
  // events
  output logic       ev_stall,            // group waits for the port
  output logic       ev_port_busy,        // reload waits for retirement
  output logic       ev_st_wait,          // reload waits for an older store
  output logic       ev_filtered [LANES], // flagged load skipped re-execution
  output logic       ev_wrap_off [LANES]  // flagged load: filter off near wrap
);
  logic any_in;
  logic fire;
  logic need_rex [LANES];
  logic ssbf_hit [LANES];
  logic wrap_off [LANES];

  // loads waiting for the data cache port
  logic       pend_v [LANES];
  rex_entry_t pend_e [LANES];
  ssn_t       pend_o [LANES];   // SSN of the youngest store older than the load
  ssn_t       last_st_q;        // SSN of the youngest store through the stage
  ssn_t       older_st [LANES];
  logic       older_done;
  logic       issue;
  logic [$clog2(LANES > 1 ? LANES : 2)-1:0] issue_lane;
  int         pend_left;

  always_comb begin
    any_in = 1'b0;
    for (int l = 0; l < LANES; l++) any_in |= in_valid[l];
    issue_lane = 0;
    issue      = 1'b0;
    pend_left  = 0;
    for (int l = LANES-1; l >= 0; l--)
      if (pend_v[l]) begin
        issue_lane = l[$bits(issue_lane)-1:0];
        pend_left++;
      end
    // a load re-executes only after all older stores have been written
    older_done = $signed(pend_o[issue_lane] - ssn_retire) <= 0;
    issue = pend_left > 0 && !ret_wr && older_done;
    ev_st_wait = pend_left > 0 && !ret_wr && !older_done;
    in_ready = pend_left == 0 || (pend_left == 1 && issue);
    fire = any_in && in_ready;
    ev_stall     = any_in && !in_ready;
    ev_port_busy = pend_left > 0 && ret_wr;
    dc_rd_req  = issue;
    dc_rd_addr = pend_e[issue_lane].addr;
  end

  always_comb
    for (int l = 0; l < LANES; l++) begin
      ev_filtered[l] = fire && in_valid[l] && in_entry[l].kind == REX_LOAD &&
                       in_entry[l].flagged && !need_rex[l];
      ev_wrap_off[l] = fire && in_valid[l] && in_entry[l].kind == REX_LOAD &&
                       in_entry[l].flagged && in_entry[l].filt_ok &&
                       wrap_off[l] && !ssbf_hit[l];
    end

  svw_stage #(.LANES(LANES), .ENTRIES(ENTRIES), .SVW_MAX(SVW_MAX)) u_svw (
    .clk, .rst_n,
    .grp_valid(in_valid), .grp(in_entry), .grp_fire(fire),
    .inv_en, .inv_addr, .inv_ssn,
    .need_rex, .ssbf_hit, .wrap_off
  );

  always_comb begin
    ssn_t last;
    last = last_st_q;
    for (int l = 0; l < LANES; l++) begin
      older_st[l] = last;
      if (in_valid[l] && in_entry[l].kind == REX_STORE) last = in_entry[l].ssn;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_st_q <= '0;
    else if (fire)
      for (int l = 0; l < LANES; l++)
        if (in_valid[l] && in_entry[l].kind == REX_STORE) last_st_q <= in_entry[l].ssn;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        pend_o[l]    <= '0;
        pend_v[l]    <= 1'b0;
        pend_e[l]    <= '0;
        cmp_valid[l] <= 1'b0;
        cmp_tag[l]   <= '0;
        cmp_load[l]  <= 1'b0;
      end
    end else begin
      if (issue) pend_v[issue_lane] <= 1'b0;
      for (int l = 0; l < LANES; l++) begin
        cmp_valid[l] <= fire && in_valid[l] && !need_rex[l];
        cmp_tag[l]   <= in_entry[l].tag;
        cmp_load[l]  <= in_entry[l].kind == REX_LOAD;
        if (fire) begin
          pend_v[l] <= in_valid[l] && need_rex[l];
          pend_e[l] <= in_entry[l];
          pend_o[l] <= older_st[l];
        end
      end
    end
  end

  // reloads in flight in the data cache
  logic       lat_v   [DC_LAT];
  logic [7:0] lat_tag [DC_LAT];
  addr_t      lat_adr [DC_LAT];
  data_t      lat_val [DC_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < DC_LAT; s++) begin
        lat_v[s]   <= 1'b0;
        lat_tag[s] <= '0;
        lat_adr[s] <= '0;
        lat_val[s] <= '0;
      end
    end else begin
      lat_v[0]   <= issue;
      lat_tag[0] <= pend_e[issue_lane].tag;
      lat_adr[0] <= pend_e[issue_lane].addr;
      lat_val[0] <= pend_e[issue_lane].value;
      for (int s = 1; s < DC_LAT; s++) begin
        lat_v[s]   <= lat_v[s-1];
        lat_tag[s] <= lat_tag[s-1];
        lat_adr[s] <= lat_adr[s-1];
        lat_val[s] <= lat_val[s-1];
      end
    end
  end

  assign rld_valid    = lat_v[DC_LAT-1];
  assign rld_tag      = lat_tag[DC_LAT-1];
  assign rld_addr     = lat_adr[DC_LAT-1];
  assign rld_mismatch = lat_v[DC_LAT-1] && dc_rd_data != lat_val[DC_LAT-1];

  // Retirement owns the port whenever it needs it.
  a_port_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(dc_rd_req && ret_wr));

endmodule
