// tb_svw_top: end-to-end test of the SVW filter with every parameter at
// its default.
//
// The testbench plays a small processor. It runs a program in windows of a
// few instructions. Each window is
//   1. renamed in order: stores advance SSN_RENAME; each load looks up the
//      integration table and is either eliminated (it reuses the value of
//      an older load with the same signature) or dispatched normally and
//      inserted into the table;
//   2. "executed": a load whose older stores in the window are not yet
//      resolved is flagged; it either forwards from the youngest older
//      store to its address (correct; SVW updated on forward), forwards from
//      an older, superseded store (wrong), or reads memory as it was before
//      the window (wrong if an older store writes its address). Sometimes
//      another core writes a word (a coherence invalidation), which makes
//      every load of the window flagged and possibly stale;
//   3. sent in order through the re-execution head in groups of one or two,
//      while every store is retired to memory right after it passes the SVW
//      stage, on the port the reloads share.
// Memory words are chosen so that distinct addresses alias in the SSBF.
// Checks: every load with a wrong value is re-executed and requests a flush;
// every load the filter lets through had the right value; the SPCT names the
// last retired store to the flushed load's address; SSN_RETIRE equals the
// number of retired stores. Each mechanism must occur at least once:
// filtered loads, true and false-positive re-executions, update on forward,
// eliminations and false eliminations, invalidation hits, the wrap-around
// filter disable, the integration-table flash clear, SVW-stage stalls and
// port conflicts with retirement, reloads waiting for older stores and the
// invalidation shadow (loads in the load queue at an invalidation are
// flagged by the design, not by this bench). The run covers more than one 16-bit SSN
// wrap-around, so it takes a few hundred thousand cycles.
module tb_svw_top;
  import svw_pkg::*;
  localparam int L = 2, LAT = 2, NSTORES = 70000, K = 10;

  logic              clk = 0, rst_n = 0;
  logic [1:0]        ren_cnt;
  it_sig_t           it_lk_sig, it_ins_sig;
  logic              it_lk_hit, it_ins_en, preg_free_en;
  logic [PREG_W-1:0] it_lk_preg, it_ins_preg, preg_free;
  ssn_t              it_lk_ssn;
  logic              disp_en [2], disp_elim [2], disp_filt_ok [2];
  logic [6:0]        disp_idx [2];
  ssn_t              disp_it_ssn [2];
  logic              fwd_en [2];
  logic [6:0]        fwd_idx [2];
  logic [5:0]        fwd_sq_pos [2];
  logic              ret_store, flush;
  addr_t             ret_addr, inv_addr, dc_rd_addr;
  logic [63:0]       ret_pc, mark_store_pc;
  ssn_t              flush_ssn, ssn_rename, ssn_retire;
  logic              inv_en;
  logic [7:0]        lq_head, lq_tail;
  logic              ev_shadow;
  logic [7:0]        lq_ptr = '0;
  logic              rex_valid [L], rex_flagged [L];
  rex_kind_e         rex_kind [L];
  logic [7:0]        rex_tag [L], cmp_tag [L], rld_tag;
  addr_t             rex_addr [L];
  data_t             rex_value [L], dc_rd_data;
  logic [6:0]        rex_lq_idx [L];
  logic [5:0]        rex_sq_pos [L];
  logic              rex_ready, dc_rd_req;
  logic              cmp_valid [L], cmp_load [L];
  logic              rld_valid, flush_req, it_cleared, ev_stall, ev_port_busy, ev_st_wait;
  logic              ev_filtered [L], ev_wrap_off [L];

  svw_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit is_load; bit wrong; bit inv_victim; bit elim; addr_t addr; bit done; } ins_t;
  ins_t  win [K];

  // ---------------- memory, data cache port, store retirement
  // the memory words used: 0x1000.. and their SSBF aliases 0x2000..
  data_t mem [32];
  function automatic int mix(addr_t a);
    return int'({a[12], a[6:3]});
  endfunction
  function automatic data_t rd_mem(addr_t a);
    return mem[mix(a)];
  endfunction
  data_t dc_pipe [LAT];
  always_ff @(posedge clk) begin
    dc_pipe[0] <= rd_mem(dc_rd_addr);
    for (int s = 1; s < LAT; s++) dc_pipe[s] <= dc_pipe[s-1];
  end
  assign dc_rd_data = dc_pipe[LAT-1];

  typedef struct { addr_t addr; data_t data; logic [63:0] pc; int idx; } st_t;
  st_t  retq [$];
  logic [63:0] spct_m [512];
  int   n_retired = 0;
  function automatic bit older_loads_done(int idx);
    for (int j = 0; j < idx; j++) if (win[j].is_load && !win[j].done) return 0;
    return 1;
  endfunction
  always @(negedge clk) begin
    ret_store = 0;
    // a store retires only after every older load has finished re-execution
    if (rst_n && retq.size() > 0 && older_loads_done(retq[0].idx)) begin
      ret_store = 1; ret_addr = retq[0].addr; ret_pc = retq[0].pc;
    end
  end
  always @(posedge clk) if (rst_n && ret_store) begin
    st_t s;
    s = retq.pop_front();
    mem[mix(s.addr)] <= s.data;
    spct_m[s.addr[11:3]] <= s.pc;
    n_retired++;
  end

  // ---------------- events
  int ev_filt = 0, ev_true = 0, ev_false_pos = 0, ev_fwd = 0, ev_elim = 0,
      ev_false_elim = 0, ev_inv = 0, ev_wrap = 0, ev_clear = 0, ev_st = 0,
      ev_busy = 0, ev_spct = 0, ev_wait = 0, ev_shad = 0;
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < L; l++) begin
      if (ev_filtered[l]) ev_filt++;
      if (ev_wrap_off[l]) ev_wrap++;
    end
    if (it_cleared) ev_clear++;
    if (ev_stall) ev_st++;
    if (ev_port_busy) ev_busy++;
    if (ev_st_wait) ev_wait++;
    if (ev_shadow) ev_shad++;
  end

  // ---------------- completion checking
  int    pending = 0;
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < L; l++)
      if (cmp_valid[l]) begin
        automatic int t = int'(cmp_tag[l]);
        pending--; win[t].done = 1;
        if (win[t].is_load && win[t].wrong) begin
          checks++; failures++;
          $display("load %0d with a wrong value was not re-executed", t);
        end
      end
    if (rld_valid) begin
      automatic int t = int'(rld_tag);
      pending--; win[t].done = 1;
      checks++;
      if (flush_req != win[t].wrong) begin
        failures++;
        $display("load %0d: flush %0b but value wrong=%0b elim %0b inv %0b addr %h", t, flush_req, win[t].wrong, win[t].elim, win[t].inv_victim, win[t].addr);
      end
      if (flush_req) begin
        ev_true++;
        if (win[t].elim) ev_false_elim++;
        if (win[t].inv_victim) ev_inv++;
        checks++;
        if (mark_store_pc !== spct_m[win[t].addr[11:3]]) begin
          failures++; $display("SPCT gave %h expected %h", mark_store_pc, spct_m[win[t].addr[11:3]]);
        end else ev_spct++;
      end else ev_false_pos++;
    end
  end

  // ---------------- the program
  addr_t words [24];
  data_t preg_val [448];
  int    preg_win [448];
  int    nwin = 0;
  int    preg_next = 0, lq_next = 0, pc_next = 0;

  task automatic idle_inputs();
    ren_cnt = 0; it_ins_en = 0; preg_free_en = 0; inv_en = 0; flush = 0;
    for (int p = 0; p < 2; p++) begin disp_en[p] = 0; fwd_en[p] = 0; end
    for (int l = 0; l < L; l++) rex_valid[l] = 0;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) words[i] = addr_t'(64'h1000 + 8 * i);
    for (int i = 16; i < 24; i++) words[i] = addr_t'(64'h1000 + 8 * (i - 16) + 4096); // SSBF aliases
    for (int e = 0; e < 512; e++) spct_m[e] = '0;
    for (int k = 0; k < 32; k++) mem[k] = {32'(k) * 32'h9e37_79b9, 32'(k)};
    it_lk_sig = '0; it_ins_sig = '0; it_ins_preg = '0; preg_free = '0; flush_ssn = '0;
    ret_addr = '0; ret_pc = '0; inv_addr = '0;
    for (int p = 0; p < 2; p++) begin
      disp_idx[p] = '0; disp_elim[p] = 0; disp_it_ssn[p] = '0; disp_filt_ok[p] = 0;
      fwd_idx[p] = '0; fwd_sq_pos[p] = '0;
    end
    for (int l = 0; l < L; l++) begin
      rex_kind[l] = REX_OTHER; rex_flagged[l] = 0; rex_tag[l] = '0; rex_addr[l] = '0;
      rex_value[l] = '0; rex_lq_idx[l] = '0; rex_sq_pos[l] = '0;
    end
    idle_inputs();
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int p = 0; p < 448; p++) begin preg_val[p] = '0; preg_win[p] = -1; end
    lq_head = '0; lq_tail = '0;
    while (n_retired < NSTORES) begin
      rex_kind_e kind [K];
      addr_t     addr [K];
      data_t     sdata [K], value [K];
      logic [63:0] spc [K];
      data_t     cval [K];
      int        preg_of [K];
      logic      flagged [K], elim [K];
      int        lqi [K], stidx [K];
      automatic int nst = 0;
      int        tail;
      automatic bit inv_done = 0;
      // ---- generate
      for (int i = 0; i < K; i++) begin
        automatic int r = $urandom % 10;
        kind[i] = r < 4 ? REX_STORE : (r < 8 ? REX_LOAD : REX_OTHER);
        addr[i] = words[$urandom % 24];
        sdata[i] = {$urandom, $urandom};
        spc[i] = 64'h4000 + 4 * pc_next; pc_next++;
        win[i] = '{is_load: kind[i] == REX_LOAD, wrong: 0, inv_victim: 0, elim: 0, addr: addr[i], done: 0};
        flagged[i] = 0; elim[i] = 0; value[i] = '0;
        stidx[i] = kind[i] == REX_STORE ? nst : -1;
        if (kind[i] == REX_STORE) nst++;
      end
      // ---- rename and dispatch, one instruction per cycle
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        idle_inputs();
        if (kind[i] == REX_STORE) ren_cnt = 1;
        if (kind[i] == REX_LOAD) begin
          it_lk_sig = '{opcode: 8'h29, imm: 16'(addr[i]), preg_in: '0};
          lqi[i] = lq_next; lq_next = (lq_next + 1) % 128;
          lq_ptr = lq_ptr + 1'b1;
          #1;
          disp_en[0] = 1; disp_idx[0] = 7'(lqi[i]); disp_filt_ok[0] = 1;
          if (it_lk_hit && preg_win[it_lk_preg] != nwin && ($urandom % 2) == 0) begin
            elim[i] = 1; win[i].elim = 1; ev_elim++;
            disp_elim[0] = 1; disp_it_ssn[0] = it_lk_ssn;
            value[i] = preg_val[it_lk_preg];
            flagged[i] = 1;
          end else begin
            disp_elim[0] = 0;
            it_ins_en = 1; it_ins_sig = it_lk_sig; it_ins_preg = PREG_W'(preg_next);
            preg_free_en = 1; preg_free = PREG_W'(preg_next);
            preg_of[i] = preg_next; preg_win[preg_next] = nwin;
          end
        end
        @(posedge clk);
        lq_tail = lq_ptr;
        if (kind[i] == REX_LOAD && !elim[i]) preg_next = (preg_next + 1) % 448;
      end
      // ---- execute loads (program-order view of memory)
      for (int i = 0; i < K; i++) if (kind[i] == REX_LOAD && !elim[i]) begin
        automatic int youngest = -1, older_same = -1;
        automatic bit older_st = 0;
        data_t correct;
        for (int j = 0; j < i; j++) if (kind[j] == REX_STORE) begin
          older_st = 1;
          if (addr[j] == addr[i]) begin older_same = youngest; youngest = j; end
        end
        correct = youngest >= 0 ? sdata[youngest] : rd_mem(addr[i]);
        flagged[i] = older_st;
        @(negedge clk);
        idle_inputs();
        if (youngest >= 0 && ($urandom % 2) == 0) begin
          automatic int src = (older_same >= 0 && ($urandom % 3) == 0) ? older_same : youngest;
          // older_same here is the previous same-address store, if any
          value[i] = sdata[src];
          fwd_en[0] = 1; fwd_idx[0] = 7'(lqi[i]); fwd_sq_pos[0] = 6'(retq.size() + stidx[src]);
          ev_fwd++;
        end else if (older_st && ($urandom % 2) == 0)
          value[i] = rd_mem(addr[i]);          // issued before older stores
        else value[i] = correct;
        @(posedge clk);
        win[i].wrong = value[i] != correct;
        cval[i] = correct;
      end
      // record the results in the physical registers; a wrong one is
      // repaired by the flush that its re-execution causes
      for (int i = 0; i < K; i++) if (kind[i] == REX_LOAD && !elim[i]) preg_val[preg_of[i]] = cval[i];
      // eliminated loads: correct only if memory, after older stores, agrees
      for (int i = 0; i < K; i++) if (elim[i]) begin
        automatic data_t correct = rd_mem(addr[i]);
        for (int j = 0; j < i; j++) if (kind[j] == REX_STORE && addr[j] == addr[i]) correct = sdata[j];
        win[i].wrong = value[i] != correct;
      end
      // ---- occasionally another core writes a word now
      if (($urandom % 8) == 0) begin
        automatic addr_t a = words[$urandom % 16];
        automatic data_t nv = {$urandom, $urandom};
        @(negedge clk);
        idle_inputs();
        inv_en = 1; inv_addr = a;
        @(posedge clk);
        mem[mix(a)] = nv;
        inv_done = 1;
        for (int i = 0; i < K; i++) if (kind[i] == REX_LOAD) begin
          automatic data_t correct = rd_mem(addr[i]);
          for (int j = 0; j < i; j++) if (kind[j] == REX_STORE && addr[j] == addr[i]) correct = sdata[j];
          // not flagged here: the design must flag loads already in the
          // load queue when the invalidation arrives
          if (addr[i] == a && value[i] != correct) begin win[i].inv_victim = 1; end
          win[i].wrong = value[i] != correct;
        end
      end
      // ---- re-execution head, in order, groups of one or two
      tail = 0;
      pending = 0;
      while (tail < K) begin
        automatic int n = (tail + 1 < K && ($urandom % 2) == 0) ? 2 : 1;
        int q;
        @(negedge clk);
        idle_inputs();
        q = retq.size() - (ret_store ? 0 : 0);
        for (int l = 0; l < n; l++) begin
          automatic int i = tail + l;
          rex_valid[l] = 1; rex_kind[l] = kind[i]; rex_flagged[l] = flagged[i];
          rex_tag[l] = 8'(i); rex_addr[l] = addr[i]; rex_value[l] = value[i];
          rex_lq_idx[l] = kind[i] == REX_LOAD ? 7'(lqi[i]) : '0;
          rex_sq_pos[l] = 6'(q);
          if (kind[i] == REX_STORE) q++;
        end
        #1;
        if (rex_ready) begin
          @(posedge clk);
          for (int l = 0; l < n; l++) begin
            automatic int i = tail + l;
            pending++;
            if (kind[i] == REX_STORE) retq.push_back('{addr[i], sdata[i], spc[i], i});
          end
          tail += n;
        end else @(posedge clk);
      end
      @(negedge clk);
      idle_inputs();
      while (pending > 0 || retq.size() > 0) @(negedge clk);
      lq_head = lq_tail;      // the window's loads retire
      nwin++;
      checks++;
      if (ssn_retire !== ssn_t'(n_retired)) begin
        failures++; $display("SSN_RETIRE %0d after %0d stores", ssn_retire, n_retired);
      end
    end

    $display("filtered %0d reexec-true %0d reexec-false-positive %0d fwd-update %0d elim %0d",
             ev_filt, ev_true, ev_false_pos, ev_fwd, ev_elim);
    $display("false-elim %0d inv-hit %0d wrap-off %0d it-clear %0d stall %0d port-busy %0d spct %0d",
             ev_false_elim, ev_inv, ev_wrap, ev_clear, ev_st, ev_busy, ev_spct);
    $display("reloads waiting for older stores %0d invalidation-shadow cycles %0d", ev_wait, ev_shad);
    begin
      automatic int evs [14] = '{ev_filt, ev_true, ev_false_pos, ev_fwd, ev_elim, ev_false_elim,
                       ev_inv, ev_wrap, ev_clear, ev_st, ev_busy, ev_spct, ev_wait, ev_shad};
      for (int k = 0; k < 14; k++) begin
        checks++;
        if (evs[k] == 0) begin failures++; $display("mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
