// tb_rex_pipeline: self-checking test of the re-execution pipeline.
// Random groups of loads, stores and other instructions enter at the
// re-execution head while store retirement randomly occupies the shared
// data cache port. A behavioural data cache returns a word DC_LAT cycles
// after each read. The testbench predicts, from its own model of the SSBF,
// which loads must re-execute, and checks that
//   - every instruction completes exactly once, on the right output;
//   - a re-executed load reports a mismatch exactly when its original value
//     differs from memory;
//   - a reload completes DC_LAT cycles after its port grant;
//   - no reload is issued in a cycle retirement uses the port, nor before
//     every older store has been written (SSN_RETIRE, driven by the
//     testbench, advances by one store per retirement cycle);
//   - stalls and port conflicts both occur.
module tb_rex_pipeline;
  import svw_pkg::*;
  localparam int L = 2, LAT = 2, N = 3000;
  logic       clk = 0, rst_n = 0;
  logic       in_valid [L];
  rex_entry_t in_entry [L];
  logic       in_ready, inv_en = 0, ret_wr;
  addr_t      inv_addr = '0, dc_rd_addr, rld_addr;
  ssn_t       inv_ssn = '0;
  logic       dc_rd_req;
  data_t      dc_rd_data;
  logic       cmp_valid [L], cmp_load [L];
  logic [7:0] cmp_tag [L], rld_tag;
  logic       rld_valid, rld_mismatch, ev_stall, ev_port_busy, ev_st_wait;
  ssn_t       ssn_retire;
  logic       ev_filtered [L], ev_wrap_off [L];
  int checks = 0, failures = 0;

  rex_pipeline #(.LANES(L), .DC_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural data cache: word = f(address), DC_LAT-cycle read
  function automatic data_t mem(addr_t a);
    return {a[31:0] ^ 32'h5a5a_1234, ~a[31:0]};
  endfunction
  addr_t dc_pipe [LAT];
  always_ff @(posedge clk) begin
    dc_pipe[0] <= dc_rd_addr;
    for (int s = 1; s < LAT; s++) dc_pipe[s] <= dc_pipe[s-1];
  end
  assign dc_rd_data = mem(dc_pipe[LAT-1]);

  // scoreboard
  int   exp_path [256];   // 0 none, 1 cmp, 2 reload
  logic exp_mis  [256];
  int   grant_cyc [256];
  ssn_t exp_older [256];
  ssn_t last_st = '0;
  int   st_waits = 0;
  int   cyc = 0, completed = 0, issued = 0, stalls = 0, busy = 0, n_rex = 0, n_filt = 0;
  ssn_t m_word [512];
  always_ff @(posedge clk) cyc <= cyc + 1;

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (dc_rd_req) begin
      checks++;
      if (ret_wr) begin failures++; $display("reload issued while retirement owns the port"); end
      grant_cyc[dut.pend_e[dut.issue_lane].tag] = cyc;
      checks++;
      if ($signed(exp_older[dut.pend_e[dut.issue_lane].tag] - ssn_retire) > 0) begin
        failures++; $display("reload issued before an older store was written");
      end
    end
    if (ev_stall) stalls++;
    if (ev_port_busy) busy++;
    if (ev_st_wait) st_waits++;
    for (int l = 0; l < L; l++)
      if (cmp_valid[l]) begin
        checks++; completed++;
        if (exp_path[cmp_tag[l]] != 1) begin
          failures++; $display("tag %0d completed without reload, expected path %0d", cmp_tag[l], exp_path[cmp_tag[l]]);
        end
        exp_path[cmp_tag[l]] = 0;
      end
    if (rld_valid) begin
      checks += 3; completed++; n_rex++;
      if (exp_path[rld_tag] != 2) begin
        failures++; $display("tag %0d reloaded, expected path %0d", rld_tag, exp_path[rld_tag]);
      end
      if (rld_mismatch !== exp_mis[rld_tag]) begin
        failures++; $display("tag %0d mismatch %0b expected %0b", rld_tag, rld_mismatch, exp_mis[rld_tag]);
      end
      if (cyc - grant_cyc[rld_tag] != LAT) begin
        failures++; $display("tag %0d reload latency %0d", rld_tag, cyc - grant_cyc[rld_tag]);
      end
      exp_path[rld_tag] = 0;
    end
  end

  initial begin
    int tagc = 0;
    ssn_t next_ssn = 1;
    for (int t = 0; t < 256; t++) exp_path[t] = 0;
    for (int e = 0; e < 512; e++) m_word[e] = '0;
    for (int l = 0; l < L; l++) begin in_valid[l] = 0; in_entry[l] = '0; end
    ret_wr = 0;
    ssn_retire = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (issued < N) begin
      rex_entry_t e [L];
      logic v [L];
      @(negedge clk);
      ret_wr = ($urandom % 4) == 0;
      // stores are written to the cache in order, one per cycle with the port
      if (ret_wr && ssn_retire != ssn_t'(next_ssn - 1)) ssn_retire++;
      for (int l = 0; l < L; l++) begin
        if (!in_valid[0] && !in_valid[1]) begin
          v[l] = ($urandom % 5) != 0;
          e[l] = '0;
          case ($urandom % 3)
            0: e[l].kind = REX_OTHER;
            1: e[l].kind = REX_LOAD;
            default: e[l].kind = REX_STORE;
          endcase
          e[l].addr    = addr_t'(($urandom % 64) * 8);
          e[l].tag     = 8'(tagc + l);
          e[l].flagged = ($urandom % 3) != 0;
          e[l].filt_ok = 1'b1;
          e[l].svw     = ssn_t'((int'(next_ssn) > 12) ? int'(next_ssn) - 1 - int'($urandom % 12) : 0);
          if (e[l].kind == REX_STORE) begin e[l].ssn = next_ssn; next_ssn++; end
          e[l].value   = ($urandom % 3 == 0) ? data_t'($urandom) : mem(e[l].addr);
          in_entry[l] = e[l]; in_valid[l] = v[l];
        end
      end
      #1;
      if (in_ready && (in_valid[0] || in_valid[1])) begin
        for (int l = 0; l < L; l++) begin
          ssn_t w;
          w = m_word[in_entry[l].addr[11:3]];
          for (int j = 0; j < l; j++)
            if (in_valid[j] && in_entry[j].kind == REX_STORE && in_entry[j].addr[11:3] == in_entry[l].addr[11:3])
              w = in_entry[j].ssn;
          if (in_valid[l]) begin
            logic need;
            need = in_entry[l].kind == REX_LOAD && in_entry[l].flagged && w > in_entry[l].svw;
            exp_path[in_entry[l].tag] = need ? 2 : 1;
            exp_older[in_entry[l].tag] = last_st;
            if (in_entry[l].kind == REX_STORE) last_st = in_entry[l].ssn;
            exp_mis[in_entry[l].tag]  = in_entry[l].value != mem(in_entry[l].addr);
            if (in_entry[l].kind == REX_LOAD && in_entry[l].flagged && !need) n_filt++;
            issued++;
          end
        end
        @(posedge clk);
        for (int l = 0; l < L; l++)
          if (in_valid[l] && in_entry[l].kind == REX_STORE) m_word[in_entry[l].addr[11:3]] = in_entry[l].ssn;
        tagc = (tagc + 2) % 256;
        #1;
        for (int l = 0; l < L; l++) in_valid[l] = 0;
      end
    end
    @(negedge clk);
    for (int l = 0; l < L; l++) in_valid[l] = 0;
    ret_wr = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (completed != issued) begin failures++; $display("completed %0d of %0d", completed, issued); end
    checks++;
    if (stalls == 0 || busy == 0 || n_rex == 0 || n_filt == 0 || st_waits == 0) begin
      failures++; $display("events: stalls %0d port busy %0d reexec %0d filtered %0d", stalls, busy, n_rex, n_filt);
    end
    $display("issued %0d reexecuted %0d filtered %0d stalls %0d port-busy %0d store-waits %0d",
             issued, n_rex, n_filt, stalls, busy, st_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
