// tb_svw_stage: self-checking test of the SVW stage.
// Directed part: the two working examples of the non-associative LQ with
// SVW. A load with SVW 62 forwards from store 65 (SVW becomes 65); in the
// first example store 66 writes address A and the load must re-execute
// (66 > 65); in the second store 66 writes D, the last store to A is 65
// and the load is filtered (65 > 65 is false). The first example is then
// repeated with the store and the load in the same group (bypass), and the
// wrap-around and SSBF_SM (invalidation) cases are checked.
// Random part: groups of loads and stores against a reference model of
// both filters and the full re-execution test.
module tb_svw_stage;
  import svw_pkg::*;
  localparam int L = 2;
  logic       clk = 0, rst_n = 0;
  logic       grp_valid [L];
  rex_entry_t grp [L];
  logic       grp_fire, inv_en;
  addr_t      inv_addr;
  ssn_t       inv_ssn;
  logic       need_rex [L], ssbf_hit [L], wrap_off [L];
  ssn_t       m_word [512];
  ssn_t       m_line [512];
  int checks = 0, failures = 0;

  localparam addr_t A = 64'h1000, B = 64'h2008, C = 64'h3010, D = 64'h4018;

  svw_stage #(.LANES(L), .SVW_MAX(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rex_entry_t st(addr_t a, ssn_t n);
    rex_entry_t e = '0;
    e.kind = REX_STORE; e.addr = a; e.ssn = n;
    return e;
  endfunction
  function automatic rex_entry_t ld(addr_t a, ssn_t svw, logic fl = 1, logic ok = 1);
    rex_entry_t e = '0;
    e.kind = REX_LOAD; e.addr = a; e.svw = svw; e.flagged = fl; e.filt_ok = ok;
    return e;
  endfunction

  // present one group, check lane 'chk' (if >=0), then clock it in
  task automatic step(rex_entry_t e0, logic v0, rex_entry_t e1, logic v1,
                      int chk, logic exp, string what);
    @(negedge clk);
    grp[0] = e0; grp_valid[0] = v0; grp[1] = e1; grp_valid[1] = v1; grp_fire = 1;
    #1;
    if (chk >= 0) begin
      checks++;
      if (need_rex[chk] !== exp) begin
        failures++;
        $display("%s: need_rex=%0b expected %0b", what, need_rex[chk], exp);
      end
    end
    @(posedge clk);
    for (int l = 0; l < L; l++)
      if (grp_valid[l] && grp[l].kind == REX_STORE) m_word[grp[l].addr[11:3]] = grp[l].ssn;
    #1 grp_valid[0] = 0; grp_valid[1] = 0;
  endtask

  initial begin
    for (int e = 0; e < 512; e++) begin m_word[e] = '0; m_line[e] = '0; end
    grp_valid[0] = 0; grp_valid[1] = 0; grp[0] = '0; grp[1] = '0; grp_fire = 0;
    inv_en = 0; inv_addr = '0; inv_ssn = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- example (a): SSBF A=4 B=0 C=17 D=62, then stores 63:C 64:D 65:A 66:A
    step(st(A, 4), 1, st(C, 17), 1, -1, 0, "");
    step(st(D, 62), 1, '0, 0, -1, 0, "");
    step(st(C, 63), 1, st(D, 64), 1, -1, 0, "");
    step(st(A, 65), 1, st(A, 66), 1, -1, 0, "");
    step(ld(A, 65), 1, '0, 0, 0, 1, "example a: 66 > 65");
    // ---- example (b): stores 63:C 64:A 65:A 66:D
    step(st(C, 63), 1, st(A, 64), 1, -1, 0, "");
    step(st(A, 65), 1, st(D, 66), 1, -1, 0, "");
    step(ld(A, 65), 1, '0, 0, 0, 0, "example b: 65 > 65 is false");
    // without the update on forward (SVW 62) the load would re-execute
    step(ld(A, 62), 1, '0, 0, 0, 1, "example b without forward update");
    // ---- same-group bypass: store 67 to A in lane 0, load in lane 1
    step(st(A, 67), 1, ld(A, 66), 1, 1, 1, "bypass from older lane");
    // younger lane store must not affect older lane load
    step(ld(B, 66), 1, st(B, 68), 1, 0, 0, "younger store in same group");
    // unflagged load never re-executes; filt_ok=0 always re-executes
    step(ld(A, 0, 0), 1, '0, 0, 0, 0, "unflagged load");
    step(ld(B, 100, 1, 0), 1, '0, 0, 0, 1, "filter disabled");
    // ---- wrap-around region: SVW > 65535-64
    step(ld(B, 16'hFFF0), 1, '0, 0, 0, 1, "wrap region");
    step(ld(B, 16'hFFBF), 1, '0, 0, 0, 0, "just below wrap region");
    // ---- invalidation of A's line with SSN 200 hits a load in the same line
    @(negedge clk); inv_en = 1; inv_addr = A + 8; inv_ssn = 200;
    @(posedge clk); m_line[(A + 8) >> 6 & 511] = 200;
    #1 inv_en = 0;
    step(ld(A + 16, 150), 1, '0, 0, 0, 1, "SSBF_SM hit");
    step(ld(A + 16, 200), 1, '0, 0, 0, 0, "SSBF_SM no hit");
    // ---- random
    for (int it = 0; it < 4000; it++) begin
      rex_entry_t e [L];
      logic       v [L];
      logic       exp [L];
      @(negedge clk);
      inv_en = ($urandom % 10) == 0;
      inv_addr = addr_t'($urandom % 4096);
      inv_ssn = ssn_t'($urandom % 1000);
      for (int l = 0; l < L; l++) begin
        v[l] = ($urandom % 4) != 0;
        e[l] = '0;
        e[l].kind = ($urandom % 2) ? REX_LOAD : REX_STORE;
        e[l].addr = addr_t'($urandom % 4096);
        e[l].ssn = ssn_t'($urandom % 1000);
        e[l].svw = ($urandom % 50 == 0) ? ssn_t'(16'hFFFF - ($urandom % 128)) : ssn_t'($urandom % 1000);
        e[l].flagged = ($urandom % 4) != 0;
        e[l].filt_ok = ($urandom % 8) != 0;
        grp[l] = e[l]; grp_valid[l] = v[l];
      end
      grp_fire = 1;
      // reference
      for (int l = 0; l < L; l++) begin
        ssn_t w, s, mx;
        w = m_word[e[l].addr[11:3]];
        for (int j = 0; j < l; j++)
          if (v[j] && e[j].kind == REX_STORE && e[j].addr[11:3] == e[l].addr[11:3]) w = e[j].ssn;
        s = m_line[e[l].addr[14:6]];
        if (inv_en && inv_addr[14:6] == e[l].addr[14:6]) s = inv_ssn;
        mx = w > s ? w : s;
        exp[l] = v[l] && e[l].kind == REX_LOAD && e[l].flagged &&
                 (mx > e[l].svw || e[l].svw > 16'd65471 || !e[l].filt_ok);
      end
      #1;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (need_rex[l] !== exp[l]) begin
          failures++;
          $display("random %0d lane %0d: need_rex %0b exp %0b", it, l, need_rex[l], exp[l]);
        end
      end
      @(posedge clk);
      for (int l = 0; l < L; l++)
        if (v[l] && e[l].kind == REX_STORE) m_word[e[l].addr[11:3]] = e[l].ssn;
      if (inv_en) m_line[inv_addr[14:6]] = inv_ssn;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
