// tb_integration_table: self-checking test of the integration table.
// Directed part: an inserted load signature hits with its register and
// SSN; freeing the output register and a flash clear both remove entries.
// Random part: a reference model of the table (same set hash, 2-way,
// round-robin replacement) is compared on every lookup.
module tb_integration_table;
  import svw_pkg::*;
  localparam int SETS = 256;
  logic              clk = 0, rst_n = 0, clear = 0;
  it_sig_t           lk_sig, ins_sig;
  logic              lk_hit, ins_en = 0, free_en = 0;
  logic [PREG_W-1:0] lk_preg, ins_preg, free_preg;
  ssn_t              lk_ssn, ins_ssn;
  int checks = 0, failures = 0;

  typedef struct { bit v; it_sig_t sig; logic [PREG_W-1:0] preg; ssn_t ssn; } ent_t;
  ent_t m [SETS][2];
  int   lru [SETS];

  integration_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int set_of(it_sig_t s);
    logic [32:0] b; logic [7:0] h;
    b = s; h = '0;
    for (int i = 0; i < 33; i++) h[i % 8] ^= b[i];
    return int'(h);
  endfunction

  function automatic it_sig_t rnd_sig();
    it_sig_t s;
    s.opcode = 8'($urandom % 4);
    s.imm = 16'($urandom % 64);
    s.preg_in = PREG_W'($urandom % 16);
    return s;
  endfunction

  task automatic check_lookup(it_sig_t s, string what);
    int st; bit hit; logic [PREG_W-1:0] p; ssn_t n;
    st = set_of(s); hit = 0; p = '0; n = '0;
    for (int w = 0; w < 2; w++)
      if (m[st][w].v && m[st][w].sig == s) begin hit = 1; p = m[st][w].preg; n = m[st][w].ssn; end
    lk_sig = s;
    #1;
    checks++;
    if (lk_hit !== hit || (hit && (lk_preg !== p || lk_ssn !== n))) begin
      failures++;
      $display("%s: lookup hit %0b/%0b preg %0d/%0d ssn %0d/%0d", what, lk_hit, hit, lk_preg, p, lk_ssn, n);
    end
  endtask

  task automatic model_insert(it_sig_t s, logic [PREG_W-1:0] p, ssn_t n);
    int st, way; bit found;
    st = set_of(s); way = lru[st]; found = 0;
    for (int w = 1; w >= 0; w--) if (!m[st][w].v) way = w;
    for (int w = 0; w < 2; w++) if (!found && m[st][w].v && m[st][w].sig == s) begin way = w; found = 1; end
    m[st][way] = '{1, s, p, n};
    lru[st] = (way + 1) % 2;
  endtask

  initial begin
    it_sig_t a;
    for (int s = 0; s < SETS; s++) begin lru[s] = 0; m[s][0].v = 0; m[s][1].v = 0; end
    lk_sig = '0; ins_sig = '0; ins_preg = '0; ins_ssn = '0; free_preg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: three signatures in one set
    a = '{opcode: 8'h10, imm: 16'h0008, preg_in: 9'd5};
    @(negedge clk); ins_en = 1; ins_sig = a; ins_preg = 9'd40; ins_ssn = 16'd77;
    @(posedge clk); model_insert(a, 9'd40, 16'd77);
    @(negedge clk); ins_en = 0; check_lookup(a, "after insert a");
    checks++; if (!lk_hit || lk_ssn != 16'd77) failures++;
    // free the output register
    free_en = 1; free_preg = 9'd40;
    @(posedge clk);
    for (int w = 0; w < 2; w++) if (m[set_of(a)][w].preg == 9'd40) m[set_of(a)][w].v = 0;
    @(negedge clk); free_en = 0; check_lookup(a, "after free");
    checks++; if (lk_hit) failures++;
    // random traffic with occasional flash clears
    for (int it = 0; it < 8000; it++) begin
      @(negedge clk);
      ins_en    = ($urandom % 2) == 0;
      ins_sig   = rnd_sig();
      ins_preg  = PREG_W'($urandom % 448);
      ins_ssn   = ssn_t'($urandom);
      free_en   = ($urandom % 8) == 0;
      free_preg = PREG_W'($urandom % 448);
      clear     = ($urandom % 997) == 0;
      check_lookup(rnd_sig(), "random");
      @(posedge clk);
      if (clear) begin
        for (int s = 0; s < SETS; s++) begin m[s][0].v = 0; m[s][1].v = 0; end
      end else begin
        if (free_en)
          for (int s = 0; s < SETS; s++)
            for (int w = 0; w < 2; w++) if (m[s][w].preg == free_preg) m[s][w].v = 0;
        if (ins_en) model_insert(ins_sig, ins_preg, ins_ssn);
      end
    end
    @(negedge clk); ins_en = 0; free_en = 0; clear = 1;
    @(posedge clk);
    @(negedge clk); clear = 0;
    for (int s = 0; s < SETS; s++) begin m[s][0].v = 0; m[s][1].v = 0; end
    for (int k = 0; k < 50; k++) check_lookup(rnd_sig(), "after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
