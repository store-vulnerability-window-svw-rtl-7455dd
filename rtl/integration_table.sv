// integration_table: load entries of the register-integration table used
// for redundant load elimination, extended with an SSN field.
//
// Every non-redundant load creates an entry at rename holding its
// operation signature (opcode, immediate, physical register input), the
// physical register that will hold its result and SSN_RENAME at that time,
// which marks the start of the vulnerability window of any later load that
// reuses the result. A later load whose signature matches a valid entry is
// redundant: it is eliminated, takes the entry's output register and
// passes the entry's SSN on as its SVW. The whole table is flash-cleared
// when SSN_RENAME wraps through zero, so no window spans the wrap point.
// Entries whose output register is freed are invalidated, since the value
// is no longer there to reuse.
//
// Organisation: ENTRIES entries, WAYS-way set associative (512 entries,
// 2-way by default). The set index is the XOR-fold of the signature; a
// per-set LRU way is replaced on insert, and an insert with a signature
// already present overwrites that entry.
//
// Interface: one lookup (combinational hit/preg/ssn), one insert, one
// register free and one flash clear per cycle; updates at the clock edge,
// clear has priority. Size, associativity, the SSN field and the flash
// clear follow the SVW proposal; the hash, LRU replacement, the register-free
// invalidation and the port counts are this design's choices.
module integration_table
  import svw_pkg::*;
#(
  parameter int ENTRIES = IT_ENTRIES,
  parameter int WAYS    = IT_WAYS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,       // SSN_RENAME wrapped
  // lookup
  input  it_sig_t           lk_sig,
  output logic              lk_hit,
  output logic [PREG_W-1:0] lk_preg,
  output ssn_t              lk_ssn,
  // insert
  input  logic              ins_en,
  input  it_sig_t           ins_sig,
  input  logic [PREG_W-1:0] ins_preg,
  input  ssn_t              ins_ssn,     // SSN_RENAME at rename
  // physical register freed
  input  logic              free_en,
  input  logic [PREG_W-1:0] free_preg
);
  localparam int SETS = ENTRIES / WAYS;
  localparam int SW   = $clog2(SETS);
  localparam int WW   = $clog2(WAYS > 1 ? WAYS : 2);

  typedef struct packed {
    logic              valid;
    it_sig_t           sig;
    logic [PREG_W-1:0] preg;
    ssn_t              ssn;
  } it_entry_t;

  it_entry_t        tab_q [SETS][WAYS];
  logic [WW-1:0]    lru_q [SETS];          // way to replace next

  function automatic logic [SW-1:0] set_of(it_sig_t s);
    logic [$bits(it_sig_t)-1:0] b;
    logic [SW-1:0] h;
    b = s;
    h = '0;
    for (int i = 0; i < $bits(it_sig_t); i++) h[i % SW] ^= b[i];
    return h;
  endfunction

  // lookup
  always_comb begin
    logic [SW-1:0] s;
    s = set_of(lk_sig);
    lk_hit  = 1'b0;
    lk_preg = '0;
    lk_ssn  = '0;
    for (int w = 0; w < WAYS; w++)
      if (tab_q[s][w].valid && tab_q[s][w].sig == lk_sig) begin
        lk_hit  = 1'b1;
        lk_preg = tab_q[s][w].preg;
        lk_ssn  = tab_q[s][w].ssn;
      end
  end

  // insert: choose the way
  logic [SW-1:0] ins_set;
  logic [WW-1:0] ins_way;
  always_comb begin
    logic found;
    ins_set = set_of(ins_sig);
    ins_way = lru_q[ins_set];
    found   = 1'b0;
    for (int w = WAYS-1; w >= 0; w--)
      if (!tab_q[ins_set][w].valid) ins_way = WW'(w);
    for (int w = 0; w < WAYS; w++)
      if (!found && tab_q[ins_set][w].valid && tab_q[ins_set][w].sig == ins_sig) begin
        ins_way = WW'(w);
        found   = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        lru_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) tab_q[s][w] <= '0;
      end
    end else if (clear) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) tab_q[s][w].valid <= 1'b0;
    end else begin
      if (free_en)
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++)
            if (tab_q[s][w].preg == free_preg) tab_q[s][w].valid <= 1'b0;
      if (ins_en) begin
        tab_q[ins_set][ins_way] <= '{valid: 1'b1, sig: ins_sig,
                                     preg: ins_preg, ssn: ins_ssn};
        lru_q[ins_set] <= WW'((int'(ins_way) + 1) % WAYS);
      end
    end
  end

endmodule
