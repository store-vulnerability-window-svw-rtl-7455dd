// ssbf: store sequence Bloom filter.
//
// A small tagless table indexed by low-order address bits. Each entry holds
// the SSN of the last store (in SVW-stage order) that wrote to any address
// mapping to it. Because SSNs only grow, a stale or aliased entry can only
// over-state a conflict, never hide one. The same module serves as SSBF_SM,
// the coherence-invalidation filter, by setting GRAN to the line size.
//
// Interface: WR write ports and RD read ports per cycle. Write port i is
// older than write port i+1; when two ports hit the same entry in a cycle
// the higher-numbered (younger) one wins. Reads are combinational and see
// the table as it was at the start of the cycle; the caller bypasses
// same-cycle writes if it needs them. Reset clears every entry to SSN 0.
//
// The table organisation (tagless, low-order index bits, 512 entries of
// 16 bits) follows the baseline configuration; the port counts default to
// two reads and two writes to match two loads and two stores per cycle.
// The index granularity is a parameter of this design.
module ssbf
  import svw_pkg::*;
#(
  parameter int ENTRIES = SSBF_ENTRIES,
  parameter int GRAN    = WORD_GRAN,
  parameter int RD      = 2,
  parameter int WR      = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en   [WR],
  input  addr_t wr_addr [WR],
  input  ssn_t  wr_ssn  [WR],
  input  addr_t rd_addr [RD],
  output ssn_t  rd_ssn  [RD]
);
  localparam int IW = $clog2(ENTRIES);

  ssn_t table_q [ENTRIES];

  function automatic logic [IW-1:0] idx(addr_t a);
    return a[GRAN +: IW];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) table_q[e] <= '0;
    end else begin
      for (int w = 0; w < WR; w++)
        if (wr_en[w]) table_q[idx(wr_addr[w])] <= wr_ssn[w];
    end
  end

  always_comb
    for (int r = 0; r < RD; r++) rd_ssn[r] = table_q[idx(rd_addr[r])];

endmodule
