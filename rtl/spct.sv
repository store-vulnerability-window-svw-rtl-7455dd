// spct: store PC table.
//
// A small tagless table indexed by low-order address bits; each entry
// holds the PC of the last retired store that wrote to any address mapping
// to it. When re-execution finds that a load got a wrong value, the load's
// address reads back the PC of the store that most likely caused it, so
// that the store (and the load) can be marked for a store-load dependence
// predictor such as store sets, or for steering to a forwarding store queue.
//
// Interface: one write per cycle at store retirement (the single retirement
// port), one combinational read. Writes take effect at the clock edge; a
// read in the same cycle sees the old contents. Reset clears the table.
//
// The organisation (tagless, low-order address bits, last retired store)
// follows the SVW proposal. The entry count, the 8-byte index granularity and
// the PC width are this design's choices: the SVW proposal gives no size.
module spct
  import svw_pkg::*;
#(
  parameter int ENTRIES = 512,
  parameter int GRAN    = WORD_GRAN,
  parameter int PC_W    = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,      // store retires
  input  addr_t           wr_addr,
  input  logic [PC_W-1:0] wr_pc,
  input  addr_t           rd_addr,    // address of the mis-speculated load
  output logic [PC_W-1:0] rd_pc
);
  localparam int IW = $clog2(ENTRIES);

  logic [PC_W-1:0] pc_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) pc_q[e] <= '0;
    end else if (wr_en) begin
      pc_q[wr_addr[GRAN +: IW]] <= wr_pc;
    end
  end

  assign rd_pc = pc_q[rd_addr[GRAN +: IW]];

endmodule
