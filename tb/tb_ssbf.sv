// tb_ssbf: self-checking test of the store sequence Bloom filter.
// Random writes on both ports (including both ports to one entry, where the
// younger port must win) and random reads, compared with a reference array
// kept in the testbench. Also checks that reset leaves every entry at 0.
module tb_ssbf;
  import svw_pkg::*;
  localparam int ENTRIES = 512;
  localparam int RD = 2, WR = 2;

  logic  clk = 0, rst_n = 0;
  logic  wr_en [WR];
  addr_t wr_addr [WR];
  ssn_t  wr_ssn [WR];
  addr_t rd_addr [RD];
  ssn_t  rd_ssn [RD];
  ssn_t  ref_tab [ENTRIES];
  int checks = 0, failures = 0;

  ssbf #(.ENTRIES(ENTRIES), .GRAN(3), .RD(RD), .WR(WR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ix(addr_t a);
    return int'(a[3 +: 9]);
  endfunction

  initial begin
    for (int e = 0; e < ENTRIES; e++) ref_tab[e] = '0;
    for (int w = 0; w < WR; w++) begin wr_en[w] = 0; wr_addr[w] = '0; wr_ssn[w] = '0; end
    for (int r = 0; r < RD; r++) rd_addr[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // after reset every entry reads 0
    for (int e = 0; e < ENTRIES; e += 37) begin
      rd_addr[0] = addr_t'(e) << 3;
      #1;
      checks++;
      if (rd_ssn[0] !== '0) begin failures++; $display("reset entry %0d = %0d", e, rd_ssn[0]); end
    end
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      for (int w = 0; w < WR; w++) begin
        wr_en[w]   = ($urandom % 2) == 0;
        wr_addr[w] = {$urandom, $urandom};
        wr_ssn[w]  = ssn_t'($urandom);
      end
      if (it % 5 == 0) wr_addr[1][11:3] = wr_addr[0][11:3];   // same entry
      for (int r = 0; r < RD; r++) rd_addr[r] = {$urandom, $urandom};
      if (it % 3 == 0) rd_addr[0][11:3] = wr_addr[0][11:3];
      #1;
      // reads see the table before this cycle's writes
      for (int r = 0; r < RD; r++) begin
        checks++;
        if (rd_ssn[r] !== ref_tab[ix(rd_addr[r])]) begin
          failures++;
          $display("read mismatch port %0d idx %0d got %0d exp %0d", r, ix(rd_addr[r]),
                   rd_ssn[r], ref_tab[ix(rd_addr[r])]);
        end
      end
      @(posedge clk);
      for (int w = 0; w < WR; w++) if (wr_en[w]) ref_tab[ix(wr_addr[w])] = wr_ssn[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
