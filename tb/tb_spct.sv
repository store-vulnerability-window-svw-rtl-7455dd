// tb_spct: self-checking test of the store PC table. Random store
// retirements write PCs; random reads by load address are compared with a
// reference array of the last PC written per index.
module tb_spct;
  import svw_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        wr_en;
  addr_t       wr_addr, rd_addr;
  logic [63:0] wr_pc, rd_pc;
  logic [63:0] ref_tab [512];
  int checks = 0, failures = 0;

  spct dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 512; e++) ref_tab[e] = '0;
    wr_en = 0; wr_addr = '0; wr_pc = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      wr_en   = ($urandom % 3) != 0;
      wr_addr = {$urandom, $urandom};
      wr_pc   = {$urandom, $urandom};
      rd_addr = (it % 4 == 0) ? wr_addr : {$urandom, $urandom};
      #1;
      checks++;
      if (rd_pc !== ref_tab[rd_addr[11:3]]) begin
        failures++;
        $display("pc mismatch idx %0d got %h exp %h", rd_addr[11:3], rd_pc, ref_tab[rd_addr[11:3]]);
      end
      @(posedge clk);
      if (wr_en) ref_tab[wr_addr[11:3]] = wr_pc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
