// tb_ssn_counters: self-checking test of the SSN counters. Random store
// renames (0..2 per cycle), retirements and occasional flushes run for more
// than one full 16-bit wrap-around. A reference model tracks both counters
// and the expected wrap pulse; at least one wrap must be observed.
module tb_ssn_counters;
  import svw_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [1:0] ren_cnt;
  logic       ret_store, flush;
  ssn_t       flush_ssn, ssn_rename, ssn_retire;
  logic       rename_wrap;
  int         ref_ren, ref_ret, inflight, wraps;
  int checks = 0, failures = 0;

  ssn_counters #(.REN(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ren_cnt = 0; ret_store = 0; flush = 0; flush_ssn = '0;
    ref_ren = 0; ref_ret = 0; inflight = 0; wraps = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 150000; it++) begin
      @(negedge clk);
      checks++;
      if (ssn_rename !== ssn_t'(ref_ren) || ssn_retire !== ssn_t'(ref_ret)) begin
        failures++;
        $display("counter mismatch ren %0d/%0d ret %0d/%0d", ssn_rename, ssn_t'(ref_ren),
                 ssn_retire, ssn_t'(ref_ret));
      end
      ren_cnt   = 2'($urandom % 3);
      ret_store = inflight > 0 && ($urandom % 4) != 0;
      flush     = ($urandom % 500) == 0;
      // flush keeps the stores that are old enough; ret may retire one of them
      flush_ssn = ssn_t'(ref_ret + (inflight > 0 ? (inflight + 1) / 2 : 0));
      #1;
      begin
        int nxt; logic exp_wrap;
        if (flush) begin
          nxt = int'(flush_ssn);
          exp_wrap = flush_ssn > ssn_t'(ref_ren);
        end else begin
          nxt = (ref_ren + int'(ren_cnt)) % 65536;
          exp_wrap = ssn_t'(nxt) < ssn_t'(ref_ren);
        end
        checks++;
        if (rename_wrap !== exp_wrap) begin
          failures++;
          $display("wrap mismatch at ren %0d cnt %0d", ref_ren, ren_cnt);
        end
        if (rename_wrap) wraps++;
        @(posedge clk);
        if (flush) inflight = (inflight + 1) / 2;
        else inflight += int'(ren_cnt);
        if (ret_store) begin ref_ret = (ref_ret + 1) % 65536; inflight--; end
        ref_ren = nxt;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no SSN wrap-around observed"); end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
