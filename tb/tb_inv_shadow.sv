// tb_inv_shadow: self-checking test of the invalidation shadow. Loads are
// allocated at the tail and retired at the head at random; invalidations
// arrive at random. The reference model marks every load present at an
// invalidation and unmarks it when it retires; every cycle the shadow flag
// of random indices is compared with the marks. Full-queue and
// empty-queue invalidations are included.
module tb_inv_shadow;
  localparam int N = 128, IW = 7, PW = 8, L = 2;
  logic          clk = 0, rst_n = 0, inv_en = 0, active;
  logic [PW-1:0] lq_head = '0, lq_tail = '0;
  logic [IW-1:0] idx [L];
  logic          in_shadow [L];
  bit            mark [N];
  int checks = 0, failures = 0, shadow_hits = 0, full_invs = 0;

  inv_shadow #(.ENTRIES(N), .LANES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < N; e++) mark[e] = 0;
    idx[0] = '0; idx[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      int occ;
      bit alloc, ret;
      @(negedge clk);
      occ = int'(PW'(lq_tail - lq_head));
      // phases: fill up, then drain, so that full and empty both happen
      alloc = occ < N && (((it / 2000) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0));
      ret   = occ > 0 && !alloc && ($urandom % 2 == 0);
      inv_en = ($urandom % 50) == 0;
      if (inv_en && occ == N) full_invs++;
      for (int l = 0; l < L; l++) begin
        idx[l] = IW'($urandom);
        if (l == 0 && occ > 0) idx[l] = IW'(lq_head + ($urandom % occ));
      end
      #1;
      for (int l = 0; l < L; l++) begin
        checks++;
        if (in_shadow[l] !== mark[idx[l]]) begin
          failures++;
          $display("idx %0d shadow %0b expected %0b (head %0d tail %0d)", idx[l], in_shadow[l],
                   mark[idx[l]], lq_head, lq_tail);
        end
        if (in_shadow[l]) shadow_hits++;
      end
      @(posedge clk);
      if (inv_en)
        for (int k = 0; k < occ; k++) mark[IW'(lq_head + k)] = 1;
      #1;
      if (ret) begin mark[lq_head[IW-1:0]] = 0; lq_head = lq_head + 1'b1; end
      if (alloc) begin mark[lq_tail[IW-1:0]] = 0; lq_tail = lq_tail + 1'b1; end
    end
    checks++;
    if (shadow_hits == 0 || full_invs == 0) begin
      failures++; $display("shadow hits %0d full-queue invalidations %0d", shadow_hits, full_invs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
