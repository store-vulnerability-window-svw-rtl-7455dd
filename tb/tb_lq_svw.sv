// tb_lq_svw: self-checking test of the per-load SVW field. Random
// dispatches (normal and eliminated loads, filter on/off) and forwarding
// updates are applied to a reference model: SSN_RETIRE at dispatch,
// MIN(IT SSN, SSN_RETIRE) for eliminated loads, the forwarding store's SSN
// on forwarding (forwarding wins over a same-cycle dispatch). Every cycle
// both read ports are compared with the model.
module tb_lq_svw;
  import svw_pkg::*;
  localparam int E = 128, IW = 7;
  logic          clk = 0, rst_n = 0;
  ssn_t          ssn_retire;
  logic          disp_en [2], disp_elim [2], disp_filt_ok [2];
  logic [IW-1:0] disp_idx [2];
  ssn_t          disp_it_ssn [2];
  logic          fwd_en [2];
  logic [IW-1:0] fwd_idx [2];
  ssn_t          fwd_ssn [2];
  logic [IW-1:0] rd_idx [2];
  ssn_t          rd_svw [2];
  logic          rd_filt_ok [2];
  ssn_t          m_svw [E];
  logic          m_filt [E];
  int checks = 0, failures = 0, n_elim_min = 0;

  lq_svw #(.ENTRIES(E), .DISP(2), .FWD(2), .RD(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < E; e++) begin m_svw[e] = '0; m_filt[e] = 0; end
    ssn_retire = 16'd1000;
    for (int p = 0; p < 2; p++) begin
      disp_en[p] = 0; disp_elim[p] = 0; disp_filt_ok[p] = 0; disp_idx[p] = '0;
      disp_it_ssn[p] = '0; fwd_en[p] = 0; fwd_idx[p] = '0; fwd_ssn[p] = '0; rd_idx[p] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      ssn_retire = ssn_t'(ssn_retire + ($urandom % 3));
      for (int p = 0; p < 2; p++) begin
        disp_en[p]      = ($urandom % 2) == 0;
        disp_idx[p]     = IW'($urandom);
        disp_elim[p]    = ($urandom % 3) == 0;
        disp_it_ssn[p]  = ssn_t'(ssn_retire - 200 + ($urandom % 400));
        disp_filt_ok[p] = ($urandom % 5) != 0;
        fwd_en[p]       = ($urandom % 3) == 0;
        fwd_idx[p]      = (it % 7 == 0) ? disp_idx[p] : IW'($urandom);
        fwd_ssn[p]      = ssn_t'(ssn_retire + 1 + ($urandom % 64));
        rd_idx[p]       = IW'($urandom);
      end
      if (it % 4 == 0) rd_idx[0] = disp_idx[0];
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rd_svw[p] !== m_svw[rd_idx[p]] || rd_filt_ok[p] !== m_filt[rd_idx[p]]) begin
          failures++;
          $display("entry %0d svw %0d exp %0d", rd_idx[p], rd_svw[p], m_svw[rd_idx[p]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < 2; p++)
        if (disp_en[p]) begin
          if (disp_elim[p] && disp_it_ssn[p] < ssn_retire) begin
            m_svw[disp_idx[p]] = disp_it_ssn[p];
            n_elim_min++;
          end else m_svw[disp_idx[p]] = ssn_retire;
          m_filt[disp_idx[p]] = disp_filt_ok[p];
        end
      for (int p = 0; p < 2; p++)
        if (fwd_en[p]) m_svw[fwd_idx[p]] = fwd_ssn[p];
    end
    checks++;
    if (n_elim_min == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
