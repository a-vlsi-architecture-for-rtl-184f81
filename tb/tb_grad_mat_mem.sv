// tb_grad_mat_mem: self-checking test of the per-region accumulators.
// Random terms are added to random regions; after each batch every region's
// G (read back as a full symmetric matrix) and Gs are compared with sums kept
// by the testbench; a clear must zero every region.
module tb_grad_mat_mem;
  import seg_pkg::*;
  logic clk = 0, rst_n = 1, clr = 0, av = 0;
  label_t al, rl;
  gtri_t gt; gvec_t gst;
  gmat_t rg; gvec_t rgs;
  int checks = 0, failures = 0;
  longint sg [NLAB][NT], sgs [NLAB][NPRM];

  grad_mat_mem dut (.clk, .rst_n, .clr, .acc_valid(av), .acc_label(al), .g_terms(gt),
    .gs_terms(gst), .rd_label(rl), .rd_g(rg), .rd_gs(rgs));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic compare();
    for (int r = 0; r < NLAB; r++) begin
      rl = LW'(r); #1;
      for (int i = 0; i < NPRM; i++) begin
        checks++; if (rgs[i] != sgs[r][i]) failures++;
        for (int j = 0; j < NPRM; j++) begin
          checks++; if (rg[i][j] != sg[r][tri_idx(i, j)]) failures++;
        end
      end
    end
  endtask

  initial begin
    rl = '0; al = '0; gt = '0; gst = '0;
    foreach (sg[r, k]) sg[r][k] = 0;
    foreach (sgs[r, k]) sgs[r][k] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 3; b++) begin
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        av = ($urandom % 3) != 0; al = LW'($urandom);
        for (int k = 0; k < NT; k++) gt[k] = acc_t'($signed({$urandom, $urandom}) >>> 20);
        for (int k = 0; k < NPRM; k++) gst[k] = acc_t'($signed({$urandom, $urandom}) >>> 20);
        if (av) begin
          for (int k = 0; k < NT; k++) sg[al][k] += gt[k];
          for (int k = 0; k < NPRM; k++) sgs[al][k] += gst[k];
        end
      end
      @(negedge clk); av = 0;
      compare();
      if (b == 1) begin
        @(negedge clk); clr = 1; @(negedge clk); clr = 0;
        foreach (sg[r, k]) sg[r][k] = 0;
        foreach (sgs[r, k]) sgs[r][k] = 0;
        compare();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
