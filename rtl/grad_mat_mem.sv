// grad_mat_mem: Gradient Matrix Memory - per-region accumulators of G and Gs.
//
// Holds one set of normal equations (NT upper-triangle entries of G and the
// NPRM entries of Gs) for each of the NLAB regions of a divided image, so that
// the motion models of all regions are estimated in the same pass over the
// pixels. Each valid input adds the pixel's terms to the set selected by its
// label (input select); `clr` zeroes every set. The read side selects one set
// by rd_label (output select) and returns G expanded to a full symmetric
// matrix, combinationally. The published architecture gives the memory, its four entries
// G0/Gs0..G3/Gs3 and the two selectors; its organisation as registers is this
// design's choice.
module grad_mat_mem
  import seg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    acc_valid,
  input  label_t  acc_label,
  input  gtri_t   g_terms,
  input  gvec_t   gs_terms,
  input  label_t  rd_label,
  output gmat_t   rd_g,
  output gvec_t   rd_gs
);

  gtri_t g_mem  [NLAB];
  gvec_t gs_mem [NLAB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NLAB; r++) begin
        g_mem[r] <= '0; gs_mem[r] <= '0;
      end
    end else if (clr) begin
      for (int r = 0; r < NLAB; r++) begin
        g_mem[r] <= '0; gs_mem[r] <= '0;
      end
    end else if (acc_valid) begin
      for (int k = 0; k < NT; k++)   g_mem[acc_label][k]  <= g_mem[acc_label][k]  + g_terms[k];
      for (int k = 0; k < NPRM; k++) gs_mem[acc_label][k] <= gs_mem[acc_label][k] + gs_terms[k];
    end
  end

  always_comb begin
    for (int i = 0; i < NPRM; i++) begin
      rd_gs[i] = gs_mem[rd_label][i];
      for (int j = 0; j < NPRM; j++) rd_g[i][j] = g_mem[rd_label][tri_idx(i, j)];
    end
  end

endmodule
