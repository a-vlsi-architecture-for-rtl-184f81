// make_matrix: Make Matrix - one pixel's contribution to the normal equations.
//
// From the gradients (ix, iy), the residual dfd and the full-resolution pixel
// position it forms the regressor of eq. (4)
//   chi = (Ix, Ix*xc, Ix*yc, Iy, Iy*xc, Iy*yc, 1),   y = -It,
// with xc, yc centred on the divided image, and outputs w*chi^T*chi (upper
// triangle, NT terms) and w*chi^T*y. All inputs are in quarter grey levels, so
// the constant regressor entry is 4 and the solution keeps its natural units.
// The weight is binary: a pixel with w = 0 contributes zeros.
// One pixel per cycle, one cycle latency; label travels with the terms.
module make_matrix
  import seg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               w,
  input  label_t             label_in,
  input  logic [LOGB-1:0]    x,
  input  logic [LOGB-1:0]    y,
  input  logic signed [15:0] ix,
  input  logic signed [15:0] iy,
  input  logic signed [15:0] dfd,
  output logic               out_valid,
  output label_t             label_out,
  output gtri_t              g_terms,
  output gvec_t              gs_terms
);

  acc_t chi [NPRM];
  acc_t yv;

  always_comb begin
    acc_t xc, yc;
    xc = acc_t'($signed({1'b0, x})) - (acc_t'(BLK) >>> 1);
    yc = acc_t'($signed({1'b0, y})) - (acc_t'(BLK) >>> 1);
    chi[0] = acc_t'(ix);
    chi[1] = acc_t'(ix) * xc;
    chi[2] = acc_t'(ix) * yc;
    chi[3] = acc_t'(iy);
    chi[4] = acc_t'(iy) * xc;
    chi[5] = acc_t'(iy) * yc;
    chi[6] = acc_t'(4);
    yv     = -acc_t'(dfd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; label_out <= '0; g_terms <= '0; gs_terms <= '0;
    end else begin
      out_valid <= in_valid;
      label_out <= label_in;
      for (int i = 0; i < NPRM; i++) begin
        gs_terms[i] <= w ? chi[i] * yv : '0;
        for (int j = i; j < NPRM; j++)
          g_terms[tri_idx(i, j)] <= w ? chi[i] * chi[j] : '0;
      end
    end
  end

endmodule
