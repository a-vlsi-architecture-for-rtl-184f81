// motion_update: Motion Model and Update - solves eq. (4) for one region and
// applies the increment to its model.
//
// The increment is dtheta = G^-1 * Gs. With the inverse delivered by
// inv_matrix as inv = (D*G*D)^-1 in Q(FRAC), D = diag(2^-sc), it is formed as
//   dtheta_k = (sum_j (inv[k][j] * Gs[j]) >> sc[j]) >> (FRAC - QF + sc[k])
// by NPRM multiply-accumulators working over j, one column per cycle, so the
// result is ready NPRM+1 cycles after `start` (done pulses once). Update then
// adds the increment to theta_in (the estimate the residuals were taken with).
// A singular system leaves the model unchanged. The published architecture gives the two
// blocks and their inputs; the fixed-point scaling is this design's choice.
module motion_update
  import seg_pkg::*;
#(
  parameter int W    = 96,
  parameter int FRAC = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        singular,
  input  logic [NPRM-1:0][5:0] sc,
  input  logic signed [NPRM-1:0][NPRM-1:0][W-1:0] inv,
  input  gvec_t       gs,
  input  theta_t      theta_in,
  output logic        done,
  output theta_t      theta_out,
  output theta_t      dtheta
);

  localparam int SW = W + GW + 4;
  typedef logic signed [SW-1:0] sum_t;

  sum_t sum [NPRM];
  logic [$clog2(NPRM+1)-1:0] c;
  logic run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; c <= '0; done <= 1'b0; theta_out <= '0; dtheta <= '0;
      for (int k = 0; k < NPRM; k++) sum[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run <= 1'b1; c <= '0;
        for (int k = 0; k < NPRM; k++) sum[k] <= '0;
      end else if (run) begin
        if (c < $bits(c)'(NPRM)) begin
          for (int k = 0; k < NPRM; k++)
            sum[k] <= sum[k] + ((sum_t'($signed(inv[k][c])) * sum_t'(gs[c])) >>> sc[c]);
          c <= c + 1'b1;
        end else begin
          for (int k = 0; k < NPRM; k++) begin
            prm_t d;
            d = singular ? '0 : prm_t'(sum[k] >>> (FRAC - QF + int'(sc[k])));
            dtheta[k]    <= d;
            theta_out[k] <= theta_in[k] + d;
          end
          run <= 1'b0; done <= 1'b1;
        end
      end
    end
  end

endmodule
