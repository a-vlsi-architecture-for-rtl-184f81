// inv_matrix: Inverse Matrix - inverse of the 7x7 gradient matrix G.
//
// G is symmetric positive (semi)definite, so Gauss-Jordan elimination without
// pivoting is used on the augmented matrix [G | I], held as W-bit signed
// fixed point with FRAC fraction bits. On `start`, G is first equilibrated by
// powers of two: with sc[i] = ceil(bits(G(i,i)) / 2) and D = diag(2^-sc[i]),
// G' = D*G*D (diagonal in [1/4, 1), all entries below 1 in magnitude) enters
// the elimination, so that rows of very different scale (the parameters
// weighted by the pixel position against the luminance term) keep the same
// relative precision. For each row i one reciprocal of the
// pivot is formed by the sequential divider (W cycles), the row is scaled by
// it (2*NPRM cycles) and eliminated from the other rows (2*NPRM cycles each),
// one multiply per cycle: about NPRM*(W + 2 + 2*NPRM*NPRM) cycles in all.
// On `done`, inv holds (G')^-1 in Q(FRAC), so G^-1 = D * inv * D. A pivot that
// is not positive (a region with no or degenerate pixels) ends the run with
// `singular` set. The published architecture gives the block and its output InvG; the
// algorithm and the number formats are this design's.
module inv_matrix
  import seg_pkg::*;
#(
  parameter int W    = 96,
  parameter int FRAC = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  gmat_t                  g,
  output logic                   busy,
  output logic                   done,
  output logic                   singular,
  output logic [NPRM-1:0][5:0]   sc,
  output logic signed [NPRM-1:0][NPRM-1:0][W-1:0] inv
);

  localparam int NC = 2*NPRM;
  typedef logic signed [W-1:0] fx_t;

  typedef enum logic [2:0] {S_IDLE, S_PIV, S_DIV, S_SCALE, S_ELIM} state_t;
  state_t st;

  fx_t  m [NPRM][NC];                     // augmented matrix [G' | inverse]
  fx_t  recip, f;
  logic [$clog2(NPRM)-1:0] i, j;
  logic [$clog2(NC)-1:0]   k;

  // equilibration exponents from the diagonal
  logic [NPRM-1:0][5:0] e0;
  always_comb begin
    for (int d = 0; d < NPRM; d++) begin
      int len;
      len = 0;
      for (int b = 0; b < GW - 1; b++) if (g[d][d][b]) len = b + 1;
      e0[d] = 6'((len + 1) / 2);
    end
  end

  // reciprocal of the pivot: 2^(2*FRAC) / pivot, a Q(FRAC) number
  logic         div_start, div_busy, div_done;
  logic [W-1:0] div_q, div_r;
  seq_div #(.N(W)) u_div (
    .clk, .rst_n, .start(div_start),
    .num(W'(1) << (2*FRAC)), .den(m[i][{1'b0, i}]),
    .busy(div_busy), .done(div_done), .quo(div_q), .rem(div_r));

  function automatic fx_t fmul(fx_t a, fx_t b);
    logic signed [2*W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FRAC);
  endfunction

  assign busy = (st != S_IDLE);
  assign div_start = (st == S_PIV) && (m[i][{1'b0, i}] > 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0; singular <= 1'b0; sc <= '0;
      i <= '0; j <= '0; k <= '0; recip <= '0; f <= '0;
      for (int r = 0; r < NPRM; r++) for (int c = 0; c < NC; c++) m[r][c] <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          sc <= e0;
          singular <= 1'b0;
          for (int r = 0; r < NPRM; r++)
            for (int c = 0; c < NPRM; c++) begin
              m[r][c]        <= (fx_t'(g[r][c]) <<< FRAC) >>> (int'(e0[r]) + int'(e0[c]));
              m[r][c + NPRM] <= (r == c) ? (fx_t'(1) <<< FRAC) : '0;
            end
          i  <= '0;
          st <= S_PIV;
        end
        S_PIV: begin
          if (m[i][{1'b0, i}] > 0) st <= S_DIV;
          else begin
            singular <= 1'b1; done <= 1'b1; st <= S_IDLE;
          end
        end
        S_DIV: if (div_done) begin
          recip <= fx_t'(div_q);
          k <= '0;
          st <= S_SCALE;
        end
        S_SCALE: begin
          m[i][k] <= fmul(m[i][k], recip);
          if (k == $bits(k)'(NC-1)) begin
            k <= '0;
            j <= (i == 0) ? 1 : 0;
            f <= m[(i == 0) ? 1 : 0][{1'b0, i}];
            st <= S_ELIM;
          end else k <= k + 1'b1;
        end
        S_ELIM: begin
          m[j][k] <= m[j][k] - fmul(f, m[i][k]);
          if (k == $bits(k)'(NC-1)) begin
            logic [$clog2(NPRM)-1:0] jn;
            k  <= '0;
            jn = j + 1'b1;
            if (jn == i) jn = jn + 1'b1;
            if ({1'b0, jn} >= ($bits(jn)+1)'(NPRM)) begin
              if (i == $bits(i)'(NPRM-1)) begin
                done <= 1'b1; st <= S_IDLE;
              end else begin
                i <= i + 1'b1; st <= S_PIV;
              end
            end else begin
              j <= jn;
              f <= m[jn][{1'b0, i}];
            end
          end else k <= k + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb
    for (int r = 0; r < NPRM; r++)
      for (int c = 0; c < NPRM; c++) inv[r][c] = m[r][c + NPRM];

endmodule
