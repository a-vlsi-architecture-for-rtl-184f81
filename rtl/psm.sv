// psm: PSM processor - robust affine motion estimation of every region of a
// divided image at once (pseudo M-estimator, eq. (3)-(4)).
//
// Work of one divided image, started by `start` with the initial models and
// the set of labels in use (from the region table):
//   for each pyramid level, coarse (half resolution) to fine:
//     repeat ITER times:
//       ACC    : one pass over the pixels of the level. For each pixel, its
//                label (label map at the full-resolution position) selects the
//                model, the common element gives Ix, Iy and the residual, Make
//                Matrix forms w*chi^T*chi and w*chi^T*y, and the Gradient
//                Matrix Memory adds them to the normal equations of that label.
//       SOLVE  : for each label in use, Inverse Matrix and Motion Model/Update
//                turn its G and Gs into a model increment.
//       WEIGHT : one pass computing every pixel's weight under the new models
//                (Weight Calculation) into the write weight memory; then the
//                two weight memories (A/B) swap.
// The weight read for a pixel (IPW, weight interpolation) is the one stored at
// the pixel itself, or at its parent pixel when the weights were last written
// at the coarser level (nearest neighbour). Before the first WEIGHT pass all
// weights are 1. Because all regions share the pass, the pixel pipeline
// carries the label and every region's equations sit in their own entry of
// the Gradient Matrix Memory: the regions are estimated concurrently.
// Memory ports: label map (full-resolution raster address, 1-cycle latency),
// first image I and second image J of the current level (level raster,
// 1-cycle latency, J with four read ports). One pixel enters the pipeline per
// cycle; `done` pulses when the final models are on `models`.
// The published architecture gives the blocks and their connections (figures of the PSM
// processor and of the Motion Model Calculation); the iteration schedule, the
// number of levels and iterations and the weight rule are this design's.
module psm
  import seg_pkg::*;
#(
  parameter int ITER = 2,
  parameter int C_TH = 16,
  parameter int AW   = 2*LOGB
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  models_t          init_models,
  input  logic [NLAB-1:0]  active,
  // label map
  output logic [AW-1:0]    lab_addr,
  input  lmap_t            lab_data,
  // images of the current level
  output logic             lev,
  output logic [AW-1:0]    i_addr,
  input  logic [7:0]       i_pix,
  output logic [3:0][AW-1:0] j_addr,
  input  logic [3:0][7:0]  j_pix,
  // result
  output logic             busy,
  output logic             done,
  output models_t          models,
  // activity counters for test and monitoring
  output logic [15:0]      n_solve,
  output logic [15:0]      n_singular
);

  localparam int DRAIN = 6;

  typedef enum logic [2:0] {P_IDLE, P_ACC, P_DRAIN_A, P_SOLVE, P_WEIGHT, P_DRAIN_W, P_DONE} pstate_t;
  pstate_t st;

  logic [LOGB-1:0] xl, yl;                // pixel counter at the level
  logic [$clog2(ITER+1)-1:0] it;
  logic [3:0]      dcnt;
  logic            wbank;                 // weight memory written by WEIGHT
  logic            w_valid;               // weights exist
  logic            wlev;                  // level the weights were written at
  label_t          rsel;                  // region being solved
  logic [1:0]      sstep;

  logic [LOGB-1:0] wmax;
  assign wmax = lev ? LOGB'(BLK/2 - 1) : LOGB'(BLK - 1);

  logic issue, last_pix;
  assign issue    = (st == P_ACC) || (st == P_WEIGHT);
  assign last_pix = (xl == wmax) && (yl == wmax);

  // ---- stage 0: label and weight (IPW) reads -------------------------------
  logic [LOGB-1:0] xf, yf, xw, yw;
  assign xf = lev ? {xl[LOGB-2:0], 1'b0} : xl;
  assign yf = lev ? {yl[LOGB-2:0], 1'b0} : yl;
  assign xw = (wlev && !lev) ? {xf[LOGB-1:1], 1'b0} : xf;
  assign yw = (wlev && !lev) ? {yf[LOGB-1:1], 1'b0} : yf;
  assign lab_addr = {yf, xf};

  logic [0:0] wr_rd [2];
  logic       w_we, w_bit;
  logic [AW-1:0] w_waddr;
  for (genvar b = 0; b < 2; b++) begin : g_wmem
    seg_ram #(.DW(1), .DEPTH(BLK*BLK), .NRD(1)) u_wmem (
      .clk, .we(w_we && (wbank == 1'(b))), .wr_addr(w_waddr), .wr_data(w_bit),
      .rd_addr({yw, xw}), .rd_data(wr_rd[b]));
  end

  logic s1_v, s1_lev;
  logic [LOGB-1:0] s1_xl, s1_yl, s1_xf, s1_yf;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_lev <= 1'b0; s1_xl <= '0; s1_yl <= '0; s1_xf <= '0; s1_yf <= '0;
    end else begin
      s1_v <= issue; s1_lev <= lev; s1_xl <= xl; s1_yl <= yl; s1_xf <= xf; s1_yf <= yf;
    end
  end

  // ---- stage 1: model select, common element --------------------------------
  label_t s1_lab;
  logic   s1_w;
  assign s1_lab = lab_data.cur;
  assign s1_w   = w_valid ? wr_rd[~wbank] : 1'b1;
  assign i_addr = s1_lev ? AW'({s1_yl[LOGB-2:0], s1_xl[LOGB-2:0]}) : AW'({s1_yl, s1_xl});

  localparam int TW = 1 + LW + 2*LOGB;
  logic [TW-1:0] ce_tag;
  logic          ce_v, ce_in;
  logic signed [15:0] ce_ix, ce_iy, ce_dfd;
  logic [7:0]    ce_o, ce_is;

  ce #(.TW(TW), .AW(AW)) u_ce (
    .clk, .rst_n, .in_valid(s1_v), .xl(s1_xl), .yl(s1_yl), .lev(s1_lev),
    .theta(models[s1_lab]), .tag_in({s1_w, s1_lab, s1_xf, s1_yf}),
    .j_addr(j_addr), .j_pix(j_pix), .i_pix(i_pix),
    .out_valid(ce_v), .tag_out(ce_tag), .in_blk(ce_in),
    .ix(ce_ix), .iy(ce_iy), .dfd(ce_dfd), .o(ce_o), .is_o(ce_is));

  logic            t_w;
  label_t          t_lab;
  logic [LOGB-1:0] t_x, t_y;
  assign {t_w, t_lab, t_x, t_y} = ce_tag;

  // ---- stage 3: make matrix / weight calculation ---------------------------
  logic  mm_v;
  label_t mm_lab;
  gtri_t mm_g;
  gvec_t mm_gs;
  make_matrix u_mm (
    .clk, .rst_n, .in_valid(ce_v && st != P_DRAIN_W && st != P_WEIGHT),
    .w(t_w && ce_in && active[t_lab]), .label_in(t_lab), .x(t_x), .y(t_y),
    .ix(ce_ix), .iy(ce_iy), .dfd(ce_dfd),
    .out_valid(mm_v), .label_out(mm_lab), .g_terms(mm_g), .gs_terms(mm_gs));

  weight_calc #(.C_TH(C_TH), .AW(AW)) u_wc (
    .clk, .rst_n, .in_valid(ce_v && (st == P_WEIGHT || st == P_DRAIN_W)),
    .addr_in({t_y, t_x}), .in_blk(ce_in), .active(active[t_lab]), .dfd(ce_dfd),
    .out_valid(w_we), .addr_out(w_waddr), .w(w_bit));

  // ---- gradient matrix memory and solver ------------------------------------
  gmat_t g_sel;
  gvec_t gs_sel;
  grad_mat_mem u_gmm (
    .clk, .rst_n, .clr(st == P_IDLE || (st == P_SOLVE && sstep == 2'd3 && rsel == LW'(NLAB-1))),
    .acc_valid(mm_v), .acc_label(mm_lab), .g_terms(mm_g), .gs_terms(mm_gs),
    .rd_label(rsel), .rd_g(g_sel), .rd_gs(gs_sel));

  logic inv_start, inv_busy, inv_done, inv_sing;
  logic [NPRM-1:0][5:0] inv_sc;
  logic signed [NPRM-1:0][NPRM-1:0][95:0] inv_m;
  inv_matrix u_inv (
    .clk, .rst_n, .start(inv_start), .g(g_sel), .busy(inv_busy), .done(inv_done),
    .singular(inv_sing), .sc(inv_sc), .inv(inv_m));

  logic mu_start, mu_done;
  theta_t mu_theta, mu_dtheta;
  motion_update u_mu (
    .clk, .rst_n, .start(mu_start), .singular(inv_sing), .sc(inv_sc), .inv(inv_m),
    .gs(gs_sel), .theta_in(models[rsel]), .done(mu_done), .theta_out(mu_theta),
    .dtheta(mu_dtheta));

  assign inv_start = (st == P_SOLVE) && (sstep == 2'd0) && active[rsel];
  assign mu_start  = (st == P_SOLVE) && (sstep == 2'd1) && inv_done;
  assign busy      = (st != P_IDLE);

  // ---- sequencing ----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; xl <= '0; yl <= '0; it <= '0; dcnt <= '0; lev <= 1'b1;
      wbank <= 1'b0; w_valid <= 1'b0; wlev <= 1'b1; rsel <= '0; sstep <= '0;
      done <= 1'b0; models <= '0; n_solve <= '0; n_singular <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        P_IDLE: if (start) begin
          models <= init_models;
          lev <= 1'(NLEV - 1); it <= '0; xl <= '0; yl <= '0;
          w_valid <= 1'b0; wbank <= 1'b0; wlev <= 1'(NLEV - 1);
          st <= P_ACC;
        end
        P_ACC, P_WEIGHT: begin
          if (last_pix) begin
            xl <= '0; yl <= '0; dcnt <= '0;
            st <= (st == P_ACC) ? P_DRAIN_A : P_DRAIN_W;
          end else if (xl == wmax) begin
            xl <= '0; yl <= yl + 1'b1;
          end else xl <= xl + 1'b1;
        end
        P_DRAIN_A: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 4'(DRAIN)) begin
            rsel <= '0; sstep <= '0; st <= P_SOLVE;
          end
        end
        P_SOLVE: begin
          case (sstep)
            2'd0: sstep <= active[rsel] ? 2'd1 : 2'd3;
            2'd1: if (inv_done) begin
              sstep <= 2'd2;
              n_solve <= n_solve + 1'b1;
              if (inv_sing) n_singular <= n_singular + 1'b1;
            end
            2'd2: if (mu_done) begin
              models[rsel] <= mu_theta;
              sstep <= 2'd3;
            end
            default: begin
              sstep <= '0;
              if (rsel == LW'(NLAB-1)) st <= P_WEIGHT;
              else rsel <= rsel + 1'b1;
            end
          endcase
        end
        P_DRAIN_W: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 4'(DRAIN)) begin
            wbank <= ~wbank; w_valid <= 1'b1; wlev <= lev;
            if (it == $bits(it)'(ITER - 1)) begin
              it <= '0;
              if (lev == 1'b0) st <= P_DONE;
              else begin
                lev <= 1'b0; st <= P_ACC;
              end
            end else begin
              it <= it + 1'b1; st <= P_ACC;
            end
          end
        end
        P_DONE: begin
          done <= 1'b1; st <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

endmodule
