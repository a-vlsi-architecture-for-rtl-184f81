// vseg_top: video segmentation processor (motion segmentation with affine
// motion models, 640x480 frames cut into 128x128 divided images).
//
// Two pipeline stages work on consecutive divided images, each on its own
// bank of the on-chip memories (first image, second image, label map, region
// table and motion model registers, banks 0/1):
//   stage A  LOAD : reads the divided image's region table entry (labels in
//                   use and their models), then streams its 128x128 pixels of
//                   frame t (first image) and t+1 (second image) together with
//                   its predicted labels from the external VGA prediction map;
//                   the multi-resolution units build the half-size level.
//            PSM  : estimates the model of every region (psm).
//   stage B  UPD  : ICM relabelling of the region boundaries (upd_det, mode 0),
//            DET  : detection of a new non-conforming region (upd_det, mode 1),
//            PRED : projection of the labels into the prediction map for the
//                   next frame (prediction),
//            RT   : write-back of the region table entry.
// The sequence controller starts both stages together and swaps the banks
// when both are done, so the PSM of one divided image overlaps the Update,
// Detection and Prediction of the previous one.
// External interfaces (all with a fixed 1-cycle read latency, no stalls):
//   ld_*  : pixel source, frame-raster address out, both frames' pixels back;
//   pm_*  : prediction map, read by LOAD, written by PRED (label per pixel);
//   rt_*  : region table, one entry per divided image position.
// The published architecture gives the block diagram, the two-stage pipeline and the memory
// set; the load interface, the bank organisation of the label map and the
// release of emptied labels are this design's choices.
module vseg_top
  import seg_pkg::*;
#(
  parameter int ITER    = 2,
  parameter int C_TH    = 16,
  parameter int BETA    = 4,
  parameter int GAMMA   = 2,
  parameter int BETA_D  = 2,
  parameter int TH_MOB  = 8,
  parameter int ICM_MAX = 4,
  parameter int PAW     = $clog2(FRAME_W*FRAME_H),
  parameter int BW      = $clog2(NBLK)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  // pixel source
  output logic            ld_req,
  output logic [PAW-1:0]  ld_addr,
  input  logic [7:0]      ld_first,
  input  logic [7:0]      ld_second,
  // prediction map (external, VGA)
  output logic [PAW-1:0]  pm_raddr,
  input  label_t          pm_rdata,
  output logic            pm_we,
  output logic [PAW-1:0]  pm_waddr,
  output label_t          pm_wdata,
  // region table (external)
  output logic [BW-1:0]   rt_raddr,
  input  region_t         rt_rdata,
  output logic            rt_we,
  output logic [BW-1:0]   rt_waddr,
  output region_t         rt_wdata,
  // status
  output logic            blk_done,
  output logic [BW-1:0]   blk_done_idx,
  output logic [15:0]     frame,
  output logic            idle,
  output logic [31:0]     n_skip,
  output logic [31:0]     n_change,
  output logic [31:0]     n_mobile,
  output logic [15:0]     n_solve,
  output logic [15:0]     n_singular
);

  localparam int AW  = 2*LOGB;
  localparam int AW1 = 2*(LOGB-1);

  // ---------------------------------------------------------------- control
  logic bank, a_start, b_start, a_valid, b_valid, a_done, b_done;
  logic [BW-1:0] a_blk, b_blk;
  seq_ctrl #(.NBLK(NBLK)) u_seq (
    .clk, .rst_n, .run, .a_done, .b_done, .bank, .a_start, .b_start,
    .a_valid, .b_valid, .a_blk, .b_blk, .frame, .idle);

  function automatic logic [$clog2(BX)-1:0] blk_x(logic [BW-1:0] b);
    return $bits(blk_x(b))'(b % BX);
  endfunction
  function automatic logic [$clog2(BY)-1:0] blk_y(logic [BW-1:0] b);
    return $bits(blk_y(b))'(b / BX);
  endfunction

  // region table and motion model registers, banks 0/1
  logic [NLAB-1:0] act_r [2];
  models_t         mod_r [2];
  logic [NLAB-1:0] b_active_new;          // stage B's final labels in use
  logic            b_rt_upd;              // stage B updates its bank
  logic            mr_busy;

  // ---------------------------------------------------------------- stage A
  typedef enum logic [2:0] {A_IDLE, A_RT, A_LOAD, A_LWAIT, A_PSM} astate_t;
  astate_t ast;
  logic [AW-1:0] ld_cnt, ld_cnt1;
  logic          ld_v1;
  logic          ld_gy_ok1;

  logic            psm_start, psm_busy, psm_done, psm_lev;
  models_t         psm_models;
  logic [AW-1:0]   psm_lab_addr, psm_i_addr;
  logic [3:0][AW-1:0] psm_j_addr;
  logic [7:0]      psm_i_pix;
  logic [3:0][7:0] psm_j_pix;
  lmap_t           psm_lab;

  always_comb begin
    logic [LOGB-1:0] lx, ly;
    int gx, gy;
    lx = ld_cnt[LOGB-1:0];
    ly = ld_cnt[AW-1:LOGB];
    gx = int'(blk_x(a_blk)) * BLK + int'(lx);
    gy = int'(blk_y(a_blk)) * BLK + int'(ly);
    ld_req   = (ast == A_LOAD);
    ld_addr  = PAW'(gy * FRAME_W + gx);
    pm_raddr = ld_addr;
  end
  assign rt_raddr = a_blk;

  logic ld_first_row_ok;
  assign ld_first_row_ok = (int'(blk_y(a_blk)) * BLK + int'(ld_cnt[AW-1:LOGB])) < FRAME_H;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ast <= A_IDLE; ld_cnt <= '0; ld_cnt1 <= '0; ld_v1 <= 1'b0; ld_gy_ok1 <= 1'b0;
      psm_start <= 1'b0; a_done <= 1'b0;
      act_r[0] <= '0; act_r[1] <= '0; mod_r[0] <= '0; mod_r[1] <= '0;
    end else begin
      psm_start <= 1'b0;
      a_done    <= 1'b0;
      ld_v1     <= (ast == A_LOAD);
      ld_cnt1   <= ld_cnt;
      ld_gy_ok1 <= ld_first_row_ok;
      case (ast)
        A_IDLE: if (a_start) ast <= A_RT;
        A_RT: begin                               // rt_rdata valid now
          act_r[bank] <= rt_rdata.active;
          mod_r[bank] <= rt_rdata.model;
          ld_cnt <= '0;
          ast <= A_LOAD;
        end
        A_LOAD: begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == AW'(BLK*BLK-1)) ast <= A_LWAIT;
        end
        A_LWAIT: if (!ld_v1 && !mr_busy) begin
          psm_start <= 1'b1;
          ast <= A_PSM;
        end
        A_PSM: if (psm_done) begin
          mod_r[bank] <= psm_models;
          a_done <= 1'b1;
          ast <= A_IDLE;
        end
        default: ast <= A_IDLE;
      endcase
      // stage B write-back of the region table bank it owns
      if (b_rt_upd) begin
        act_r[~bank] <= b_active_new;
        for (int l = 0; l < NLAB; l++)
          if (b_active_new[l] && !act_r[~bank][l]) mod_r[~bank][l] <= '0;  // new region
      end
    end
  end

  // multi-resolution image creation A (first image) and B (second image)
  logic           mr_start;
  logic           mra_v, mrb_v;
  logic [AW1-1:0] mra_addr, mrb_addr;
  logic [7:0]     mra_pix, mrb_pix;
  assign mr_start = (ast == A_RT);
  assign mr_busy  = mra_v;
  multires #(.BLK(BLK)) u_mra (
    .clk, .rst_n, .start(mr_start), .in_valid(ld_v1), .in_pix(ld_first),
    .out_valid(mra_v), .out_addr(mra_addr), .out_pix(mra_pix));
  multires #(.BLK(BLK)) u_mrb (
    .clk, .rst_n, .start(mr_start), .in_valid(ld_v1), .in_pix(ld_second),
    .out_valid(mrb_v), .out_addr(mrb_addr), .out_pix(mrb_pix));

  psm #(.ITER(ITER), .C_TH(C_TH), .AW(AW)) u_psm (
    .clk, .rst_n, .start(psm_start), .init_models(mod_r[bank]), .active(act_r[bank]),
    .lab_addr(psm_lab_addr), .lab_data(psm_lab), .lev(psm_lev),
    .i_addr(psm_i_addr), .i_pix(psm_i_pix), .j_addr(psm_j_addr), .j_pix(psm_j_pix),
    .busy(psm_busy), .done(psm_done), .models(psm_models),
    .n_solve(n_solve), .n_singular(n_singular));

  // ---------------------------------------------------------------- stage B
  typedef enum logic [2:0] {B_IDLE, B_UPD, B_DET, B_PRED, B_WB, B_RT} bstate_t;
  bstate_t bst;
  logic            ud_start, ud_mode, ud_busy, ud_done;
  logic [NLAB-1:0] ud_new_active;
  logic [AW-1:0]   ud_lab_raddr, ud_lab_waddr, ud_i_addr;
  logic [3:0][AW-1:0] ud_j_addr;
  logic            ud_lab_we;
  lmap_t           ud_lab_wdata, b_lab;
  logic [7:0]      ud_i_pix;
  logic [3:0][7:0] ud_j_pix;
  logic [7:0]      ud_n_pass;
  logic [15:0]     ud_skip, ud_change, ud_mobile;
  logic            pr_start, pr_busy, pr_done;
  logic [AW-1:0]   pr_lab_addr;
  logic [15:0]     pr_dropped;
  logic [NLAB-1:0] pr_used, det_active;

  upd_det #(.BETA(BETA), .GAMMA(GAMMA), .BETA_D(BETA_D), .TH_MOB(TH_MOB),
            .ICM_MAX(ICM_MAX), .AW(AW)) u_ud (
    .clk, .rst_n, .start(ud_start), .mode(ud_mode), .models(mod_r[~bank]),
    .active(act_r[~bank]), .new_active(ud_new_active),
    .lab_raddr(ud_lab_raddr), .lab_rdata(b_lab), .lab_we(ud_lab_we),
    .lab_waddr(ud_lab_waddr), .lab_wdata(ud_lab_wdata),
    .i_addr(ud_i_addr), .i_pix(ud_i_pix), .j_addr(ud_j_addr), .j_pix(ud_j_pix),
    .busy(ud_busy), .done(ud_done),
    .n_skip(ud_skip), .n_change(ud_change), .n_mobile(ud_mobile), .n_pass(ud_n_pass));

  prediction #(.AW(AW), .PAW(PAW)) u_pred (
    .clk, .rst_n, .start(pr_start), .bx(blk_x(b_blk)), .by(blk_y(b_blk)),
    .models(mod_r[~bank]), .active(det_active), .lab_addr(pr_lab_addr), .lab_data(b_lab),
    .pm_we, .pm_addr(pm_waddr), .pm_data(pm_wdata), .busy(pr_busy), .done(pr_done),
    .n_dropped(pr_dropped), .used(pr_used));

  assign b_active_new = det_active & pr_used;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst <= B_IDLE; ud_start <= 1'b0; ud_mode <= 1'b0; pr_start <= 1'b0; b_done <= 1'b0;
      b_rt_upd <= 1'b0; rt_we <= 1'b0; rt_waddr <= '0; rt_wdata <= '0; det_active <= '0;
      n_skip <= '0; n_change <= '0; n_mobile <= '0; blk_done <= 1'b0; blk_done_idx <= '0;
    end else begin
      ud_start <= 1'b0; pr_start <= 1'b0; b_done <= 1'b0; b_rt_upd <= 1'b0;
      rt_we <= 1'b0; blk_done <= 1'b0;
      case (bst)
        B_IDLE: if (b_start) begin
          ud_start <= 1'b1; ud_mode <= 1'b0; bst <= B_UPD;
        end
        B_UPD: if (ud_done) begin
          n_skip   <= n_skip + 32'(ud_skip);
          n_change <= n_change + 32'(ud_change);
          ud_start <= 1'b1; ud_mode <= 1'b1; bst <= B_DET;
        end
        B_DET: if (ud_done) begin
          n_mobile   <= n_mobile + 32'(ud_mobile);
          det_active <= ud_new_active;
          pr_start   <= 1'b1; bst <= B_PRED;
        end
        B_PRED: if (pr_done) begin
          b_rt_upd <= 1'b1; bst <= B_WB;
        end
        B_WB: bst <= B_RT;                         // registers being updated
        B_RT: begin                                // registers updated now
          rt_we    <= 1'b1;
          rt_waddr <= b_blk;
          rt_wdata <= '{active: act_r[~bank], model: mod_r[~bank]};
          blk_done <= 1'b1; blk_done_idx <= b_blk;
          b_done   <= 1'b1;
          bst <= B_IDLE;
        end
        default: bst <= B_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- memories
  logic [7:0]      i0_rd [2], i1_rd [2];
  logic [3:0][7:0] j0_rd [2], j1_rd [2];
  lmap_t           lab_rd [2];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic a_own;
    assign a_own = (bank == 1'(b));
    // first image, full and half resolution
    seg_ram #(.DW(8), .DEPTH(BLK*BLK), .NRD(1)) u_i0 (
      .clk, .we(a_own && ld_v1), .wr_addr(ld_cnt1), .wr_data(ld_first),
      .rd_addr(a_own ? psm_i_addr : ud_i_addr), .rd_data(i0_rd[b]));
    seg_ram #(.DW(8), .DEPTH(BLK*BLK/4), .NRD(1)) u_i1 (
      .clk, .we(a_own && mra_v), .wr_addr(mra_addr), .wr_data(mra_pix),
      .rd_addr(AW1'(psm_i_addr)), .rd_data(i1_rd[b]));
    // second image, full and half resolution
    logic [3:0][AW1-1:0] j1_a;
    for (genvar k = 0; k < 4; k++) begin : g_j1a
      assign j1_a[k] = AW1'(psm_j_addr[k]);
    end
    seg_ram #(.DW(8), .DEPTH(BLK*BLK), .NRD(4)) u_j0 (
      .clk, .we(a_own && ld_v1), .wr_addr(ld_cnt1), .wr_data(ld_second),
      .rd_addr(a_own ? psm_j_addr : ud_j_addr), .rd_data(j0_rd[b]));
    seg_ram #(.DW(8), .DEPTH(BLK*BLK/4), .NRD(4)) u_j1 (
      .clk, .we(a_own && mrb_v), .wr_addr(mrb_addr), .wr_data(mrb_pix),
      .rd_addr(j1_a), .rd_data(j1_rd[b]));
    // label map {pred, cur}
    label_t pl;
    assign pl = ld_gy_ok1 ? pm_rdata : '0;
    seg_ram #(.DW($bits(lmap_t)), .DEPTH(BLK*BLK), .NRD(1)) u_lab (
      .clk,
      .we(a_own ? ld_v1 : ud_lab_we),
      .wr_addr(a_own ? ld_cnt1 : ud_lab_waddr),
      .wr_data(a_own ? {pl, pl} : ud_lab_wdata),
      .rd_addr(a_own ? psm_lab_addr : (ud_busy ? ud_lab_raddr : pr_lab_addr)),
      .rd_data(lab_rd[b]));
  end

  assign psm_i_pix = psm_lev ? i1_rd[bank] : i0_rd[bank];
  assign psm_j_pix = psm_lev ? j1_rd[bank] : j0_rd[bank];
  assign psm_lab   = lab_rd[bank];
  assign ud_i_pix  = i0_rd[~bank];
  assign ud_j_pix  = j0_rd[~bank];
  assign b_lab     = lab_rd[~bank];

endmodule
