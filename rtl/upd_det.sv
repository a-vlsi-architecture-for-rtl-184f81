// upd_det: Update and Detection labeling of one divided image, sharing one
// common element (CE).
//
// Both steps visit the pixels in raster order and give each the label of least
// local energy (iterated conditional modes, ICM), eq. (5):
//   U = U1 (observation: |DFD| of the pixel under the label's model, from CE)
//     + U2 (BETA times the number of 8-neighbours with another label)
//     + U3 (GAMMA if the label differs from the predicted label).
// Update (mode = 0): Judgment skips every pixel whose 8 neighbours all carry
//   its own label, so only region boundaries are relabelled. The candidates are
//   the labels in use that occur in the 3x3 window. Passes repeat until a pass
//   changes nothing (the change signal) or ICM_MAX passes were made.
// Detection (mode = 1): one pass over all pixels. Static/Mobile Label Gen gives
//   the pixel's own label (s label, energy U1 + U2) and the lowest label not in
//   use (m label, energy TH_MOB + BETA_D times the neighbours that are not m).
//   A pixel whose moved position leaves the image gives no evidence and keeps
//   its label. Pixels where the m label wins form the new region, which is then marked in
//   use on new_active; its model is estimated with the next frame.
// The 3x3 label window slides along the row: the first pixel of a row reads
// all 9 labels, every further pixel only the 3 of its new right-hand column
// (the pixel just decided enters the window with its new label). Cycles per
// pixel: skipped 11 at a row start and 5 elsewhere; evaluated in Update 7 more
// (NLAB CE evaluations, decision, write-back); Detection 15 and 9.
// Label memory: one read port with 1-cycle latency and one write port, words
// {pred, cur}. Images: first image (1 port) and second image (4 ports), full
// resolution, 1-cycle latency. `done` pulses at the end of the step.
// The published architecture gives the block structure, the energy terms, the boundary
// restriction and raster-order ICM; energies' weights, the candidate set and
// the new-label rule are this design's.
module upd_det
  import seg_pkg::*;
#(
  parameter int BETA    = 4,
  parameter int GAMMA   = 2,
  parameter int BETA_D  = 2,
  parameter int TH_MOB  = 8,
  parameter int ICM_MAX = 4,
  parameter int AW      = 2*LOGB
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              mode,          // 0 update, 1 detection
  input  models_t           models,
  input  logic [NLAB-1:0]   active,
  output logic [NLAB-1:0]   new_active,
  // label map
  output logic [AW-1:0]     lab_raddr,
  input  lmap_t             lab_rdata,
  output logic              lab_we,
  output logic [AW-1:0]     lab_waddr,
  output lmap_t             lab_wdata,
  // images (full resolution)
  output logic [AW-1:0]     i_addr,
  input  logic [7:0]        i_pix,
  output logic [3:0][AW-1:0] j_addr,
  input  logic [3:0][7:0]   j_pix,
  output logic              busy,
  output logic              done,
  // activity counters (cleared by start)
  output logic [15:0]       n_skip,
  output logic [15:0]       n_change,
  output logic [15:0]       n_mobile,
  output logic [7:0]        n_pass
);

  localparam int PH_JUDGE = 10;
  localparam int PH_CE    = 11;
  localparam int PH_DEC   = PH_CE + NLAB + 2;
  localparam int EW       = 12;

  typedef enum logic [1:0] {U_IDLE, U_RUN, U_DONE} ustate_t;
  ustate_t st;

  logic             md;
  logic [LOGB-1:0]  x, y;
  logic [4:0]       ph;
  lmap_t            nb  [9];
  logic [8:0]       nbv;
  logic [7:0]       obs [NLAB];
  logic [NLAB-1:0]  obs_in;                 // moved position inside the image
  logic [15:0]      pass_changes;

  // Static/Mobile Label Gen: the m label is the lowest label not in use
  label_t m_lab;
  logic   m_ok;
  always_comb begin
    m_lab = '0; m_ok = 1'b0;
    for (int l = NLAB-1; l >= 0; l--)
      if (!active[l]) begin m_lab = LW'(l); m_ok = 1'b1; end
  end

  // neighbour k = 0..8 of the window, row by row (4 = the pixel itself)
  logic signed [LOGB+1:0] nx, ny;
  logic [3:0] kr;
  assign kr = (ph < 5'd9) ? 4'(ph) : 4'd0;
  always_comb begin
    nx = $signed({2'b00, x}) + $signed((LOGB+2)'(kr % 3)) - 1;
    ny = $signed({2'b00, y}) + $signed((LOGB+2)'(kr / 3)) - 1;
  end
  assign lab_raddr = AW'({ny[LOGB-1:0], nx[LOGB-1:0]});
  assign i_addr    = {y, x};

  logic nb_in;
  assign nb_in = (nx >= 0) && (ny >= 0) && (nx < $signed((LOGB+2)'(BLK))) && (ny < $signed((LOGB+2)'(BLK)));
  logic       nbv_d;
  logic [3:0] kr_d;
  logic       rd_d;

  // number of window neighbours whose label differs from l
  function automatic logic [3:0] ndiff(label_t l);
    logic [3:0] n;
    n = '0;
    for (int k = 0; k < 9; k++)
      if (k != 4 && nbv[k] && nb[k].cur != l) n = n + 1'b1;
    return n;
  endfunction

  // Judgment: the pixel lies on a region boundary
  logic boundary;
  always_comb begin
    boundary = 1'b0;
    for (int k = 0; k < 9; k++)
      if (k != 4 && nbv[k] && nb[k].cur != nb[4].cur) boundary = 1'b1;
  end

  // Energy Update / Energy Detection and their comparison
  label_t best;
  always_comb begin
    logic [EW-1:0] e, ebest, es, em;
    logic [NLAB-1:0] cand;
    e = '0; es = '0; em = '0;
    best  = nb[4].cur;
    ebest = '1;
    cand  = '0;
    for (int k = 0; k < 9; k++)
      if (nbv[k]) cand[nb[k].cur] = 1'b1;
    if (!md) begin
      for (int l = 0; l < NLAB; l++)
        if (cand[l] && active[l]) begin
          e = EW'(obs[l]) + EW'(BETA) * EW'(ndiff(LW'(l)))
            + ((LW'(l) != nb[4].pred) ? EW'(GAMMA) : '0);
          if (e < ebest) begin ebest = e; best = LW'(l); end
        end
    end else begin
      es = EW'(obs[nb[4].cur]) + EW'(BETA_D) * EW'(ndiff(nb[4].cur));
      em = EW'(TH_MOB) + EW'(BETA_D) * EW'(ndiff(m_lab));
      if (m_ok && obs_in[nb[4].cur] && em < es) best = m_lab;
    end
  end

  // common element, shared by both steps
  logic          ce_v, ce_in;
  logic [LW-1:0] ce_tag;
  logic signed [15:0] ce_ix, ce_iy, ce_dfd;
  logic [7:0]    ce_o, ce_is;
  logic          ce_issue;
  label_t        ce_lab;
  assign ce_issue = (st == U_RUN) && (ph >= 5'(PH_CE)) && (ph < 5'(PH_CE + NLAB));
  assign ce_lab   = md ? nb[4].cur : LW'(ph - 5'(PH_CE));

  ce #(.TW(LW), .AW(AW)) u_ce (
    .clk, .rst_n, .in_valid(ce_issue), .xl(x), .yl(y), .lev(1'b0),
    .theta(models[ce_lab]), .tag_in(ce_lab), .j_addr(j_addr), .j_pix(j_pix),
    .i_pix(i_pix), .out_valid(ce_v), .tag_out(ce_tag), .in_blk(ce_in),
    .ix(ce_ix), .iy(ce_iy), .dfd(ce_dfd), .o(ce_o), .is_o(ce_is));

  assign busy = (st != U_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= U_IDLE; md <= 1'b0; x <= '0; y <= '0; ph <= '0; nbv <= '0;
      nbv_d <= 1'b0; kr_d <= '0; rd_d <= 1'b0; pass_changes <= '0;
      lab_we <= 1'b0; lab_waddr <= '0; lab_wdata <= '0; done <= 1'b0;
      new_active <= '0; n_skip <= '0; n_change <= '0; n_mobile <= '0; n_pass <= '0;
      for (int k = 0; k < 9; k++) nb[k] <= '0;
      for (int l = 0; l < NLAB; l++) obs[l] <= '0;
      obs_in <= '0;
    end else begin
      done   <= 1'b0;
      lab_we <= 1'b0;
      rd_d   <= (st == U_RUN) && (ph < 5'd9);
      kr_d   <= kr;
      nbv_d  <= nb_in;
      if (rd_d) begin
        nb[kr_d]  <= lab_rdata;
        nbv[kr_d] <= nbv_d;
      end
      if (ce_v) begin
        obs[ce_tag]    <= ce_o;
        obs_in[ce_tag] <= ce_in;
      end
      case (st)
        U_IDLE: if (start) begin
          md <= mode; x <= '0; y <= '0; ph <= '0; pass_changes <= '0;
          new_active <= active;
          n_skip <= '0; n_change <= '0; n_mobile <= '0; n_pass <= '0;
          for (int l = 0; l < NLAB; l++) obs[l] <= 8'd255;
          st <= U_RUN;
        end
        U_RUN: begin
          // along a row only the new right-hand column (k = 2, 5, 8) is read
          ph <= (x != '0 && (ph == 5'd2 || ph == 5'd5)) ? ph + 5'd3 : ph + 1'b1;
          if (ph == 5'(PH_JUDGE)) begin
            if ((!md && !boundary) || (md && !m_ok)) begin
              if (!md) n_skip <= n_skip + 1'b1;
              ph <= '0;
            end else if (md) ph <= 5'(PH_CE + NLAB - 1);   // one CE evaluation
          end
          if (ph == 5'(PH_DEC) || (ph == 5'(PH_JUDGE) &&
              ((!md && !boundary) || (md && !m_ok)))) begin
            ph <= '0;
            if (ph == 5'(PH_DEC) && best != nb[4].cur) begin
              lab_we    <= 1'b1;
              lab_waddr <= {y, x};
              lab_wdata <= '{pred: nb[4].pred, cur: best};
              pass_changes <= pass_changes + 1'b1;
              n_change <= n_change + 1'b1;
              if (md) begin
                n_mobile <= n_mobile + 1'b1;
                new_active[best] <= 1'b1;
              end
            end
            // slide the window one pixel right, carrying this pixel's new label
            if (x != LOGB'(BLK-1)) begin
              ph <= 5'd2;
              for (int r = 0; r < 3; r++) begin
                nb[3*r]    <= nb[3*r+1];
                nb[3*r+1]  <= nb[3*r+2];
                nbv[3*r]   <= nbv[3*r+1];
                nbv[3*r+1] <= nbv[3*r+2];
              end
              if (ph == 5'(PH_DEC)) nb[3] <= '{pred: nb[4].pred, cur: best};
            end
            if (x == LOGB'(BLK-1)) begin
              x <= '0;
              if (y == LOGB'(BLK-1)) begin
                y <= '0;
                n_pass <= n_pass + 1'b1;
                pass_changes <= '0;
                if (md || n_pass == 8'(ICM_MAX - 1) ||
                    (pass_changes == '0 && !(ph == 5'(PH_DEC) && best != nb[4].cur)))
                  st <= U_DONE;
              end else y <= y + 1'b1;
            end else x <= x + 1'b1;
          end
        end
        U_DONE: begin
          done <= 1'b1; st <= U_IDLE;
        end
        default: st <= U_IDLE;
      endcase
    end
  end

endmodule
