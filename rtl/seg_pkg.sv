// seg_pkg: constants and types shared by the video segmentation processor.
//
// The frame (640x480) is cut into 128x128 divided images that are processed one
// after another. Each divided image holds at most NLAB regions; every region
// carries a 7-parameter model theta = (a1..a6, xi): an affine motion
// u = a1 + a2*x + a3*y, v = a4 + a5*x + a6*y plus a global luminance change xi.
//
// Number formats (this design's own choices):
//   - pixels are 8-bit unsigned grey levels;
//   - model parameters are signed Q16.16 (32 bit);
//   - pixel coordinates inside the models are taken relative to the centre of
//     the divided image (x - 64, y - 64) to keep the normal equations well scaled;
//   - gradients and residuals are signed integers in quarter grey levels ("Q2").
package seg_pkg;

  localparam int FRAME_W = 640;               // VGA width
  localparam int FRAME_H = 480;               // VGA height
  localparam int BLK     = 128;               // divided image side
  localparam int LOGB    = 7;
  localparam int BX      = FRAME_W / BLK;     // 5 divided images per row
  localparam int BY      = (FRAME_H + BLK - 1) / BLK;  // 4 rows (last one partial)
  localparam int NBLK    = BX * BY;
  localparam int NLAB    = 4;                 // regions per divided image
  localparam int LW      = 2;                 // label width
  localparam int NPRM    = 7;                 // a1..a6, xi
  localparam int QF      = 16;                // fraction bits of a model parameter
  localparam int NLEV    = 2;                 // resolution levels (full, half)
  localparam int IMG_DEPTH = BLK*BLK + (BLK/2)*(BLK/2);  // both pyramid levels

  typedef logic [7:0]          pix_t;
  typedef logic [LW-1:0]       label_t;
  typedef logic signed [31:0]  prm_t;         // Q16.16
  typedef prm_t [NPRM-1:0]     theta_t;       // index 0..5 = a1..a6, 6 = xi
  typedef theta_t [NLAB-1:0]   models_t;

  // Label memory word: the current label and the predicted label (prior of U3).
  typedef struct packed {
    label_t pred;
    label_t cur;
  } lmap_t;

  // One entry of the region table: which labels are in use and their models.
  typedef struct packed {
    logic [NLAB-1:0] active;
    models_t         model;
  } region_t;

  localparam int IDX_XI = 6;

  // Normal equations of eq. (4): G is symmetric, so only its NT upper-triangle
  // entries are built and accumulated; Gs has NPRM entries.
  localparam int NT = NPRM*(NPRM+1)/2;        // 28
  localparam int GW = 64;                     // accumulator width
  typedef logic signed [GW-1:0]   acc_t;
  typedef acc_t [NT-1:0]          gtri_t;
  typedef acc_t [NPRM-1:0]        gvec_t;
  typedef acc_t [NPRM-1:0][NPRM-1:0] gmat_t;

  // Position of G(i,j), i <= j, in the packed upper triangle (row by row).
  function automatic int tri_idx(int i, int j);
    int a, b;
    a = (i <= j) ? i : j;
    b = (i <= j) ? j : i;
    return a*NPRM - (a*(a-1))/2 + (b - a);
  endfunction

endpackage
