// tb_vseg_top: end-to-end test of the video segmentation processor at its
// full size (640x480 frames, 20 divided images of 128x128, default
// parameters).
// The scene is a static textured background with a 40x40 textured object
// that moves by (+2, +1) pixels per frame inside divided image 7 (column 2,
// row 1). The testbench models the external parts: the pixel source (frames
// t and t+1, 1-cycle latency), the VGA prediction map (cleared to label 0)
// and the region table (every entry starts with label 0 in use; entry 0 also
// claims a stale label 3 that owns no pixel). It runs NFRAMES frames and
// counts every mechanism, failing if one never happens:
//   bank swaps and cycles where the PSM overlaps stage B, PSM solves,
//   judgment skips, ICM label changes, detection of a new region, prediction
//   map writes and dropped pixels, release of an unused label.
// It then checks the result: the object's divided image has a second region
// whose model moves by (2, 1) within 0.5 pixel while the background model
// stays within 0.25 pixel of rest, and the predicted map labels at least 70%
// of the object's next position with a region of that motion (a later
// detection at the object's edge may have split it in two). Timing: 30 frame/s at
// 167 MHz leave 5.57M cycles per frame and 278k per divided image; the PSM
// stage of every divided image and every complete frame (frames 1 on, timed
// between steps of the frame counter) must stay within them on this scene;
// the whole run must finish within NFRAMES*20 + 1 steps of 1.6M cycles.
module tb_vseg_top;
  import seg_pkg::*;
  localparam int NFRAMES = 3;
  localparam int PAW = $clog2(FRAME_W*FRAME_H);
  localparam int OBJ = 40, OX = 300, OY = 200, TBLK = 7;
  localparam longint STEP_MAX = 1600000;
  localparam int PAPER_FRAME = 167000000 / 30;         // 5566666 cycles
  localparam int PAPER_BLK = PAPER_FRAME / NBLK;       // 278333 cycles

  logic clk = 0, rst_n = 1, run = 0;
  logic ld_req;
  logic [PAW-1:0] ld_addr, pm_raddr, pm_waddr;
  logic [7:0] ld_first, ld_second;
  label_t pm_rdata, pm_wdata;
  logic pm_we, rt_we, blk_done, idle;
  logic [4:0] rt_raddr, rt_waddr, blk_done_idx;
  region_t rt_rdata, rt_wdata;
  logic [15:0] frame, n_solve, n_singular;
  logic [31:0] n_skip, n_change, n_mobile;

  vseg_top dut (.clk, .rst_n, .run, .ld_req, .ld_addr, .ld_first, .ld_second,
    .pm_raddr, .pm_rdata, .pm_we, .pm_waddr, .pm_wdata,
    .rt_raddr, .rt_rdata, .rt_we, .rt_waddr, .rt_wdata,
    .blk_done, .blk_done_idx, .frame, .idle,
    .n_skip, .n_change, .n_mobile, .n_solve, .n_singular);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge

  // ---- external models ---------------------------------------------------
  byte unsigned bg  [FRAME_W*FRAME_H];
  byte unsigned obj [OBJ*OBJ];
  label_t  pm [FRAME_W*FRAME_H];
  region_t rt [NBLK];

  function automatic byte unsigned pix(int f, int a);
    int x, y, ox, oy;
    x = a % FRAME_W; y = a / FRAME_W;
    ox = OX + 2*f; oy = OY + f;
    if (x >= ox && x < ox + OBJ && y >= oy && y < oy + OBJ)
      return obj[(y - oy)*OBJ + (x - ox)];
    return bg[a];
  endfunction

  always_ff @(posedge clk) begin
    ld_first  <= pix(int'(frame), int'(ld_addr));
    ld_second <= pix(int'(frame) + 1, int'(ld_addr));
    pm_rdata  <= pm[pm_raddr];
    rt_rdata  <= rt[rt_raddr];
    if (pm_we) pm[pm_waddr] <= pm_wdata;
    if (rt_we) rt[rt_waddr] <= rt_wdata;
  end

  // ---- mechanism counters ------------------------------------------------
  int checks = 0, failures = 0;
  longint cyc = 0, n_swap = 0, n_overlap = 0, n_pmw = 0, n_drop = 0, n_release = 0,
          n_newreg = 0, a_cyc = 0, a_max = 0;
  logic bank_d = 0;
  logic [15:0] frame_d = 0;
  longint f_start = 0, f_max = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // cycles between frame-counter steps = one frame entering stage A
    if (frame != frame_d) begin
      if (frame_d != 0 && cyc - f_start > f_max) f_max = cyc - f_start;
      f_start = cyc;
    end
    frame_d <= frame;
    if (dut.bank != bank_d) n_swap++;
    bank_d <= dut.bank;
    if (dut.psm_busy && (dut.ud_busy || dut.pr_busy)) n_overlap++;
    if (pm_we) n_pmw++;
    if (dut.pr_done) n_drop += longint'(dut.pr_dropped);
    if (dut.a_start) a_cyc = 0; else a_cyc++;
    if (dut.a_done && a_cyc > a_max) a_max = a_cyc;
    if (rt_we)
      for (int l = 0; l < NLAB; l++) begin
        if (rt[rt_waddr].active[l] && !rt_wdata.active[l]) n_release++;
        if (!rt[rt_waddr].active[l] && rt_wdata.active[l]) n_newreg++;
      end
  end

  initial begin
    #(64'd10 * STEP_MAX * (NFRAMES*NBLK + 1)); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int l_obj, hit, tot;
    logic [NLAB-1:0] obj_lab;
    real u, v;
    for (int y = 0; y < FRAME_H; y++)
      for (int x = 0; x < FRAME_W; x++)
        bg[y*FRAME_W+x] = byte'(int'(110.0 + 35.0*$sin(0.21*x + 0.05*y) + 30.0*$cos(0.17*y - 0.07*x)
                               + 15.0*$sin(0.53*x + 0.37*y)) + int'($urandom % 3));
    for (int y = 0; y < OBJ; y++)
      for (int x = 0; x < OBJ; x++)
        obj[y*OBJ+x] = byte'(int'(190.0 + 40.0*$sin(0.45*x)*$cos(0.38*y) + 20.0*$sin(0.3*(x+y))));
    for (int i = 0; i < FRAME_W*FRAME_H; i++) pm[i] = '0;
    for (int b = 0; b < NBLK; b++) begin
      rt[b] = '0; rt[b].active = 4'b0001;
    end
    rt[0].active = 4'b1001;
    rt[0].model[3][0] = 32'sd65536;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); run = 1;
    while (frame != 16'(NFRAMES)) @(negedge clk);
    run = 0;
    while (!idle) @(negedge clk);
    repeat (5) @(negedge clk);

    $display("cycles %0d (%0d per divided image), longest PSM stage %0d (budget %0d)",
             cyc, cyc / (NFRAMES*NBLK), a_max, PAPER_BLK);
    $display("swaps %0d overlap %0d solves %0d singular %0d skips %0d changes %0d mobile %0d",
             n_swap, n_overlap, n_solve, n_singular, n_skip, n_change, n_mobile);
    $display("pm writes %0d dropped %0d new regions %0d released %0d",
             n_pmw, n_drop, n_newreg, n_release);
    checks++; if (n_swap < NFRAMES*NBLK) failures++;
    checks++; if (n_overlap == 0) failures++;
    checks++; if (n_solve == 0) failures++;
    checks++; if (n_skip == 0) failures++;
    checks++; if (n_change == 0) failures++;
    checks++; if (n_mobile == 0 || n_newreg == 0) failures++;
    checks++; if (n_pmw == 0) failures++;
    checks++; if (n_drop == 0) failures++;
    checks++; if (n_release == 0 || rt[0].active[3]) failures++;
    checks++; if (a_max > longint'(PAPER_BLK)) failures++;
    $display("longest frame %0d cycles (30 frame/s at 167 MHz allows %0d)", f_max, PAPER_FRAME);
    checks++; if (f_max == 0 || f_max > longint'(PAPER_FRAME)) failures++;
    checks++; if (cyc > STEP_MAX * (NFRAMES*NBLK + 1)) failures++;

    // result in the object's divided image
    l_obj = -1; obj_lab = '0;
    for (int l = 1; l < NLAB; l++)
      if (rt[TBLK].active[l]) begin
        u = real'(rt[TBLK].model[l][0]) / 65536.0;
        v = real'(rt[TBLK].model[l][3]) / 65536.0;
        $display("block %0d label %0d: u %f v %f", TBLK, l, u, v);
        if (u > 1.5 && u < 2.5 && v > 0.5 && v < 1.5) begin l_obj = l; obj_lab[l] = 1'b1; end
      end
    u = real'(rt[TBLK].model[0][0]) / 65536.0;
    v = real'(rt[TBLK].model[0][3]) / 65536.0;
    $display("block %0d label 0: u %f v %f, object label %0d", TBLK, u, v, l_obj);
    checks++; if (l_obj < 0) failures++;
    checks++; if (u < -0.25 || u > 0.25 || v < -0.25 || v > 0.25) failures++;
    hit = 0; tot = 0;
    for (int y = OY + NFRAMES + 2; y < OY + NFRAMES + OBJ - 2; y++)
      for (int x = OX + 2*NFRAMES + 2; x < OX + 2*NFRAMES + OBJ - 2; x++) begin
        tot++;
        if (obj_lab[pm[y*FRAME_W + x]]) hit++;
      end
    $display("predicted object pixels %0d / %0d", hit, tot);
    checks++; if (hit * 10 < tot * 7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
