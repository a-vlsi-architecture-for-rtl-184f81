// tb_upd_det: self-checking test of Update and Detection labeling.
// Update: a textured first image; in the second image the left half is still
// and the right half moves 2 pixels to the right (models: label 0 still,
// label 1 a1 = 2). The initial label map puts the boundary 8 columns too far
// left. After the ICM passes at least 90% of the six wrong columns that the
// images can decide must be corrected (columns 62-63 fit both models equally
// well: moved by 2 they land on the moving half), the rest of the map must keep its labels (95%), interior
// pixels must have been skipped by the judgment, the passes must stop because a
// pass changed nothing (ICM_MAX raised to 8 for this), and the cycle count must
// match 11 cycles per skipped pixel at a row start and 5 elsewhere, plus 7 per
// evaluated pixel.
// Detection: a 24x24 square inside region 0 moves by (3, 3); the pass must
// create label 2 (the lowest free one), put at least half of the square in it
// and at least 90% of the new label inside the square (2-pixel margin), and
// take 15 cycles per pixel at a row start and 9 elsewhere.
module tb_upd_det;
  import seg_pkg::*;
  localparam int AW = 2*LOGB;
  logic clk = 0, rst_n = 1, start = 0, mode = 0;
  models_t models;
  logic [NLAB-1:0] act, nact;
  logic [AW-1:0] lra, lwa, ia;
  lmap_t lrd, lwd;
  logic lwe, busy, done;
  logic [7:0] ip;
  logic [3:0][AW-1:0] ja;
  logic [3:0][7:0] jp;
  logic [15:0] nskip, nchg, nmob;
  logic [7:0] npass;
  int checks = 0, failures = 0;
  logic [7:0] I0 [BLK*BLK], J0 [BLK*BLK];
  lmap_t lm [BLK*BLK];

  upd_det #(.ICM_MAX(8)) dut (.clk, .rst_n, .start, .mode, .models, .active(act), .new_active(nact),
    .lab_raddr(lra), .lab_rdata(lrd), .lab_we(lwe), .lab_waddr(lwa), .lab_wdata(lwd),
    .i_addr(ia), .i_pix(ip), .j_addr(ja), .j_pix(jp), .busy, .done,
    .n_skip(nskip), .n_change(nchg), .n_mobile(nmob), .n_pass(npass));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #200000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    lrd <= lm[lra];
    if (lwe) lm[lwa] <= lwd;
    ip <= I0[ia];
    for (int k = 0; k < 4; k++) jp[k] <= J0[ja[k]];
  end

  function automatic real tex(real x, real y);
    return 118.0 + 30.0*$sin(0.31*x + 0.12*y) + 30.0*$cos(0.17*y - 0.07*x)
         + 20.0*$sin(0.23*(x + y) + 1.0) + 25.0*$sin(0.93*x - 0.41*y);
  endfunction

  task automatic run(input logic md, output int cyc);
    @(negedge clk); mode = md; start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc, ok_mid, ok_rest, n_rest, in_sq, out_sq, exp_cyc;
    // ---------------- update
    for (int y = 0; y < BLK; y++)
      for (int x = 0; x < BLK; x++) begin
        I0[y*BLK+x] = 8'($rtoi(tex(x, y) + 0.5));
        J0[y*BLK+x] = 8'($rtoi(((x < 64) ? tex(x, y) : tex(x - 2, y)) + 0.5));
        lm[y*BLK+x] = (x < 56) ? '{pred: 2'd0, cur: 2'd0} : '{pred: 2'd1, cur: 2'd1};
      end
    models = '0; models[1][0] = 2 << 16; act = 4'b0011;
    repeat (3) @(negedge clk); rst_n = 1;
    run(1'b0, cyc);
    ok_mid = 0; ok_rest = 0; n_rest = 0;
    for (int y = 0; y < BLK; y++)
      for (int x = 0; x < BLK; x++) begin
        if (x >= 56 && x < 62) begin if (lm[y*BLK+x].cur == 0) ok_mid++; end
        else if (x < 54 || x >= 66) begin
          n_rest++;
          if (lm[y*BLK+x].cur == ((x < 64) ? 0 : 1)) ok_rest++;
        end
      end
    $display("update: passes %0d skipped %0d changed %0d corrected %0d/%0d kept %0d/%0d cycles %0d",
      npass, nskip, nchg, ok_mid, 6*BLK, ok_rest, n_rest, cyc);
    checks++; if (ok_mid < 6*BLK*9/10) failures++;
    checks++; if (ok_rest < n_rest*95/100) failures++;
    checks++; if (nskip == 0 || npass < 2 || npass >= 8) failures++;   // ended by the change signal
    exp_cyc = int'(npass) * (BLK * 11 + BLK*(BLK-1) * 5) + (int'(npass) * BLK*BLK - int'(nskip)) * 7;
    checks++; if (cyc < exp_cyc || cyc > exp_cyc + 4) begin failures++; $display("exp %0d", exp_cyc); end
    checks++; if (nact != act) failures++;
    // ---------------- detection
    for (int y = 0; y < BLK; y++)
      for (int x = 0; x < BLK; x++) begin
        bit sq;
        sq = (x >= 16 && x < 40 && y >= 40 && y < 64);
        J0[y*BLK+x] = 8'($rtoi((sq ? tex(x - 3, y - 3) : (x < 64) ? tex(x, y) : tex(x - 2, y)) + 0.5));
        lm[y*BLK+x] = (x < 64) ? '{pred: 2'd0, cur: 2'd0} : '{pred: 2'd1, cur: 2'd1};
      end
    run(1'b1, cyc);
    in_sq = 0; out_sq = 0;
    for (int y = 0; y < BLK; y++)
      for (int x = 0; x < BLK; x++)
        if (lm[y*BLK+x].cur == 2) begin
          if (x >= 14 && x < 42 && y >= 38 && y < 66) in_sq++; else out_sq++;
        end
    $display("detection: mobile %0d inside %0d outside %0d new_active %b cycles %0d", nmob, in_sq, out_sq, nact, cyc);
    checks++; if (nact != 4'b0111) failures++;
    checks++; if (in_sq < 24*24/2) failures++;
    checks++; if (out_sq * 9 > in_sq) failures++;
    checks++; if (int'(nmob) != in_sq + out_sq) failures++;
    exp_cyc = BLK*15 + BLK*(BLK-1)*9;
    checks++; if (cyc < exp_cyc || cyc > exp_cyc + 4) begin failures++; $display("exp %0d", exp_cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
