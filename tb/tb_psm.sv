// tb_psm: self-checking test of the PSM processor on a synthetic divided image.
// The first image is a smooth textured pattern; in the second image the left
// half (label 0) is moved by (1.5, -0.75) pixels and the right half (label 1)
// by (-2.0, 1.25) pixels with its brightness raised by 6 grey levels. The
// testbench plays the label map and both pyramid levels of both images (its own
// 2x2 means) with 1-cycle latency. Starting from zero models, the estimated
// motion at the centre of each region must be within 0.2 pixel of the true one and the luminance term within 1.5 grey
// levels; every region is solved NLEV*ITER times with no singular system, and
// the run must end within the cycle budget of the schedule.
module tb_psm;
  import seg_pkg::*;
  localparam int ITER = 2, AW = 2*LOGB;
  logic clk = 0, rst_n = 1, start = 0;
  models_t init_m, mo;
  logic [NLAB-1:0] act;
  logic [AW-1:0] la, ia;
  lmap_t ld;
  logic lev;
  logic [7:0] ip;
  logic [3:0][AW-1:0] ja;
  logic [3:0][7:0] jp;
  logic busy, done;
  logic [15:0] ns, nsing;
  int checks = 0, failures = 0;
  logic [7:0] I0 [BLK*BLK], J0 [BLK*BLK], I1 [BLK*BLK/4], J1 [BLK*BLK/4];

  psm #(.ITER(ITER)) dut (.clk, .rst_n, .start, .init_models(init_m), .active(act),
    .lab_addr(la), .lab_data(ld), .lev, .i_addr(ia), .i_pix(ip), .j_addr(ja), .j_pix(jp),
    .busy, .done, .models(mo), .n_solve(ns), .n_singular(nsing));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    ld <= '{pred: (la[LOGB-1:0] < 64) ? 2'd0 : 2'd1, cur: (la[LOGB-1:0] < 64) ? 2'd0 : 2'd1};
    ip <= lev ? I1[ia % (BLK*BLK/4)] : I0[ia];
    for (int k = 0; k < 4; k++) jp[k] <= lev ? J1[ja[k] % (BLK*BLK/4)] : J0[ja[k]];
  end

  function automatic real tex(real x, real y);
    return 128.0 + 40.0*$sin(0.31*x + 0.12*y) + 30.0*$cos(0.17*y - 0.07*x)
         + 20.0*$sin(0.23*(x + y) + 1.0);
  endfunction

  initial begin
    real dx [2], dy [2], dl [2], v;
    int cyc;
    dx[0] = 1.5;  dy[0] = -0.75; dl[0] = 0.0;
    dx[1] = -2.0; dy[1] = 1.25;  dl[1] = 6.0;
    for (int y = 0; y < BLK; y++)
      for (int x = 0; x < BLK; x++) begin
        int r;
        r = (x < 64) ? 0 : 1;
        I0[y*BLK+x] = 8'($rtoi(tex(x, y) + 0.5));
        v = tex(x - dx[r], y - dy[r]) + dl[r];
        J0[y*BLK+x] = 8'($rtoi(v + 0.5));
      end
    for (int y = 0; y < BLK/2; y++)
      for (int x = 0; x < BLK/2; x++) begin
        I1[y*BLK/2+x] = 8'((int'(I0[2*y*BLK+2*x]) + I0[2*y*BLK+2*x+1] + I0[(2*y+1)*BLK+2*x] + I0[(2*y+1)*BLK+2*x+1] + 2) / 4);
        J1[y*BLK/2+x] = 8'((int'(J0[2*y*BLK+2*x]) + J0[2*y*BLK+2*x+1] + J0[(2*y+1)*BLK+2*x] + J0[(2*y+1)*BLK+2*x+1] + 2) / 4);
      end
    init_m = '0; act = 4'b0011;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("psm cycles %0d", cyc);
    for (int r = 0; r < 2; r++) begin
      real a1, a4, xi;
      a1 = real'(mo[r][0]) / 65536.0; a4 = real'(mo[r][3]) / 65536.0; xi = real'(mo[r][6]) / 65536.0;
      $display("region %0d: a1 %f a4 %f xi %f (a2 %f a3 %f a5 %f a6 %f)", r, a1, a4, xi,
        real'(mo[r][1])/65536.0, real'(mo[r][2])/65536.0, real'(mo[r][4])/65536.0, real'(mo[r][5])/65536.0);
      // motion at the centre of the region (x = 32 or 96, y = 64)
      a1 = a1 + real'(mo[r][1]) / 65536.0 * (r == 0 ? -32.0 : 32.0);
      a4 = a4 + real'(mo[r][4]) / 65536.0 * (r == 0 ? -32.0 : 32.0);
      $display("region %0d: motion at its centre (%f, %f)", r, a1, a4);
      checks++; if (a1 - dx[r] > 0.2 || a1 - dx[r] < -0.2) failures++;
      checks++; if (a4 - dy[r] > 0.2 || a4 - dy[r] < -0.2) failures++;
      checks++; if (xi + dl[r] > 1.5 || xi + dl[r] < -1.5) failures++;
    end
    checks++; if (mo[2] != '0 || mo[3] != '0) failures++;       // unused labels untouched
    checks++; if (ns != 16'(2 * NLEV * ITER)) begin failures++; $display("solves %0d", ns); end
    checks++; if (nsing != 0) failures++;
    // schedule: per iteration two passes over the level plus four solves
    checks++;
    if (cyc > ITER * (2*(BLK*BLK + BLK*BLK/4) + 2*NLEV*2*1500) + 200) begin
      failures++; $display("too slow: %0d", cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
