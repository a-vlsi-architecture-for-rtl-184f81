// tb_inv_matrix: self-checking test of the 7x7 inverse.
// Builds normal-equation matrices the way the PSM does (sums of chi^T*chi over
// random pixels with random gradients) and checks that G times the returned
// inverse (scaled back by the equilibration exponents and 2^-FRAC) is the identity within 1e-3. Also
// checks the cycle count against NPRM*(W + 2 + 2*NPRM*NPRM) and that an empty
// region (G = 0) is reported singular.
module tb_inv_matrix;
  import seg_pkg::*;
  localparam int W = 96, FRAC = 32;
  logic clk = 0, rst_n = 1, start = 0, busy, done, sing;
  gmat_t g;
  logic [NPRM-1:0][5:0] sc;
  logic signed [NPRM-1:0][NPRM-1:0][W-1:0] inv;
  int checks = 0, failures = 0;

  inv_matrix #(.W(W), .FRAC(FRAC)) dut (.clk, .rst_n, .start, .g, .busy, .done,
    .singular(sing), .sc, .inv);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_one(output int cycles);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    longint c[7];
    real gi [7][7], err, maxerr, s;
    int cyc, npix;
    g = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      g = '0;
      npix = (t < 4) ? 60 : 3000;
      for (int n = 0; n < npix; n++) begin
        int ix, iy, xc, yc;
        ix = $signed($urandom % 401) - 200; iy = $signed($urandom % 401) - 200;
        if (t % 3 == 2) begin ix = ix / 8; iy = iy / 8; end
        xc = $signed($urandom % 128) - 64; yc = $signed($urandom % 128) - 64;
        c[0] = ix; c[1] = ix*xc; c[2] = ix*yc; c[3] = iy; c[4] = iy*xc; c[5] = iy*yc; c[6] = 4;
        for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) g[i][j] += c[i]*c[j];
      end
      run_one(cyc);
      checks++;
      if (sing) begin failures++; $display("unexpected singular"); end
      checks++;
      if (cyc > NPRM*(W + 4 + 2*NPRM*NPRM) || cyc < NPRM*W) begin
        failures++; $display("cycles %0d", cyc);
      end
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < 7; j++)
          gi[i][j] = real'($signed(inv[i][j])) / (2.0 ** FRAC) / (2.0 ** (sc[i] + sc[j]));
      maxerr = 0;
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < 7; j++) begin
          s = 0;
          for (int k = 0; k < 7; k++) s += real'(g[i][k]) * gi[k][j];
          err = s - ((i == j) ? 1.0 : 0.0);
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
        end
      checks++;
      if (maxerr > 1e-3) begin failures++; $display("test %0d max |G*inv - I| = %g", t, maxerr); end
    end
    g = '0;
    run_one(cyc);
    checks++; if (!sing) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
