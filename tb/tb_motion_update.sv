// tb_motion_update: self-checking test of the model increment and update.
// Normal equations are built from random pixels for a known increment
// dtheta_true (Gs = G * dtheta_true, with dtheta in Q16.16); the inverse comes
// from inv_matrix. The updated model must equal theta_in + dtheta_true within
// 2^-10 for a1, a4, 2^-14 for a2, a3, a5, a6 and 2^-7 grey levels for xi, be ready
// NPRM+1 cycles after start, and stay unchanged for a singular system.
module tb_motion_update;
  import seg_pkg::*;
  localparam int W = 96, FRAC = 32;
  logic clk = 0, rst_n = 1, is, id, sing, ms = 0, md;
  gmat_t g; gvec_t gs;
  logic [NPRM-1:0][5:0] sc;
  logic signed [NPRM-1:0][NPRM-1:0][W-1:0] inv;
  theta_t th_in, th_out, dth;
  logic ib;
  int checks = 0, failures = 0;

  inv_matrix #(.W(W), .FRAC(FRAC)) u_inv (.clk, .rst_n, .start(is), .g, .busy(ib), .done(id),
    .singular(sing), .sc, .inv);
  motion_update #(.W(W), .FRAC(FRAC)) dut (.clk, .rst_n, .start(ms), .singular(sing), .sc, .inv,
    .gs, .theta_in(th_in), .done(md), .theta_out(th_out), .dtheta(dth));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real dt [7], tol, d;
    longint c[7];
    int cyc;
    is = 0; g = '0; gs = '0; th_in = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      dt[0] = ($signed($urandom % 2001) - 1000) / 250.0;  dt[3] = ($signed($urandom % 2001) - 1000) / 250.0;
      dt[1] = ($signed($urandom % 2001) - 1000) / 1.0e5;  dt[2] = ($signed($urandom % 2001) - 1000) / 1.0e5;
      dt[4] = ($signed($urandom % 2001) - 1000) / 1.0e5;  dt[5] = ($signed($urandom % 2001) - 1000) / 1.0e5;
      dt[6] = ($signed($urandom % 2001) - 1000) / 100.0;
      g = '0; gs = '0;
      for (int n = 0; n < 2000; n++) begin
        int ix, iy, xc, yc;
        real yv;
        ix = $signed($urandom % 401) - 200; iy = $signed($urandom % 401) - 200;
        xc = $signed($urandom % 128) - 64; yc = $signed($urandom % 128) - 64;
        c[0] = ix; c[1] = ix*xc; c[2] = ix*yc; c[3] = iy; c[4] = iy*xc; c[5] = iy*yc; c[6] = 4;
        yv = 0;
        for (int i = 0; i < 7; i++) yv += c[i] * dt[i];
        for (int i = 0; i < 7; i++) begin
          gs[i] += longint'($rtoi(c[i] * yv));
          for (int j = 0; j < 7; j++) g[i][j] += c[i]*c[j];
        end
      end
      for (int k = 0; k < 7; k++) th_in[k] = $signed($urandom % 65536) - 32768;
      @(negedge clk); is = 1; @(negedge clk); is = 0;
      while (!id) @(negedge clk);
      ms = 1; @(negedge clk); ms = 0; cyc = 1;
      while (!md) begin @(negedge clk); cyc++; end
      checks++; if (cyc != NPRM + 2) begin failures++; $display("latency %0d", cyc); end
      for (int k = 0; k < 7; k++) begin
        tol = (k == 6) ? 1.0/128 : (k == 0 || k == 3) ? 1.0/1024 : 1.0/16384;
        d = real'(th_out[k] - th_in[k]) / 65536.0 - dt[k];
        checks++;
        if (d > tol || d < -tol) begin
          failures++; $display("t %0d p %0d got %f exp %f", t, k, real'(th_out[k]-th_in[k])/65536.0, dt[k]);
        end
      end
    end
    // singular system: model unchanged
    g = '0; gs = '1;
    @(negedge clk); is = 1; @(negedge clk); is = 0;
    while (!id) @(negedge clk);
    ms = 1; @(negedge clk); ms = 0;
    while (!md) @(negedge clk);
    checks++; if (!sing || th_out != th_in) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
