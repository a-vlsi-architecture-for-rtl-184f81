// tb_make_matrix: self-checking test of the per-pixel normal-equation terms.
// Random gradients, residuals, positions and weights; every upper-triangle
// term of w*chi^T*chi and every term of w*chi^T*(-It) is recomputed with
// 64-bit integers and compared, together with the label and the latency.
module tb_make_matrix;
  import seg_pkg::*;
  logic clk = 0, rst_n = 1, iv = 0, w;
  label_t li, lo;
  logic [LOGB-1:0] x, y;
  logic signed [15:0] ix, iy, dfd;
  logic ov;
  gtri_t g; gvec_t gs;
  int checks = 0, failures = 0;

  make_matrix dut (.clk, .rst_n, .in_valid(iv), .w, .label_in(li), .x, .y, .ix, .iy, .dfd,
    .out_valid(ov), .label_out(lo), .g_terms(g), .gs_terms(gs));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint c[7], yv, e;
    int nz;
    nz = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      iv = 1; w = ($urandom % 4) != 0; li = LW'($urandom);
      x = LOGB'($urandom); y = LOGB'($urandom);
      ix = 16'($signed($urandom % 2041) - 1020); iy = 16'($signed($urandom % 2041) - 1020);
      dfd = 16'($signed($urandom % 4001) - 2000);
      c[0] = ix; c[1] = longint'(ix) * (int'(x) - 64); c[2] = longint'(ix) * (int'(y) - 64);
      c[3] = iy; c[4] = longint'(iy) * (int'(x) - 64); c[5] = longint'(iy) * (int'(y) - 64);
      c[6] = 4; yv = -longint'(dfd);
      @(negedge clk); iv = 0;
      checks++;
      if (!ov || lo != li) failures++;
      for (int i = 0; i < 7; i++) begin
        e = w ? c[i] * yv : 0;
        checks++; if (gs[i] != e) failures++;
        for (int j = i; j < 7; j++) begin
          e = w ? c[i] * c[j] : 0;
          checks++;
          if (g[tri_idx(i, j)] != e) begin
            failures++; if (failures < 5) $display("G(%0d,%0d) %0d exp %0d", i, j, g[tri_idx(i,j)], e);
          end
          if (e != 0) nz++;
        end
      end
    end
    checks++; if (nz == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
