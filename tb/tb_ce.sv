// tb_ce: self-checking test of the common element.
// Random pixels, pyramid levels and affine models enter one per cycle; the
// testbench plays the image memories (1-cycle latency) and compares every
// output with a reference computed in real arithmetic: moved position,
// bilinear value, 2x2 gradient, residual, observation and the in-block flag.
// It also checks the two-cycle latency.
module tb_ce;
  import seg_pkg::*;
  localparam int TW = 16, AW = 2*LOGB;
  logic clk = 0, rst_n = 1, iv = 0, lev = 0;
  logic [LOGB-1:0] xl, yl;
  theta_t th;
  logic [TW-1:0] tin, tout;
  logic [3:0][AW-1:0] ja;
  logic [3:0][7:0] jp;
  logic [7:0] ip;
  logic ov, inb;
  logic signed [15:0] ix, iy, dfd;
  logic [7:0] o, is_o;
  int checks = 0, failures = 0, cyc = 0;
  logic [7:0] I0 [BLK*BLK], J0 [BLK*BLK], I1 [BLK*BLK/4], J1 [BLK*BLK/4];
  logic [AW-1:0] ia, ia_d;
  logic lev_d;

  typedef struct { int tag; int cyc; bit inb; int ix, iy, dfd, o, is_v; } exp_t;
  exp_t q [$];

  ce #(.TW(TW), .AW(AW)) dut (.clk, .rst_n, .in_valid(iv), .xl, .yl, .lev, .theta(th),
    .tag_in(tin), .j_addr(ja), .j_pix(jp), .i_pix(ip), .out_valid(ov), .tag_out(tout),
    .in_blk(inb), .ix, .iy, .dfd, .o, .is_o);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // memories: address now, data after the clock edge
  assign ia = lev ? AW'({yl[LOGB-2:0], xl[LOGB-2:0]}) : AW'({yl, xl});
  always @(posedge clk) begin
    for (int k = 0; k < 4; k++) jp[k] <= lev ? J1[ja[k] % (BLK*BLK/4)] : J0[ja[k]];
    ia_d <= ia; lev_d <= lev;
  end
  assign ip = lev_d ? I1[ia_d % (BLK*BLK/4)] : I0[ia_d];

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  function automatic exp_t model(int tag, int x_l, int y_l, int lv, theta_t t);
    exp_t e;
    real a[7], xf, yf, xc, yc, px, py, plx, ply, fx, fy, jr;
    int xi, yi, fxi, fyi, w, p00, p10, p01, p11, ipx, gx, gy, jv;
    longint jvi;
    for (int k = 0; k < 7; k++) a[k] = real'(t[k]) / 65536.0;
    xf = x_l * (1 << lv); yf = y_l * (1 << lv);
    xc = xf - 64; yc = yf - 64;
    px = xf + a[0] + a[1]*xc + a[2]*yc;
    py = yf + a[3] + a[4]*xc + a[5]*yc;
    plx = px / (1 << lv); ply = py / (1 << lv);
    xi = $floor(plx); yi = $floor(ply);
    fxi = $floor((plx - xi) * 256.0); fyi = $floor((ply - yi) * 256.0);
    w = BLK >> lv;
    e.tag = tag; e.cyc = cyc + 2;
    e.inb = (xi >= 0 && yi >= 0 && xi <= w-2 && yi <= w-2);
    ipx = lv ? I1[y_l*w + x_l] : I0[y_l*w + x_l];
    if (!e.inb) begin
      e.ix = 0; e.iy = 0; e.dfd = 0; e.o = 255; e.is_v = 0; return e;
    end
    p00 = lv ? J1[yi*w+xi] : J0[yi*w+xi];       p10 = lv ? J1[yi*w+xi+1] : J0[yi*w+xi+1];
    p01 = lv ? J1[(yi+1)*w+xi] : J0[(yi+1)*w+xi]; p11 = lv ? J1[(yi+1)*w+xi+1] : J0[(yi+1)*w+xi+1];
    jvi = longint'(p00)*(256-fxi)*(256-fyi) + longint'(p10)*fxi*(256-fyi)
        + longint'(p01)*(256-fxi)*fyi + longint'(p11)*fxi*fyi;
    jv = int'(jvi / 16384);
    gx = (p10 - p00) + (p11 - p01); gy = (p01 - p00) + (p11 - p10);
    e.ix = (2*gx) >>> lv; e.iy = (2*gy) >>> lv;
    e.dfd = jv - 4*ipx + (int'(t[6]) >>> 14);
    e.o = (iabs(e.dfd)/4 > 255) ? 255 : iabs(e.dfd)/4;
    e.is_v = ((iabs(e.ix)+iabs(e.iy))/4 > 255) ? 255 : (iabs(e.ix)+iabs(e.iy))/4;
    return e;
  endfunction

  always @(posedge clk) begin
    if (ov && rst_n) begin : chk
      exp_t e;
      e = q.pop_front();
      checks++;
      if (int'(tout) != e.tag || cyc != e.cyc || inb != e.inb || ix != e.ix || iy != e.iy ||
          dfd != e.dfd || o != e.o || is_o != e.is_v) begin
        failures++;
        if (failures < 6)
          $display("tag %0d/%0d cyc %0d/%0d inb %0d/%0d ix %0d/%0d iy %0d/%0d dfd %0d/%0d o %0d/%0d is %0d/%0d",
            tout, e.tag, cyc, e.cyc, inb, e.inb, ix, e.ix, iy, e.iy, dfd, e.dfd, o, e.o, is_o, e.is_v);
      end
    end
    if (iv) q.push_back(model(int'(tin), int'(xl), int'(yl), int'(lev), th));
    cyc++;
  end

  initial begin
    for (int a = 0; a < BLK*BLK; a++) begin I0[a] = 8'($urandom); J0[a] = 8'($urandom); end
    for (int a = 0; a < BLK*BLK/4; a++) begin I1[a] = 8'($urandom); J1[a] = 8'($urandom); end
    th = '0; xl = 0; yl = 0; tin = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      iv = ($urandom % 4) != 0;
      lev = $urandom % 2;
      xl = LOGB'($urandom % (lev ? BLK/2 : BLK)); yl = LOGB'($urandom % (lev ? BLK/2 : BLK));
      th[0] = $signed($urandom % (12 << 16)) - (6 << 16);
      th[3] = $signed($urandom % (12 << 16)) - (6 << 16);
      for (int k = 1; k < 3; k++) th[k] = $signed($urandom % 8192) - 4096;
      for (int k = 4; k < 6; k++) th[k] = $signed($urandom % 8192) - 4096;
      th[6] = $signed($urandom % (40 << 16)) - (20 << 16);
      tin = TW'(n);
    end
    @(negedge clk); iv = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
