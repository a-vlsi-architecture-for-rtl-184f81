// ce: Common Element - coordinate, interpolation, gradient and observation.
//
// For a pixel (xl, yl) of pyramid level `lev` and a region model theta it
// finds where the pixel moves to in the second image, interpolates that image
// there, and returns the luminance gradients and the displaced frame
// difference (DFD, the residual r of eq. (3)):
//   cycle 0 (in_valid): coord moves the full-resolution position (xl<<lev, yl<<lev);
//            the moved position is scaled back to the level; the four second-image
//            addresses around it (j_addr[0..3] = (x,y),(x+1,y),(x,y+1),(x+1,y+1),
//            level raster) go to the caller's memory together with the first-image
//            address of the pixel itself.
//   cycle 1: the caller's memories return j_pix[0..3] and i_pix; bilinear
//            interpolation (8 fraction bits), gradient over the 2x2 cell, DFD.
//   cycle 2: out_valid with ix, iy, dfd (Q2: quarter grey levels, gradients in
//            full-resolution units), observation o = min(|DFD|, 255) and
//            is = min(|Ix|+|Iy|, 255) in grey levels, in_blk flag.
// `tag` travels with the pixel unchanged. A position whose 2x2 cell leaves the
// level is flagged in_blk = 0. Fully pipelined: one pixel per cycle.
// The published architecture gives the chain Coordinate -> Interpolation -> Gradient ->
// Observation and its signal names; the arithmetic and formats are this design's.
module ce
  import seg_pkg::*;
#(
  parameter int TW = 16,
  parameter int AW = 2*LOGB
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [LOGB-1:0]      xl,
  input  logic [LOGB-1:0]      yl,
  input  logic                 lev,
  input  theta_t               theta,
  input  logic [TW-1:0]        tag_in,
  output logic [3:0][AW-1:0]   j_addr,
  input  logic [3:0][7:0]      j_pix,
  input  logic [7:0]           i_pix,
  output logic                 out_valid,
  output logic [TW-1:0]        tag_out,
  output logic                 in_blk,
  output logic signed [15:0]   ix,
  output logic signed [15:0]   iy,
  output logic signed [15:0]   dfd,
  output logic [7:0]           o,
  output logic [7:0]           is_o
);

  logic [LOGB-1:0]    xf, yf;
  logic signed [47:0] px, py, pxl, pyl;
  logic signed [31:0] xi, yi;
  logic [LOGB-1:0]    wl;                  // level width - 1
  logic               in0;

  assign xf = lev ? {xl[LOGB-2:0], 1'b0} : xl;
  assign yf = lev ? {yl[LOGB-2:0], 1'b0} : yl;

  coord u_coord (.x(xf), .y(yf), .theta(theta), .pos_x(px), .pos_y(py));

  always_comb begin
    pxl = px >>> lev;
    pyl = py >>> lev;
    xi  = 32'(pxl >>> QF);
    yi  = 32'(pyl >>> QF);
    wl  = lev ? LOGB'(BLK/2 - 1) : LOGB'(BLK - 1);
    in0 = (xi >= 0) && (yi >= 0) && (xi < 32'(wl)) && (yi < 32'(wl));
    for (int k = 0; k < 4; k++) begin
      logic [LOGB-1:0] ax, ay;
      ax = in0 ? LOGB'(xi + 32'(k & 1)) : '0;
      ay = in0 ? LOGB'(yi + 32'(k >> 1)) : '0;
      j_addr[k] = lev ? AW'({ay[LOGB-2:0], ax[LOGB-2:0]}) : AW'({ay, ax});
    end
  end

  // stage 1 registers
  logic          v1, in1, lev1;
  logic [7:0]    fx1, fy1;
  logic [TW-1:0] tag1;
  logic signed [31:0] xi1;                 // luminance change, Q16

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; in1 <= 1'b0; lev1 <= 1'b0; fx1 <= '0; fy1 <= '0; tag1 <= '0; xi1 <= '0;
    end else begin
      v1   <= in_valid;
      in1  <= in0;
      lev1 <= lev;
      fx1  <= pxl[QF-1 -: 8];
      fy1  <= pyl[QF-1 -: 8];
      tag1 <= tag_in;
      xi1  <= theta[IDX_XI];
    end
  end

  // stage 1 arithmetic
  logic [25:0]        jv;                  // interpolated J, 8.16 (always >= 0)
  logic signed [15:0] gx, gy, ixc, iyc, r;
  logic [15:0]        ar, ag;

  always_comb begin
    logic [8:0] wx0, wy0;
    wx0 = 9'd256 - 9'(fx1);
    wy0 = 9'd256 - 9'(fy1);
    jv = 26'(j_pix[0]) * 26'(wx0) * 26'(wy0) + 26'(j_pix[1]) * 26'(fx1) * 26'(wy0)
       + 26'(j_pix[2]) * 26'(wx0) * 26'(fy1) + 26'(j_pix[3]) * 26'(fx1) * 26'(fy1);
    gx  = $signed(16'(j_pix[1])) - $signed(16'(j_pix[0])) + $signed(16'(j_pix[3])) - $signed(16'(j_pix[2]));
    gy  = $signed(16'(j_pix[2])) - $signed(16'(j_pix[0])) + $signed(16'(j_pix[3])) - $signed(16'(j_pix[1]));
    ixc = (gx <<< 1) >>> lev1;
    iyc = (gy <<< 1) >>> lev1;
    r   = $signed(16'(jv >> 14)) - $signed({6'd0, i_pix, 2'b00}) + 16'(xi1 >>> 14);
    ar  = r[15] ? 16'(-r) : 16'(r);
    ag  = (ixc[15] ? 16'(-ixc) : 16'(ixc)) + (iyc[15] ? 16'(-iyc) : 16'(iyc));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; tag_out <= '0; in_blk <= 1'b0;
      ix <= '0; iy <= '0; dfd <= '0; o <= '0; is_o <= '0;
    end else begin
      out_valid <= v1;
      tag_out   <= tag1;
      in_blk    <= in1;
      ix        <= in1 ? ixc : '0;
      iy        <= in1 ? iyc : '0;
      dfd       <= in1 ? r : '0;
      o         <= !in1 ? 8'd255 : (ar[15:2] > 14'd255) ? 8'd255 : ar[9:2];
      is_o      <= !in1 ? 8'd0   : (ag[15:2] > 14'd255) ? 8'd255 : ag[9:2];
    end
  end

endmodule
