// coord: affine coordinate unit ("Coordinate" in the common element and in the
// motion model calculation).
//
// Moves the pixel (x, y) of a divided image by the affine motion of theta,
// eq. (2): x' = x + a1 + a2*xc + a3*yc, y' = y + a4 + a5*xc + a6*yc, with
// xc = x - BLK/2 and yc = y - BLK/2 (models are centred on the divided image,
// this design's choice). Purely combinational; results are signed Q16.
module coord
  import seg_pkg::*;
#(
  parameter int CW = LOGB
) (
  input  logic [CW-1:0]       x,
  input  logic [CW-1:0]       y,
  input  theta_t              theta,
  output logic signed [47:0]  pos_x,
  output logic signed [47:0]  pos_y
);

  logic signed [CW:0] xc, yc;

  always_comb begin
    xc = $signed({1'b0, x}) - $signed((CW+1)'(1 << (CW-1)));
    yc = $signed({1'b0, y}) - $signed((CW+1)'(1 << (CW-1)));
    pos_x = ($signed(48'(x)) <<< QF) + 48'(theta[0]) + 48'(theta[1]) * 48'(xc) + 48'(theta[2]) * 48'(yc);
    pos_y = ($signed(48'(y)) <<< QF) + 48'(theta[3]) + 48'(theta[4]) * 48'(xc) + 48'(theta[5]) * 48'(yc);
  end

endmodule
