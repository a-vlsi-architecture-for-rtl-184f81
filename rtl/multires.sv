// multires: Multi-Resolution Image Creation.
//
// Takes the pixels of one BLK x BLK divided image in raster order (one per
// cycle when in_valid) and produces the half-resolution pyramid level, each
// output pixel being the rounded mean of a 2x2 block: (a+b+c+d+2)/4.
// A line buffer of BLK/2 pair sums holds the even row; the output pixel is
// emitted on the cycle after its last (odd row, odd column) input arrives,
// with its raster address in the (BLK/2)x(BLK/2) level.
// `start` clears the position counters (pulse before the first pixel).
// The published architecture names the block and shows one per image (A and B); the 2x2 mean
// and the single extra level are this design's choices.
module multires #(
  parameter int BLK = 128,
  parameter int AW1 = 2*$clog2(BLK/2)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           in_valid,
  input  logic [7:0]     in_pix,
  output logic           out_valid,
  output logic [AW1-1:0] out_addr,
  output logic [7:0]     out_pix
);

  localparam int CW = $clog2(BLK);

  logic [CW-1:0] x, y;
  logic [7:0]    left;                     // previous (even column) pixel
  logic [8:0]    pair [BLK/2];             // even-row pair sums
  logic [9:0]    sum4;

  assign sum4 = 10'(pair[x[CW-1:1]]) + 10'(left) + 10'(in_pix) + 10'd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; left <= '0;
      out_valid <= 1'b0; out_addr <= '0; out_pix <= '0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        x <= '0; y <= '0;
      end else if (in_valid) begin
        if (!x[0]) left <= in_pix;
        else if (!y[0]) pair[x[CW-1:1]] <= 9'(left) + 9'(in_pix);
        else begin
          out_valid <= 1'b1;
          out_addr  <= AW1'({y[CW-1:1], x[CW-1:1]});
          out_pix   <= sum4[9:2];
        end
        x <= x + 1'b1;
        if (x == CW'(BLK-1)) y <= y + 1'b1;
      end
    end
  end

endmodule
