// weight_calc: Weight Calculation of the PSM (pseudo M-estimator).
//
// Gives each pixel the weight with which it enters the next estimation of its
// region's model: 1 when its residual under the current model is small,
// |r| <= C_TH grey levels, and 0 otherwise (an outlier, such as an object that
// moves differently from its region), or when the moved position leaves the
// divided image or the pixel's label is not in use. The residual arrives in
// quarter grey levels from the common element. One cycle latency; the write
// address travels with the weight. The published architecture gives the block and that
// outlier pixels get weight 0; the binary weight and threshold are this
// design's choice.
module weight_calc
  import seg_pkg::*;
#(
  parameter int C_TH = 16,
  parameter int AW   = 2*LOGB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [AW-1:0]      addr_in,
  input  logic               in_blk,
  input  logic               active,
  input  logic signed [15:0] dfd,
  output logic               out_valid,
  output logic [AW-1:0]      addr_out,
  output logic               w
);

  logic [15:0] ar;
  assign ar = dfd[15] ? 16'(-dfd) : 16'(dfd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; addr_out <= '0; w <= 1'b0;
    end else begin
      out_valid <= in_valid;
      addr_out  <= addr_in;
      w         <= in_blk && active && (ar <= 16'(C_TH * 4));
    end
  end

endmodule
