// seq_ctrl: Sequence Controller of the two-stage divided-image pipeline.
//
// Stage A loads a divided image and runs the PSM on it; stage B runs Update,
// Detection and Prediction on the divided image that stage A finished before.
// Both stages start together; when both have reported done the controller
// swaps the memory banks (stage A always works on `bank`, stage B on ~bank),
// hands stage A's divided image to stage B and starts the next one. Divided
// images are taken in raster order, NBLK per frame, and the frame counter
// advances after the last one. While `run` is low no new divided image enters
// stage A; the one in stage B is still completed. a_start/b_start are
// one-cycle pulses; b_start only when stage B holds a divided image.
// The published architecture gives the two-stage schedule (timing diagram) and names the
// controller; the handshake is this design's.
module seq_ctrl #(
  parameter int NBLK = 20,
  parameter int BW   = $clog2(NBLK)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          a_done,
  input  logic          b_done,
  output logic          bank,
  output logic          a_start,
  output logic          b_start,
  output logic          a_valid,
  output logic          b_valid,
  output logic [BW-1:0] a_blk,
  output logic [BW-1:0] b_blk,
  output logic [15:0]   frame,
  output logic          idle
);

  logic a_busy, b_busy;

  assign idle = !a_busy && !b_busy && !a_start && !b_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank <= 1'b0; a_start <= 1'b0; b_start <= 1'b0; a_valid <= 1'b0; b_valid <= 1'b0;
      a_blk <= '0; b_blk <= '0; frame <= '0; a_busy <= 1'b0; b_busy <= 1'b0;
    end else begin
      a_start <= 1'b0;
      b_start <= 1'b0;
      if (a_done) a_busy <= 1'b0;
      if (b_done) b_busy <= 1'b0;
      // both stages free (or finishing now): advance the pipeline
      if (!a_start && !b_start && (!a_busy || a_done) && (!b_busy || b_done)
          && (run || a_valid)) begin
        bank    <= a_valid ? ~bank : bank;
        b_valid <= a_valid;
        b_blk   <= a_blk;
        b_start <= a_valid;
        b_busy  <= a_valid;
        if (a_valid) begin
          if (a_blk == BW'(NBLK-1)) begin
            a_blk <= '0; frame <= frame + 1'b1;
          end else a_blk <= a_blk + 1'b1;
        end
        a_valid <= run;
        a_start <= run;
        a_busy  <= run;
      end
    end
  end

endmodule
