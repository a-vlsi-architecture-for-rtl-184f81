// prediction: Prediction of the label map for the next frame (step 1).
//
// After Update and Detection of a divided image, every pixel's final label is
// carried to where its region's affine model moves it, rounded to the nearest
// pixel, and written into the external VGA prediction map, where the same
// divided image of the next frame will read it as its predicted map. Moved
// positions that leave the divided image (or the frame) are dropped, and so
// are pixels whose label is not in use; pixels of the prediction map that
// nothing lands on keep their previous content.
// Pipelined: one pixel per cycle, raster order; label map read with 1-cycle
// latency; the write is registered, so `done` pulses two cycles after the
// last read. pm_addr is the raster address in the 640x480 frame.
// The published architecture gives the step and the external map; forward projection and
// the clipping to the divided image are this design's choices.
module prediction
  import seg_pkg::*;
#(
  parameter int AW  = 2*LOGB,
  parameter int PAW = $clog2(FRAME_W*FRAME_H)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [$clog2(BX)-1:0]   bx,
  input  logic [$clog2(BY)-1:0]   by,
  input  models_t                 models,
  input  logic [NLAB-1:0]         active,
  output logic [AW-1:0]           lab_addr,
  input  lmap_t                   lab_data,
  output logic                    pm_we,
  output logic [PAW-1:0]          pm_addr,
  output label_t                  pm_data,
  output logic                    busy,
  output logic                    done,
  output logic [15:0]             n_dropped,
  output logic [NLAB-1:0]         used
);

  logic            run, v1, last1;
  logic [LOGB-1:0] x, y, x1, y1;

  assign lab_addr = {y, x};
  assign busy     = run || v1 || pm_we;

  logic signed [47:0] px, py;
  coord u_coord (.x(x1), .y(y1), .theta(models[lab_data.cur]), .pos_x(px), .pos_y(py));

  logic signed [31:0] rx, ry, gx, gy;
  logic               keep;
  always_comb begin
    rx = 32'((px + 48'sd32768) >>> QF);
    ry = 32'((py + 48'sd32768) >>> QF);
    gx = rx + 32'(bx) * BLK;
    gy = ry + 32'(by) * BLK;
    keep = active[lab_data.cur] && rx >= 0 && ry >= 0 && rx < BLK && ry < BLK && gy < FRAME_H;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; v1 <= 1'b0; last1 <= 1'b0; x <= '0; y <= '0; x1 <= '0; y1 <= '0;
      pm_we <= 1'b0; pm_addr <= '0; pm_data <= '0; done <= 1'b0; n_dropped <= '0; used <= '0;
    end else begin
      done  <= 1'b0;
      v1    <= run;
      x1    <= x;
      y1    <= y;
      last1 <= run && (x == LOGB'(BLK-1)) && (y == LOGB'(BLK-1));
      if (start) begin
        run <= 1'b1; x <= '0; y <= '0; n_dropped <= '0; used <= '0;
      end else if (run) begin
        x <= x + 1'b1;
        if (x == LOGB'(BLK-1)) begin
          y <= y + 1'b1;
          if (y == LOGB'(BLK-1)) run <= 1'b0;
        end
      end
      pm_we   <= v1 && keep;
      pm_addr <= PAW'(gy * FRAME_W + gx);
      pm_data <= lab_data.cur;
      if (v1) used[lab_data.cur] <= 1'b1;
      if (v1 && !keep) n_dropped <= n_dropped + 1'b1;
      if (last1) done <= 1'b1;
    end
  end

endmodule
