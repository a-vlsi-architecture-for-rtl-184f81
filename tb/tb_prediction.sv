// tb_prediction: self-checking test of the label-map prediction.
// A label map with a square region (label 1, moving right/up with a slight
// zoom), a stripe of an unused label (2) and background (label 0, still) is
// projected for the divided image at column 4, row 3 of the frame (its lower
// part lies below the 480-line frame). A reference written in the testbench
// computes the expected prediction map; the test compares the whole map, the
// number of dropped pixels, the `used` flags and the rate of one pixel per
// cycle (done no later than BLK*BLK + 4 cycles after start).
module tb_prediction;
  import seg_pkg::*;
  localparam int PAW = $clog2(FRAME_W*FRAME_H);
  logic clk = 0, rst_n = 1, start = 0;
  logic [2:0] bx = 3'd4;
  logic [1:0] by = 2'd3;
  models_t models;
  logic [NLAB-1:0] active = 4'b0011;
  logic [13:0] lab_addr;
  lmap_t lab_data;
  logic pm_we, busy, done;
  logic [PAW-1:0] pm_addr;
  label_t pm_data;
  logic [15:0] n_dropped;
  logic [NLAB-1:0] used;

  label_t lm  [BLK*BLK];
  label_t pm  [FRAME_W*FRAME_H];
  label_t ref_pm [FRAME_W*FRAME_H];
  int checks = 0, failures = 0;

  prediction dut (.clk, .rst_n, .start, .bx, .by, .models, .active, .lab_addr, .lab_data,
    .pm_we, .pm_addr, .pm_data, .busy, .done, .n_dropped, .used);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  always_ff @(posedge clk) begin
    lab_data <= '{pred: 2'd0, cur: lm[lab_addr]};
    if (pm_we) pm[pm_addr] <= pm_data;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, drop, nbad, nw;
    longint px, py, xc, yc;
    int rx, ry;
    bit keep;
    models = '0;
    models[1][0] = 32'sd196608 + 32'($urandom % 20000);   // a1 ~ 3.0..3.3
    models[1][1] = 32'sd1024;                              // a2 = 1/64
    models[1][3] = -32'sd131072 - 32'($urandom % 20000);  // a4 ~ -2.0..-2.3
    models[1][5] = 32'sd512;                               // a6 = 1/128
    models[2][0] = 32'sd500000;
    for (int i = 0; i < FRAME_W*FRAME_H; i++) begin
      pm[i] = 2'(3); ref_pm[i] = 2'(3);
    end
    for (int y = 0; y < BLK; y++)
      for (int x = 0; x < BLK; x++)
        lm[y*BLK+x] = (x >= 40 && x < 80 && y >= 30 && y < 70) ? 2'd1 :
                      (x < 3 ? 2'd2 : 2'd0);
    // reference
    drop = 0;
    for (int y = 0; y < BLK; y++)
      for (int x = 0; x < BLK; x++) begin
        label_t l;
        l = lm[y*BLK+x];
        xc = x - 64; yc = y - 64;
        px = (longint'(x) <<< 16) + models[l][0] + models[l][1]*xc + models[l][2]*yc;
        py = (longint'(y) <<< 16) + models[l][3] + models[l][4]*xc + models[l][5]*yc;
        rx = int'((px + 32768) >>> 16); ry = int'((py + 32768) >>> 16);
        keep = active[l] && rx >= 0 && ry >= 0 && rx < BLK && ry < BLK && (ry + 384) < FRAME_H;
        if (keep) ref_pm[(ry + 384)*FRAME_W + rx + 512] = l;
        else drop++;
      end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    nbad = 0; nw = 0;
    for (int i = 0; i < FRAME_W*FRAME_H; i++) begin
      if (pm[i] != ref_pm[i]) nbad++;
      if (pm[i] != 2'(3)) nw++;
    end
    $display("prediction: cycles %0d written %0d mismatches %0d dropped %0d (ref %0d) used %b",
             cyc, nw, nbad, n_dropped, drop, used);
    checks++; if (nbad != 0) failures++;
    checks++; if (nw < 1000) failures++;
    checks++; if (n_dropped != 16'(drop) || drop == 0) failures++;
    checks++; if (used != 4'b0111) failures++;
    checks++; if (cyc > BLK*BLK + 4 || cyc < BLK*BLK) failures++;
    checks++; if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
