// tb_seq_ctrl: self-checking test of the two-stage sequence controller.
// Stage A and stage B are modelled by random busy times. The test checks that
// stage B always receives the divided image stage A finished in the step
// before, that the banks swap at every step, that a stage never starts while
// busy, that the stages overlap, that the frame counter advances after NBLK
// divided images, and that the pipeline drains and goes idle when run drops.
module tb_seq_ctrl;
  localparam int NBLK = 20, BW = 5;
  logic clk = 0, rst_n = 1, run = 0, a_done = 0, b_done = 0;
  logic bank, a_start, b_start, a_valid, b_valid, idle;
  logic [BW-1:0] a_blk, b_blk;
  logic [15:0] frame;
  int checks = 0, failures = 0;

  seq_ctrl #(.NBLK(NBLK)) dut (.clk, .rst_n, .run, .a_done, .b_done, .bank, .a_start,
    .b_start, .a_valid, .b_valid, .a_blk, .b_blk, .frame, .idle);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // stage models
  int a_cnt = -1, b_cnt = -1, n_a = 0, n_b = 0, overlap = 0, swaps = 0;
  logic [BW-1:0] a_done_blk, a_cur, b_cur;
  logic a_fin_valid = 0, prev_bank = 0;
  int a_bank, a_fin_bank;
  always @(posedge clk) if (rst_n) begin
    a_done <= 0; b_done <= 0;
    if (a_start) begin
      checks++; if (a_cnt >= 0) failures++;
      a_cnt <= 5 + ($urandom % 40); a_cur <= a_blk; a_bank = bank; n_a++;
    end else if (a_cnt > 0) a_cnt <= a_cnt - 1;
    else if (a_cnt == 0) begin a_done <= 1; a_cnt <= -1; a_done_blk <= a_cur; a_fin_bank <= a_bank; a_fin_valid <= 1; end
    if (b_start) begin
      checks++; if (b_cnt >= 0) failures++;
      // B gets the image A finished, on the other bank
      checks++; if (!a_fin_valid || b_blk != a_done_blk || ~bank != 1'(a_fin_bank)) failures++;
      b_cnt <= 5 + ($urandom % 40); b_cur <= b_blk; n_b++;
    end else if (b_cnt > 0) b_cnt <= b_cnt - 1;
    else if (b_cnt == 0) begin b_done <= 1; b_cnt <= -1; end
    if (a_cnt > 0 && b_cnt > 0) overlap++;
    if (bank != prev_bank) swaps++;
    prev_bank <= bank;
  end

  initial begin
    int cyc;
    repeat (3) @(negedge clk); rst_n = 1; run = 1;
    cyc = 0;
    while (frame != 16'd2 && cyc < 100000) begin @(negedge clk); cyc++; end
    checks++; if (frame != 16'd2) failures++;
    checks++; if (a_blk != '0) failures++;
    run = 0;
    cyc = 0;
    while (!idle && cyc < 1000) begin @(negedge clk); cyc++; end
    repeat (5) @(negedge clk);
    $display("seq_ctrl: A runs %0d, B runs %0d, overlap cycles %0d, swaps %0d, idle %b",
             n_a, n_b, overlap, swaps, idle);
    checks++; if (!idle) failures++;
    checks++; if (n_b != n_a) failures++;
    checks++; if (n_a < 2*NBLK) failures++;
    checks++; if (overlap == 0) failures++;
    checks++; if (swaps < n_b - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
