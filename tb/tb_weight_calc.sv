// tb_weight_calc: self-checking test of the PSM weight rule.
// Random residuals around the threshold, in/out of block and active/inactive
// labels; the weight must be 1 exactly when the pixel is in the block, its
// label is in use and |r| <= C_TH grey levels (residual in quarter levels).
module tb_weight_calc;
  localparam int C_TH = 16, AW = 14;
  logic clk = 0, rst_n = 1, iv = 0, inb, act, ov, w;
  logic [AW-1:0] ai, ao;
  logic signed [15:0] dfd;
  int checks = 0, failures = 0, ones = 0;

  weight_calc #(.C_TH(C_TH), .AW(AW)) dut (.clk, .rst_n, .in_valid(iv), .addr_in(ai),
    .in_blk(inb), .active(act), .dfd, .out_valid(ov), .addr_out(ao), .w);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit e;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      iv = 1; ai = AW'($urandom); inb = ($urandom % 8) != 0; act = ($urandom % 8) != 0;
      dfd = 16'($signed($urandom % 161) - 80);
      e = inb && act && (dfd >= -64 && dfd <= 64);
      @(negedge clk);
      checks++;
      if (!ov || ao != ai || w != e) failures++;
      if (e) ones++;
    end
    checks++; if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
