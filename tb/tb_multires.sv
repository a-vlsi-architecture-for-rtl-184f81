// tb_multires: self-checking test of the half-resolution level builder.
// Streams random divided images (with idle gaps) and checks every output pixel
// against the rounded 2x2 mean, its address, the number of outputs and that
// each appears one cycle after its last input pixel.
module tb_multires;
  localparam int BLK = 128, AW1 = 2*$clog2(BLK/2);
  logic clk = 0, rst_n = 1, start = 0, iv = 0;
  logic [7:0] ip;
  logic ov; logic [AW1-1:0] oa; logic [7:0] op;
  int checks = 0, failures = 0, nout = 0;
  logic [7:0] img [BLK][BLK];
  int last_in_cycle, cyc = 0;

  multires #(.BLK(BLK)) dut (.clk, .rst_n, .start, .in_valid(iv), .in_pix(ip),
    .out_valid(ov), .out_addr(oa), .out_pix(op));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // reset edge before the first clock edge
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (ov) begin : chk
      int ox, oy, s;
      ox = int'(oa) % (BLK/2); oy = int'(oa) / (BLK/2);
      s = img[2*oy][2*ox] + img[2*oy][2*ox+1] + img[2*oy+1][2*ox] + img[2*oy+1][2*ox+1];
      checks++;
      if (op != 8'((s + 2) / 4)) begin
        failures++; if (failures < 5) $display("(%0d,%0d) got %0d exp %0d", ox, oy, op, (s+2)/4);
      end
      checks++;
      if (cyc != last_in_cycle + 1) failures++;
      nout++;
    end
    if (iv) last_in_cycle = cyc;
    cyc++;
  end

  initial begin
    ip = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int y = 0; y < BLK; y++) for (int x = 0; x < BLK; x++) img[y][x] = 8'($urandom);
      for (int y = 0; y < BLK; y++)
        for (int x = 0; x < BLK; x++) begin
          if ($urandom % 5 == 0) begin iv = 0; @(negedge clk); end
          iv = 1; ip = img[y][x];
          @(negedge clk);
        end
      iv = 0;
      repeat (4) @(negedge clk);
    end
    checks++;
    if (nout != 2 * (BLK/2) * (BLK/2)) begin failures++; $display("nout %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
