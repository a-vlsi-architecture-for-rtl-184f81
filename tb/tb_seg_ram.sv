// tb_seg_ram: self-checking test of the multi-read-port memory.
// Writes random words to random addresses while reading on every port, and
// compares each read (one cycle later) with a reference array, including
// reads of an address written in the same cycle (old word expected).
module tb_seg_ram;
  localparam int DW = 8, DEPTH = 20480, NRD = 4, AW = $clog2(DEPTH);
  logic clk = 0, we;
  logic [AW-1:0] wa;
  logic [DW-1:0] wd;
  logic [NRD-1:0][AW-1:0] ra;
  logic [NRD-1:0][DW-1:0] rd;
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_m [DEPTH];
  logic [NRD-1:0][DW-1:0] expd;

  seg_ram #(.DW(DW), .DEPTH(DEPTH), .NRD(NRD)) dut (
    .clk, .we, .wr_addr(wa), .wr_data(wd), .rd_addr(ra), .rd_data(rd));

  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; wa = '0; wd = '0; ra = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; wa = AW'(a); wd = DW'($urandom); ref_m[a] = wd;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1;
      wa = AW'($urandom % DEPTH); wd = DW'($urandom);
      for (int p = 0; p < NRD; p++) ra[p] = (t % 7 == 0) ? wa : AW'($urandom % DEPTH);
      for (int p = 0; p < NRD; p++) expd[p] = ref_m[ra[p]];
      if (we) ref_m[wa] = wd;
      @(posedge clk); #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rd[p] !== expd[p]) begin
          failures++;
          if (failures < 5) $display("port %0d addr %0d got %h exp %h", p, ra[p], rd[p], expd[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
