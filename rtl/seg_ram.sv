// seg_ram: on-chip memory used for every internal memory of the processor
// (first/second image banks with their pyramid levels, label map banks, the
// PSM weight memories).
//
// One write port and NRD independent read ports, all synchronous to clk.
// A read returns the word at rd_addr one cycle later (registered output).
// A read and a write of the same address in one cycle return the old word.
// The number of read ports is this design's choice: the second image needs
// four (the 2x2 neighbourhood of an interpolated position), the others one.
module seg_ram #(
  parameter int DW    = 8,
  parameter int DEPTH = 20480,
  parameter int NRD   = 1,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic [AW-1:0]          wr_addr,
  input  logic [DW-1:0]          wr_data,
  input  logic [NRD-1:0][AW-1:0] rd_addr,
  output logic [NRD-1:0][DW-1:0] rd_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && ({1'b0, wr_addr} < (AW+1)'(DEPTH))) mem[wr_addr] <= wr_data;
  end

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    always_ff @(posedge clk) begin
      rd_data[p] <= ({1'b0, rd_addr[p]} < (AW+1)'(DEPTH)) ? mem[rd_addr[p]] : '0;
    end
  end

endmodule
