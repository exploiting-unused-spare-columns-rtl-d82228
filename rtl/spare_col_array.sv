// spare_col_array: memory array with regular and spare columns.
//
// WORDS rows of WIDTH cells: the regular columns of the codeword followed by the spare columns.
// It is a plain single-port array with a per-bit write enable, so that the defect-information
// column can be written on its own and ordinary writes leave it alone. Cell defects are a
// property of the physical macro and are not modelled here.
//
// Interface: en_i starts an access at addr_i; with we_i the bits selected by wmask_i take
//            wdata_i; rdata_o is the word read.
// Timing: synchronous; rdata_o holds the row addressed on the previous enabled edge (read
//         before write on the same edge). No reset: the contents are undefined until written.
// The array organisation (regular plus spare columns) is the scheme's; the port and timing
// are this design's own.
module spare_col_array #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 43,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             en_i,
  input  logic             we_i,
  input  logic [AW-1:0]    addr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic [WIDTH-1:0] wmask_i,
  output logic [WIDTH-1:0] rdata_o
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en_i) begin
      rdata_o <= mem[addr_i];
      if (we_i) mem[addr_i] <= (mem[addr_i] & ~wmask_i) | (wdata_i & wmask_i);
    end
  end
endmodule
