// domain_block_reg: eight registers holding one chessboard-down-sampled
// 4x4 domain block.
//
// Only the eight pixels whose row + column is odd are kept, so eight
// registers suffice. Register k holds chessboard pixel k in raster order (see
// fic_pkg::dom_row_of / dom_col_of). The registers are signed and wider than a
// pixel because the coding module overwrites each raw pixel with its
// luminance-transformed value D' = D/2 + o, which may be negative or above 255.
// `we`/`waddr` form the write decoder; the read port is combinational.
module domain_block_reg
  import fic_pkg::*;
(
  input  logic                     clk,
  input  logic                     we,
  input  logic [2:0]               waddr,
  input  logic signed [DPIX_W-1:0] wdata,
  input  logic [2:0]               raddr,
  output logic signed [DPIX_W-1:0] rdata
);

  logic signed [DPIX_W-1:0] pix [8];

  always_ff @(posedge clk) begin
    if (we) pix[waddr] <= wdata;
  end

  assign rdata = pix[raddr];

endmodule
