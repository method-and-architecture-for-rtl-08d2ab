// image_sector_bank: register bank for one sub-sector of the image sector.
//
// Holds SUB_PIX x SUB_PIX pixels (16 x 16 in the architecture: a 32 x 32
// sector split into K^2 = 4 sub-sectors). Addresses are the pixel's relative
// position {row, col} inside the sub-sector. One synchronous write port loads
// the image; two combinational read ports serve the two kinds of block the
// processing unit extracts at the same time: a range pixel for the coding
// module that owns this sub-sector, and a domain pixel for the shared domain
// bus (a domain block may draw on all four sub-sectors). Having two read
// ports is this design's choice; the architecture names only the bank.
module image_sector_bank
  import fic_pkg::*;
#(
  parameter int SUB_PIX = 16,
  localparam int AW = 2 * $clog2(SUB_PIX)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [PIX_W-1:0] wdata,
  input  logic [AW-1:0]    rng_addr,
  output logic [PIX_W-1:0] rng_data,
  input  logic [AW-1:0]    dom_addr,
  output logic [PIX_W-1:0] dom_data
);

  logic [PIX_W-1:0] mem [SUB_PIX*SUB_PIX];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rng_data = mem[rng_addr];
  assign dom_data = mem[dom_addr];

endmodule
