// sector_addr_decoder: splits a pixel address of the sector into its two
// parts, the sub-sector that holds the pixel and the pixel's relative
// position inside that sub-sector, and decodes the sub-sector into one-hot
// bank selects.
//
// The sector (SECTOR_PIX x SECTOR_PIX pixels) is split into 2 x 2
// sub-sectors, so the top bit of the row and of the column pick the
// sub-sector, numbered {row_half, col_half}, and the remaining bits are the
// relative position. Purely combinational.
module sector_addr_decoder #(
  parameter int SECTOR_PIX = 32,
  localparam int CW = $clog2(SECTOR_PIX),
  localparam int RW = CW - 1
) (
  input  logic [CW-1:0]   row,
  input  logic [CW-1:0]   col,
  output logic [1:0]      sub,
  output logic [3:0]      sub_sel,
  output logic [2*RW-1:0] rel
);

  assign sub     = {row[CW-1], col[CW-1]};
  assign sub_sel = 4'b0001 << sub;
  assign rel     = {row[RW-1:0], col[RW-1:0]};

endmodule
