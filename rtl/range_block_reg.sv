// range_block_reg: the four pixel registers of a 2x2 range block.
//
// A write decoder stores the pixel on `wdata` into register `waddr` (position
// {row,col}) when `we` is high. The read port returns the pixel that lands on
// position `raddr` after isometry `iso` is applied to the block, so the coding
// module can match the fixed domain block against all eight rotations and
// reflections of the range block. Reads are combinational.
//
// Isometry numbering (a choice of this design; only the count of eight is
// given): 0 identity, 1 rotate 90 clockwise, 2 rotate 180, 3 rotate 270,
// 4 mirror left-right, 5 mirror top-bottom, 6 transpose, 7 anti-transpose.
// The table gives, for each output position 0..3 = (0,0) (0,1) (1,0) (1,1),
// which stored pixel appears there.
module range_block_reg
  import fic_pkg::*;
(
  input  logic             clk,
  input  logic             we,
  input  logic [1:0]       waddr,
  input  logic [PIX_W-1:0] wdata,
  input  logic [2:0]       iso,
  input  logic [1:0]       raddr,
  output logic [PIX_W-1:0] rdata
);

  logic [PIX_W-1:0] pix [4];
  logic [1:0]       src;

  always_ff @(posedge clk) begin
    if (we) pix[waddr] <= wdata;
  end

  always_comb begin
    unique case ({iso, raddr})
      // identity
      5'b000_00: src = 2'd0;  5'b000_01: src = 2'd1;  5'b000_10: src = 2'd2;  5'b000_11: src = 2'd3;
      // rotate 90 clockwise
      5'b001_00: src = 2'd2;  5'b001_01: src = 2'd0;  5'b001_10: src = 2'd3;  5'b001_11: src = 2'd1;
      // rotate 180
      5'b010_00: src = 2'd3;  5'b010_01: src = 2'd2;  5'b010_10: src = 2'd1;  5'b010_11: src = 2'd0;
      // rotate 270
      5'b011_00: src = 2'd1;  5'b011_01: src = 2'd3;  5'b011_10: src = 2'd0;  5'b011_11: src = 2'd2;
      // mirror left-right
      5'b100_00: src = 2'd1;  5'b100_01: src = 2'd0;  5'b100_10: src = 2'd3;  5'b100_11: src = 2'd2;
      // mirror top-bottom
      5'b101_00: src = 2'd2;  5'b101_01: src = 2'd3;  5'b101_10: src = 2'd0;  5'b101_11: src = 2'd1;
      // transpose
      5'b110_00: src = 2'd0;  5'b110_01: src = 2'd2;  5'b110_10: src = 2'd1;  5'b110_11: src = 2'd3;
      // anti-transpose
      5'b111_00: src = 2'd3;  5'b111_01: src = 2'd1;  5'b111_10: src = 2'd2;  5'b111_11: src = 2'd0;
      default:   src = 2'd0;
    endcase
    rdata = pix[src];
  end

endmodule
