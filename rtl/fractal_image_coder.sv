// fractal_image_coder: M x M processing units coding an image of
// (32*M) x (32*M) pixels, one unit per 32 x 32 sector.
//
// The image is split into sectors and every sector is coded by its own
// processing_unit; the units share nothing but the load bus and the level
// controls, and the union of their code streams is the fractal code of the
// image at one resolution level. A pyramid level smaller than the full image
// uses only the sectors it covers: `sector_en` selects which units `start`
// reaches. All started units run in lock step (1,296,000 cycles per level).
//
// Interface: in_addr and cover_addr are image-wide {row, col} addresses
// (pixels, and 2 x 2 range blocks); the upper bits pick the sector, the lower
// bits go to that unit. level_threshold is the contrast threshold U_i of the
// level. Codes leave per unit on output_data[s] with enable_output_data[s],
// s = sector row * M + sector column. busy is high while any unit works;
// done pulses when the started units finish.
// The sector split and one unit per sector follow the architecture; M (8,
// sized for a 256 x 256 image), the shared load bus and the sector-enable
// mask are this design's choices.
module fractal_image_coder
  import fic_pkg::*;
#(
  parameter int M = 8,
  parameter int SECTOR_PIX = 32,
  localparam int MW  = (M > 1) ? $clog2(M) : 1,
  localparam int CW  = $clog2(SECTOR_PIX),
  localparam int RW  = CW - 1,
  localparam int IW  = MW + CW   // image pixel coordinate bits
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable_input_data,
  input  logic [2*IW-1:0]  in_addr,      // {row, col} of the image
  input  logic [PIX_W-1:0] input_data,
  input  logic             cover_we,
  input  logic [2*IW-3:0]  cover_addr,   // {row, col} of the range-block grid
  input  logic             cover_bit,
  input  logic [7:0]       level_threshold,
  input  logic [M*M-1:0]   sector_en,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [M*M-1:0]   enable_output_data,
  output pu_code_t         output_data [M*M]
);

  logic [IW-1:0]   in_row, in_col;
  logic [IW-2:0]   cv_row, cv_col;
  logic [M*M-1:0]  pu_busy, pu_done;

  assign in_row = in_addr[2*IW-1:IW];
  assign in_col = in_addr[IW-1:0];
  assign cv_row = cover_addr[2*IW-3:IW-1];
  assign cv_col = cover_addr[IW-2:0];

  for (genvar sy = 0; sy < M; sy++) begin : g_row
    for (genvar sx = 0; sx < M; sx++) begin : g_col
      localparam int S = sy * M + sx;
      logic here_px, here_cv;
      assign here_px = (int'(in_row[IW-1:CW]) == sy) && (int'(in_col[IW-1:CW]) == sx);
      assign here_cv = (int'(cv_row[IW-2:RW]) == sy) && (int'(cv_col[IW-2:RW]) == sx);

      processing_unit #(.SECTOR_PIX(SECTOR_PIX)) u_pu (
        .clk                (clk),
        .rst_n              (rst_n),
        .enable_input_data  (enable_input_data && here_px),
        .in_addr            ({in_row[CW-1:0], in_col[CW-1:0]}),
        .input_data         (input_data),
        .cover_we           (cover_we && here_cv),
        .cover_addr         ({cv_row[RW-1:0], cv_col[RW-1:0]}),
        .cover_bit          (cover_bit),
        .level_threshold    (level_threshold),
        .start              (start && sector_en[S]),
        .busy               (pu_busy[S]),
        .done               (pu_done[S]),
        .enable_output_data (enable_output_data[S]),
        .output_data        (output_data[S])
      );
    end
  end

  assign busy = |pu_busy;
  assign done = |pu_done;

endmodule
