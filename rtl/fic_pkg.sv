// fic_pkg: types and constants shared by the fractal image coder.
//
// The coder compares 2x2-pixel range blocks with 4x4-pixel domain blocks that
// keep only their eight "chessboard" pixels (row + column odd). The contrast
// scale s is fixed at 0.5, so the luminance transform needs only shifts and
// adds. One range/domain comparison over all eight isometries takes a fixed
// 90-cycle schedule (4 + 8 + 1 + 8 + 64 + 1 + 4 cycles), given by the phases
// below. Pixel width (8 bits) and all internal widths are this design's
// choices; the block sizes, s = 0.5 and the schedule follow the architecture.
package fic_pkg;

  localparam int PIX_W    = 8;    // pixel bits
  localparam int DPIX_W   = 11;   // signed transformed domain pixel D' = D/2 + o
  localparam int BRIGHT_W = 10;   // signed bright offset o
  localparam int DIFF_W   = 9;    // |R - D'| <= 382
  localparam int MAD_W    = 12;   // sum of eight differences
  localparam int DPOS_W   = 4;    // domain row/column index, 0..14

  // Cycles of each phase of one range/domain comparison.
  localparam int RANGE_CYC  = 4;
  localparam int DOMAIN_CYC = 8;
  localparam int BRIGHT_CYC = 1;
  localparam int LUM_CYC    = 8;
  localparam int MAD_CYC    = 64; // 8 isometries x 8 pixel differences
  localparam int CMP_CYC    = 1;
  localparam int XFER_CYC   = 4;
  localparam int PAIR_CYC   = RANGE_CYC + DOMAIN_CYC + BRIGHT_CYC + LUM_CYC
                              + MAD_CYC + CMP_CYC + XFER_CYC;   // 90

  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_RANGE  = 3'd1,   // range capture and averaging
    PH_DOMAIN = 3'd2,   // domain capture and averaging
    PH_BRIGHT = 3'd3,   // o = mean(R) - s*mean(D)
    PH_LUM    = 3'd4,   // D' = s*D + o
    PH_MAD    = 3'd5,   // isometries and MAD
    PH_CMP    = 3'd6,   // last MAD comparison
    PH_XFER   = 3'd7    // fractal parameter transfer
  } phase_e;

  // Command word broadcast to the coding modules of a processing unit.
  typedef struct packed {
    phase_e     phase;
    logic [5:0] step;        // cycle index inside the phase
    logic       first_dom;   // first domain of the current range block
    logic       last_dom;    // last domain of the current range block
  } fcm_cmd_t;

  // Fractal code of one range block as kept by a coding module.
  typedef struct packed {
    logic [MAD_W-1:0]          mad;     // sum of the eight |R - D'| (MAD x 8)
    logic signed [BRIGHT_W-1:0] bright; // o
    logic [DPOS_W-1:0]         dom_row; // domain block row index in the sector
    logic [DPOS_W-1:0]         dom_col; // domain block column index
    logic [2:0]                iso;     // isometry, see range_block_reg
    logic                      belong;  // range is coded at this quad-tree level
  } fcm_code_t;

  // Code as it leaves the processing unit.
  typedef struct packed {
    logic [1:0] fcm;        // coding module = sub-sector
    logic [5:0] range_idx;  // range block {row[2:0], col[2:0]} in the sub-sector
    fcm_code_t  code;
  } pu_code_t;

  // Chessboard pixel k (0..7) of a 4x4 domain block, raster order over the
  // positions with row + column odd: (0,1) (0,3) (1,0) (1,2) (2,1) (2,3) (3,0) (3,2).
  function automatic logic [1:0] dom_row_of(input logic [2:0] k);
    return k[2:1];
  endfunction
  function automatic logic [1:0] dom_col_of(input logic [2:0] k);
    // odd rows start at column 0, even rows at column 1
    return {k[0], ~k[1]};
  endfunction
  // 2x2 quadrant (range pixel position {row,col}) that chessboard pixel k falls in.
  function automatic logic [1:0] dom_quad_of(input logic [2:0] k);
    return {k[2], k[0]};
  endfunction

endpackage
