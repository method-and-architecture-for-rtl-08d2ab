// fractal_coding_module: finds the best fractal transformation of one range
// block over a stream of domain blocks.
//
// The module is a datapath driven by the command word `cmd` that the
// processing unit broadcasts to all its coding modules. For each domain block
// the command runs the fixed 90-cycle schedule:
//   PH_RANGE   4  range pixels arrive on pix_in -> range_block_reg, summed,
//                 max/min tracked
//   PH_DOMAIN  8  chessboard domain pixels arrive on pix_in -> domain_block_reg,
//                 summed
//   PH_BRIGHT  1  o = mean(R) - mean(D)/2; contrast class registered
//   PH_LUM     8  each domain register is replaced by D' = D/2 + o
//   PH_MAD    64  for isometry j = step[5:3] and chessboard pixel k = step[2:0],
//                 |R_j(q) - D'(k)| where q is the 2x2 quadrant pixel k lies in,
//                 so every range pixel meets its two domain pixels
//   PH_CMP     1  pipeline slot: the MAD of the last isometry is compared
//   PH_XFER    4  the processing unit moves the codes out (idle here)
// The MAD uses two adders in a pipeline: arith_unit forms and registers each
// absolute difference, mad_unit adds it to the running sum one cycle later,
// and maxmin_comparator compares each completed sum as soon as it exists.
// `dom_row`/`dom_col` name the domain block being compared and must be held
// for the whole 90 cycles. `code` holds the best transformation found since
// the command flagged `first_dom`, plus the classification bit.
// The schedule and the two-adder split follow the architecture; the command
// encoding, the pixel order and the isometry numbering are this design's own.
module fractal_coding_module
  import fic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  fcm_cmd_t           cmd,
  input  logic [PIX_W-1:0]   pix_in,
  input  logic [DPOS_W-1:0]  dom_row,
  input  logic [DPOS_W-1:0]  dom_col,
  input  logic [7:0]         threshold,
  input  logic               covered,
  output fcm_code_t          code
);

  logic [PIX_W-1:0]           rng_pix;
  logic signed [DPIX_W-1:0]   dom_pix, lum_data, dom_wdata;
  logic                       dom_we;
  logic [2:0]                 dom_raddr;
  logic [1:0]                 rng_raddr;
  logic signed [BRIGHT_W-1:0] bright;
  logic [DIFF_W-1:0]          term;
  logic                       term_valid, term_first, term_last;
  logic [2:0]                 term_iso;
  logic [MAD_W-1:0]           mad;
  logic                       mad_valid;
  logic [2:0]                 mad_iso;

  // Domain register file: raw pixels in PH_DOMAIN, D' written back in PH_LUM.
  assign dom_we    = (cmd.phase == PH_DOMAIN) || (cmd.phase == PH_LUM);
  assign dom_wdata = (cmd.phase == PH_DOMAIN) ? DPIX_W'($signed({1'b0, pix_in})) : lum_data;
  assign dom_raddr = cmd.step[2:0];
  // Range pixel compared with domain pixel k: the one in k's quadrant.
  assign rng_raddr = dom_quad_of(cmd.step[2:0]);

  range_block_reg u_range (
    .clk   (clk),
    .we    (cmd.phase == PH_RANGE),
    .waddr (cmd.step[1:0]),
    .wdata (pix_in),
    .iso   (cmd.step[5:3]),
    .raddr (rng_raddr),
    .rdata (rng_pix)
  );

  domain_block_reg u_domain (
    .clk   (clk),
    .we    (dom_we),
    .waddr (cmd.step[2:0]),
    .wdata (dom_wdata),
    .raddr (dom_raddr),
    .rdata (dom_pix)
  );

  arith_unit u_au (
    .clk        (clk),
    .rst_n      (rst_n),
    .phase      (cmd.phase),
    .step       (cmd.step),
    .pix_in     (pix_in),
    .rng_pix    (rng_pix),
    .dom_pix    (dom_pix),
    .bright     (bright),
    .lum_data   (lum_data),
    .term       (term),
    .term_valid (term_valid),
    .term_first (term_first),
    .term_last  (term_last),
    .term_iso   (term_iso)
  );

  mad_unit u_mad (
    .clk        (clk),
    .rst_n      (rst_n),
    .term       (term),
    .term_valid (term_valid),
    .term_first (term_first),
    .term_last  (term_last),
    .term_iso   (term_iso),
    .mad        (mad),
    .mad_valid  (mad_valid),
    .mad_iso    (mad_iso)
  );

  maxmin_comparator u_cmp (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase     (cmd.phase),
    .step      (cmd.step),
    .first_dom (cmd.first_dom),
    .pix_in    (pix_in),
    .threshold (threshold),
    .covered   (covered),
    .mad       (mad),
    .mad_valid (mad_valid),
    .mad_iso   (mad_iso),
    .bright    (bright),
    .dom_row   (dom_row),
    .dom_col   (dom_col),
    .max_pix   (),
    .min_pix   (),
    .best      (code)
  );

endmodule
