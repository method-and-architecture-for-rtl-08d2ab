// maxmin_comparator: the comparator of a fractal coding module.
//
// Two jobs share this block:
//  * Block classification. While the range block is captured (PH_RANGE) it
//    tracks the largest and smallest pixel. In PH_BRIGHT it registers
//    `belong` = (max - min <= threshold) && !covered: the range is coded at
//    the current quad-tree level when its contrast does not exceed the level
//    threshold U_i and no coarser level has already coded the zone. Using
//    max - min as the contrast measure is this design's choice.
//  * Best-transformation search. Each time mad_unit completes the MAD of an
//    isometry (mad_valid) it is compared with the lowest MAD held so far for
//    this range block; a strictly lower value (or the first candidate of the
//    range, isometry 0 of its first domain) replaces the held MAD, bright,
//    domain position and isometry. Ties keep the earlier candidate.
// All results are registered; `best` is final after the PH_CMP cycle of the
// last domain of a range block.
module maxmin_comparator
  import fic_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  phase_e                     phase,
  input  logic [5:0]                 step,
  input  logic                       first_dom,
  input  logic [PIX_W-1:0]           pix_in,
  input  logic [7:0]                 threshold,
  input  logic                       covered,
  input  logic [MAD_W-1:0]           mad,
  input  logic                       mad_valid,
  input  logic [2:0]                 mad_iso,
  input  logic signed [BRIGHT_W-1:0] bright,
  input  logic [DPOS_W-1:0]          dom_row,
  input  logic [DPOS_W-1:0]          dom_col,
  output logic [PIX_W-1:0]           max_pix,
  output logic [PIX_W-1:0]           min_pix,
  output fcm_code_t                  best
);

  logic take;
  assign take = mad_valid && ((first_dom && mad_iso == 3'd0) || (mad < best.mad));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      max_pix <= '0;
      min_pix <= '0;
      best    <= '0;
    end else begin
      if (phase == PH_RANGE) begin
        if (step == 6'd0) begin
          max_pix <= pix_in;
          min_pix <= pix_in;
        end else begin
          if (pix_in > max_pix) max_pix <= pix_in;
          if (pix_in < min_pix) min_pix <= pix_in;
        end
      end
      if (phase == PH_BRIGHT)
        best.belong <= ((max_pix - min_pix) <= threshold) && !covered;
      if (take) begin
        best.mad     <= mad;
        best.iso     <= mad_iso;
        best.bright  <= bright;
        best.dom_row <= dom_row;
        best.dom_col <= dom_col;
      end
    end
  end

endmodule
