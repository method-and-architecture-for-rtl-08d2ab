// arith_unit: the first adder of a fractal coding module ("AU").
//
// One adder, with its input selection driven by the command phase, does all
// per-pixel arithmetic of a range/domain comparison:
//   PH_RANGE  (4 cycles)  acc accumulates the four range pixels on pix_in
//   PH_DOMAIN (8 cycles)  the range sum moves to rsum; acc accumulates the
//                         eight chessboard domain pixels
//   PH_BRIGHT (1 cycle)   bright o = rsum/4 - (acc/8)/2, with s = 0.5
//   PH_LUM    (8 cycles)  lum_data = D/2 + o for the domain register being
//                         read, written back in place by the coding module
//   PH_MAD    (64 cycles) |R_iso - D'| for the range pixel and transformed
//                         domain pixel being read; registered with its tags,
//                         so it reaches the MAD adder one cycle later
// Means are taken by truncating shifts (rsum >> 2, acc >> 4): the rounding is
// this design's choice. There are no multipliers because s is fixed at 0.5.
module arith_unit
  import fic_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  phase_e                     phase,
  input  logic [5:0]                 step,
  input  logic [PIX_W-1:0]           pix_in,     // captured pixel
  input  logic [PIX_W-1:0]           rng_pix,    // range pixel after isometry
  input  logic signed [DPIX_W-1:0]   dom_pix,    // domain register read data
  output logic signed [BRIGHT_W-1:0] bright,
  output logic signed [DPIX_W-1:0]   lum_data,
  output logic [DIFF_W-1:0]          term,
  output logic                       term_valid,
  output logic                       term_first,
  output logic                       term_last,
  output logic [2:0]                 term_iso
);

  logic [PIX_W+2:0]           acc;    // up to 8 x 255
  logic [PIX_W+1:0]           rsum;   // up to 4 x 255
  logic signed [DPIX_W+1:0]   diff;

  assign lum_data = DPIX_W'(dom_pix >>> 1) + DPIX_W'(bright);
  assign diff     = (DPIX_W+2)'($signed({1'b0, rng_pix})) - (DPIX_W+2)'(dom_pix);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc        <= '0;
      rsum       <= '0;
      bright     <= '0;
      term       <= '0;
      term_valid <= 1'b0;
      term_first <= 1'b0;
      term_last  <= 1'b0;
      term_iso   <= '0;
    end else begin
      term_valid <= 1'b0;
      term_first <= 1'b0;
      term_last  <= 1'b0;
      unique case (phase)
        PH_RANGE:  acc <= (step == 6'd0 ? '0 : acc) + (PIX_W+3)'(pix_in);
        PH_DOMAIN: begin
          if (step == 6'd0) begin
            rsum <= acc[PIX_W+1:0];
            acc  <= (PIX_W+3)'(pix_in);
          end else begin
            acc  <= acc + (PIX_W+3)'(pix_in);
          end
        end
        PH_BRIGHT: bright <= BRIGHT_W'($signed({1'b0, rsum >> 2}))
                             - BRIGHT_W'($signed({1'b0, acc >> 4}));
        PH_MAD: begin
          term       <= DIFF_W'(diff < 0 ? -diff : diff);
          term_valid <= 1'b1;
          term_first <= (step[2:0] == 3'd0);
          term_last  <= (step[2:0] == 3'd7);
          term_iso   <= step[5:3];
        end
        default: ;
      endcase
    end
  end

endmodule
