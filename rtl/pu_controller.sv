// pu_controller: sequencer of a processing unit.
//
// After `start` it visits every range block position of a sub-sector
// (RPS x RPS, 8 x 8 at the default size) and, for each, every domain block of
// the sector (DOM_SIDE x DOM_SIDE, 15 x 15: 4 x 4-pixel blocks on a 2-pixel
// grid, which is the local search window with L = 7). For each pair it issues
// the 90-cycle command sequence PH_RANGE .. PH_XFER that the four coding
// modules execute in lock step, so a sector takes
//   RPS^2 * DOM_SIDE^2 * 90 cycles (1,296,000 at the default size).
// Besides the command word it drives the pixel addresses that go with it:
//   rng_rel  relative position, inside every sub-sector, of range pixel
//            `step` (PH_RANGE), in {row,col} raster order of the 2x2 block
//   dom_row_pix / dom_col_pix  sector coordinates of chessboard pixel `step`
//            of the current domain block (PH_DOMAIN)
// `done` pulses in the last cycle of the sector; `busy` is high from the
// cycle after `start` until then. The loop order (ranges outer, domains
// inner) and the command encoding are this design's choices.
module pu_controller
  import fic_pkg::*;
#(
  parameter int SECTOR_PIX = 32,
  localparam int CW       = $clog2(SECTOR_PIX),
  localparam int RW       = CW - 1,             // sub-sector coordinate bits
  localparam int RPS      = SECTOR_PIX / 4,     // range blocks per sub-sector side
  localparam int RIW      = $clog2(RPS),
  localparam int DOM_SIDE = SECTOR_PIX / 2 - 1  // domain blocks per sector side
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output fcm_cmd_t          cmd,
  output logic [RIW-1:0]    rng_row,   // current range block in the sub-sector
  output logic [RIW-1:0]    rng_col,
  output logic [DPOS_W-1:0] dom_row,   // current domain block in the sector
  output logic [DPOS_W-1:0] dom_col,
  output logic [2*RW-1:0]   rng_rel,
  output logic [CW-1:0]     dom_row_pix,
  output logic [CW-1:0]     dom_col_pix
);

  phase_e     phase;
  logic [5:0] step;
  logic [5:0] last_step;
  phase_e     next_phase;
  logic       last_dom, last_rng;

  always_comb begin
    unique case (phase)
      PH_RANGE:  begin last_step = 6'(RANGE_CYC  - 1); next_phase = PH_DOMAIN; end
      PH_DOMAIN: begin last_step = 6'(DOMAIN_CYC - 1); next_phase = PH_BRIGHT; end
      PH_BRIGHT: begin last_step = 6'(BRIGHT_CYC - 1); next_phase = PH_LUM;    end
      PH_LUM:    begin last_step = 6'(LUM_CYC    - 1); next_phase = PH_MAD;    end
      PH_MAD:    begin last_step = 6'(MAD_CYC    - 1); next_phase = PH_CMP;    end
      PH_CMP:    begin last_step = 6'(CMP_CYC    - 1); next_phase = PH_XFER;   end
      PH_XFER:   begin last_step = 6'(XFER_CYC   - 1); next_phase = PH_RANGE;  end
      default:   begin last_step = '0;                 next_phase = PH_IDLE;   end
    endcase
  end

  assign last_dom = (dom_row == DPOS_W'(DOM_SIDE - 1)) && (dom_col == DPOS_W'(DOM_SIDE - 1));
  assign last_rng = (rng_row == RIW'(RPS - 1)) && (rng_col == RIW'(RPS - 1));

  assign busy          = (phase != PH_IDLE);
  assign done          = (phase == PH_XFER) && (step == last_step) && last_dom && last_rng;
  assign cmd.phase     = phase;
  assign cmd.step      = step;
  assign cmd.first_dom = (dom_row == '0) && (dom_col == '0);
  assign cmd.last_dom  = last_dom;

  assign rng_rel     = {RW'({rng_row, step[1]}), RW'({rng_col, step[0]})};
  assign dom_row_pix = CW'({dom_row, 1'b0}) + CW'(dom_row_of(step[2:0]));
  assign dom_col_pix = CW'({dom_col, 1'b0}) + CW'(dom_col_of(step[2:0]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= PH_IDLE;
      step    <= '0;
      rng_row <= '0;
      rng_col <= '0;
      dom_row <= '0;
      dom_col <= '0;
    end else if (phase == PH_IDLE) begin
      if (start) begin
        phase   <= PH_RANGE;
        step    <= '0;
        rng_row <= '0;
        rng_col <= '0;
        dom_row <= '0;
        dom_col <= '0;
      end
    end else if (step != last_step) begin
      step <= step + 6'd1;
    end else begin
      step  <= '0;
      phase <= next_phase;
      if (phase == PH_XFER) begin
        // advance to the next domain block, then the next range block
        if (!last_dom) begin
          if (dom_col == DPOS_W'(DOM_SIDE - 1)) begin
            dom_col <= '0;
            dom_row <= dom_row + 1'b1;
          end else begin
            dom_col <= dom_col + 1'b1;
          end
        end else begin
          dom_row <= '0;
          dom_col <= '0;
          if (last_rng) begin
            phase <= PH_IDLE;
          end else if (rng_col == RIW'(RPS - 1)) begin
            rng_col <= '0;
            rng_row <= rng_row + 1'b1;
          end else begin
            rng_col <= rng_col + 1'b1;
          end
        end
      end
    end
  end

  // The phase always advances in schedule order.
  a_phase_order: assert property (@(posedge clk) disable iff (!rst_n)
    (phase != PH_IDLE && step == last_step) |=> (phase == $past(next_phase)) || (phase == PH_IDLE));

endmodule
