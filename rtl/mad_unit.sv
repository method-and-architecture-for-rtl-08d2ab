// mad_unit: the second adder of a fractal coding module.
//
// Accumulates the absolute differences that arith_unit delivers, one per
// cycle, into the MAD of one isometry. A term tagged `first` restarts the sum;
// with a term tagged `last` the complete sum of the eight differences is
// presented combinationally on `mad` with `mad_valid`, in the same cycle, so
// the comparator can act on it at once. The sum is kept as 8 x MAD: dividing
// by the constant 8 would not change any comparison.
module mad_unit
  import fic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DIFF_W-1:0] term,
  input  logic              term_valid,
  input  logic              term_first,
  input  logic              term_last,
  input  logic [2:0]        term_iso,
  output logic [MAD_W-1:0]  mad,
  output logic              mad_valid,
  output logic [2:0]        mad_iso
);

  logic [MAD_W-1:0] acc;

  assign mad       = (term_first ? '0 : acc) + MAD_W'(term);
  assign mad_valid = term_valid && term_last;
  assign mad_iso   = term_iso;

  always_ff @(posedge clk) begin
    if (!rst_n)          acc <= '0;
    else if (term_valid) acc <= mad;
  end

endmodule
