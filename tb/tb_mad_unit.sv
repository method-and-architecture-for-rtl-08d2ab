// tb_mad_unit: streams groups of eight absolute differences, with gaps, and
// checks that the sum presented with the last term of each group equals the
// sum of that group only, with the isometry tag passed through.
module tb_mad_unit;
  import fic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [DIFF_W-1:0] term = '0;
  logic term_valid = 1'b0, term_first = 1'b0, term_last = 1'b0;
  logic [2:0] term_iso = '0;
  logic [MAD_W-1:0] mad;
  logic mad_valid;
  logic [2:0] mad_iso;
  int checks = 0, failures = 0;

  mad_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 300; g++) begin
      automatic int sum = 0;
      for (int i = 0; i < 8; i++) begin
        automatic int v = $urandom_range(0, 382);
        sum += v;
        @(negedge clk);
        term = DIFF_W'(v); term_valid = 1'b1;
        term_first = (i == 0); term_last = (i == 7); term_iso = 3'(g);
        #1;
        checks++;
        if (mad_valid != (i == 7)) begin
          failures++;
          $display("FAIL group %0d term %0d: mad_valid %0b", g, i, mad_valid);
        end
        if (i == 7) begin
          checks++;
          if (mad != MAD_W'(sum) || mad_iso != 3'(g)) begin
            failures++;
            $display("FAIL group %0d: mad %0d exp %0d", g, mad, sum);
          end
        end
      end
      // idle cycles between groups must not disturb the next sum
      @(negedge clk);
      term_valid = 1'b0; term_first = 1'b0; term_last = 1'b0;
      term = DIFF_W'($urandom_range(0, 382));
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
