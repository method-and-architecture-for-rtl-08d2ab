// tb_maxmin_comparator: checks the contrast classification (max - min of the
// four range pixels against the threshold, including contrast equal to the
// threshold, and the covered override) and the running minimum-MAD search:
// a random MAD stream with ties, where the first candidate of a range always
// loads and only a strictly lower MAD replaces the held parameters.
module tb_maxmin_comparator;
  import fic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  phase_e phase = PH_IDLE;
  logic [5:0] step = '0;
  logic first_dom = 1'b0;
  logic [7:0] pix_in = '0, threshold = '0;
  logic covered = 1'b0;
  logic [MAD_W-1:0] mad = '0;
  logic mad_valid = 1'b0;
  logic [2:0] mad_iso = '0;
  logic signed [BRIGHT_W-1:0] bright = '0;
  logic [DPOS_W-1:0] dom_row = '0, dom_col = '0;
  logic [7:0] max_pix, min_pix;
  fcm_code_t best;
  int checks = 0, failures = 0;

  maxmin_comparator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    fcm_code_t e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      automatic int mx = 0, mn = 255, thr;
      automatic bit cv = ($urandom_range(0, 3) == 0);
      for (int s = 0; s < 4; s++) begin
        automatic int v = $urandom_range(0, 255);
        if (t % 3 == 0) v = 100 + $urandom_range(0, 40);
        if (v > mx) mx = v;
        if (v < mn) mn = v;
        @(negedge clk); phase = PH_RANGE; step = 6'(s); pix_in = 8'(v);
      end
      // threshold exactly at, just below or random around the contrast
      case (t % 3)
        0: thr = mx - mn;
        1: thr = (mx - mn > 0) ? mx - mn - 1 : 0;
        default: thr = $urandom_range(0, 255);
      endcase
      @(negedge clk); phase = PH_BRIGHT; step = '0; threshold = 8'(thr); covered = cv;
      @(negedge clk); phase = PH_MAD;
      chk(max_pix == 8'(mx) && min_pix == 8'(mn), $sformatf("max/min %0d/%0d exp %0d/%0d", max_pix, min_pix, mx, mn));
      chk(best.belong == ((mx - mn <= thr) && !cv), $sformatf("belong %0b contrast %0d thr %0d cov %0b",
                                                              best.belong, mx - mn, thr, cv));
      e = best;
      for (int d = 0; d < 6; d++) begin
        for (int j = 0; j < 8; j++) begin
          automatic int m = $urandom_range(0, 60);
          @(negedge clk);
          first_dom = (d == 0);
          dom_row = 4'(d); dom_col = 4'(t % 15);
          bright = BRIGHT_W'(int'($urandom_range(0, 300)) - 100);
          mad = MAD_W'(m); mad_iso = 3'(j);
          mad_valid = 1'b1;
          if ((d == 0 && j == 0) || m < int'(e.mad)) begin
            e.mad = MAD_W'(m); e.iso = 3'(j); e.bright = bright; e.dom_row = dom_row; e.dom_col = dom_col;
          end
          // a cycle without a completed MAD must not change anything
          @(negedge clk);
          mad_valid = 1'b0;
          mad = '0;
          chk(best == e, $sformatf("best %h exp %h", best, e));
        end
      end
      first_dom = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
