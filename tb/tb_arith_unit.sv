// tb_arith_unit: drives the phases of one comparison with random pixels and
// checks the bright o = floor(sum R / 4) - floor(sum D / 16), the luminance
// transform D/2 + o (arithmetic shift) and the registered |R - D'| with its
// first/last/isometry tags, one cycle after each MAD step.
module tb_arith_unit;
  import fic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  phase_e phase = PH_IDLE;
  logic [5:0] step = '0;
  logic [7:0] pix_in = '0, rng_pix = '0;
  logic signed [DPIX_W-1:0] dom_pix = '0;
  logic signed [BRIGHT_W-1:0] bright;
  logic signed [DPIX_W-1:0] lum_data;
  logic [DIFF_W-1:0] term;
  logic term_valid, term_first, term_last;
  logic [2:0] term_iso;
  int checks = 0, failures = 0;

  arith_unit dut (.*);
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
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      automatic int rs = 0, ds = 0, o;
      for (int s = 0; s < 4; s++) begin
        automatic int v = (t % 4 == 0) ? 255 : $urandom_range(0, 255);
        rs += v;
        @(negedge clk); phase = PH_RANGE; step = 6'(s); pix_in = 8'(v);
      end
      for (int s = 0; s < 8; s++) begin
        automatic int v = (t % 4 == 1) ? 255 : $urandom_range(0, 255);
        ds += v;
        @(negedge clk); phase = PH_DOMAIN; step = 6'(s); pix_in = 8'(v);
      end
      @(negedge clk); phase = PH_BRIGHT; step = '0;
      @(negedge clk); phase = PH_LUM;
      o = rs / 4 - ds / 16;
      chk(int'(bright) == o, $sformatf("bright %0d exp %0d", bright, o));
      for (int s = 0; s < 8; s++) begin
        automatic int d = $urandom_range(0, 255);
        step = 6'(s); dom_pix = DPIX_W'(d);
        #1;
        chk(int'(lum_data) == d / 2 + o, $sformatf("lum %0d exp %0d", lum_data, d / 2 + o));
        @(negedge clk);
      end
      for (int s = 0; s < 64; s++) begin
        automatic int r = $urandom_range(0, 255), d = int'($urandom_range(0, 509)) - 127, e;
        phase = PH_MAD; step = 6'(s); rng_pix = 8'(r); dom_pix = DPIX_W'(d);
        e = (r > d) ? r - d : d - r;
        @(negedge clk);
        chk(term_valid && int'(term) == e && term_first == (s % 8 == 0) && term_last == (s % 8 == 7)
            && term_iso == 3'(s / 8), $sformatf("term %0d exp %0d step %0d", term, e, s));
      end
      phase = PH_CMP;
      @(negedge clk);
      chk(!term_valid, "term_valid after MAD phase");
      phase = PH_XFER;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
