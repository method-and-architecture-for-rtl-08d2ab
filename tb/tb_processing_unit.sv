// tb_processing_unit: end-to-end test of one processing unit at its default
// size (32 x 32-pixel sector, four coding modules, 8 x 8 range blocks each,
// 15 x 15 domain blocks).
//
// Each run loads a sector made of flat and textured 4 x 4 tiles, a random
// covered map and a level threshold, codes it, and compares the 256 codes
// that come out with a reference model written here from the definition of
// the method: means by truncation, o = mean(R) - mean(D)/2, D' = D/2 + o on
// the chessboard pixels, MAD over the eight isometries of the range block,
// lowest MAD kept (first one on ties), class = contrast <= threshold and not
// covered. It also checks the order of the codes and that a sector takes
// 64 x 225 x 90 cycles. Two runs use two levels (threshold 40 and 255) to
// switch the classification; the mechanisms exercised are counted and each
// must occur at least once.
module tb_processing_unit;
  import fic_pkg::*;

  localparam int SP   = 32;
  localparam int NDOM = SP / 2 - 1;
  localparam int RPS  = SP / 4;
  localparam int SECTOR_CYCLES = RPS * RPS * NDOM * NDOM * 90;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable_input_data = 1'b0;
  logic [9:0] in_addr = '0;
  logic [7:0] input_data = '0;
  logic cover_we = 1'b0;
  logic [7:0] cover_addr = '0;
  logic cover_bit = 1'b0;
  logic [7:0] level_threshold = '0;
  logic start = 1'b0;
  logic busy, done, enable_output_data;
  pu_code_t output_data;

  processing_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_belong = 0, n_contrast_reject = 0, n_covered_reject = 0;
  int n_iso_nonzero = 0, n_neg_bright = 0, n_threshold_switch = 0;
  int img [SP][SP];
  bit cov [SP/2][SP/2];

  initial begin : watchdog
    repeat (3 * SECTOR_CYCLES + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Source position in the 2x2 range block for output position (r,c), isometry j.
  function automatic int iso_src(input int j, input int r, input int c);
    int sr, sc;
    case (j)
      0: begin sr = r;     sc = c;     end
      1: begin sr = 1 - c; sc = r;     end  // rotate 90 clockwise
      2: begin sr = 1 - r; sc = 1 - c; end
      3: begin sr = c;     sc = 1 - r; end
      4: begin sr = r;     sc = 1 - c; end
      5: begin sr = 1 - r; sc = c;     end
      6: begin sr = c;     sc = r;     end
      default: begin sr = 1 - c; sc = 1 - r; end
    endcase
    return 2 * sr + sc;
  endfunction

  function automatic fcm_code_t ref_code(input int k, input int rr, input int rc, input int thr);
    fcm_code_t c;
    int r[4], rsum, mx, mn, best, first;
    int top = 16 * (k / 2) + 2 * rr, left = 16 * (k % 2) + 2 * rc;
    c = '0;
    rsum = 0; mx = 0; mn = 255;
    for (int q = 0; q < 4; q++) begin
      r[q] = img[top + q / 2][left + q % 2];
      rsum += r[q];
      if (r[q] > mx) mx = r[q];
      if (r[q] < mn) mn = r[q];
    end
    c.belong = ((mx - mn) <= thr) && !cov[top / 2][left / 2];
    first = 1;
    best = 0;
    for (int dr = 0; dr < NDOM; dr++)
      for (int dc = 0; dc < NDOM; dc++) begin
        int d[8], dq[8], dsum, o, n;
        dsum = 0; n = 0;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++)
            if ((y + x) % 2 == 1) begin
              d[n] = img[2 * dr + y][2 * dc + x];
              dq[n] = 2 * (y / 2) + (x / 2);
              dsum += d[n];
              n++;
            end
        o = (rsum / 4) - (dsum / 16);
        for (int j = 0; j < 8; j++) begin
          int mad = 0;
          for (int i = 0; i < 8; i++) begin
            int rv = r[iso_src(j, dq[i] / 2, dq[i] % 2)];
            int dv = (d[i] / 2) + o;
            mad += (rv > dv) ? rv - dv : dv - rv;
          end
          if (first || mad < best) begin
            first = 0;
            best = mad;
            c.mad = MAD_W'(mad);
            c.bright = BRIGHT_W'(o);
            c.dom_row = DPOS_W'(dr);
            c.dom_col = DPOS_W'(dc);
            c.iso = 3'(j);
          end
        end
      end
    return c;
  endfunction

  task automatic load_sector();
    for (int ty = 0; ty < SP / 4; ty++)
      for (int tx = 0; tx < SP / 4; tx++) begin
        int kind = $urandom_range(0, 2);
        int base = $urandom_range(0, 255);
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            int v;
            if (kind == 0)      v = base + $urandom_range(0, 12) - 6;
            else if (kind == 1) v = base + $urandom_range(0, 60) - 30;
            else                v = $urandom_range(0, 255);
            if (v < 0) v = 0;
            if (v > 255) v = 255;
            img[4 * ty + y][4 * tx + x] = v;
          end
      end
    for (int y = 0; y < SP; y++)
      for (int x = 0; x < SP; x++) begin
        @(negedge clk);
        enable_input_data = 1'b1;
        in_addr = {5'(y), 5'(x)};
        input_data = 8'(img[y][x]);
      end
    for (int y = 0; y < SP / 2; y++)
      for (int x = 0; x < SP / 2; x++) begin
        cov[y][x] = ($urandom_range(0, 7) == 0);
        @(negedge clk);
        enable_input_data = 1'b0;
        cover_we = 1'b1;
        cover_addr = {4'(y), 4'(x)};
        cover_bit = cov[y][x];
      end
    @(negedge clk);
    enable_input_data = 1'b0;
    cover_we = 1'b0;
  endtask

  task automatic run_level(input int thr);
    int ncodes = 0, cycles = 0;
    bit got_done = 0;
    load_sector();
    level_threshold = 8'(thr);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!got_done) begin
      @(posedge clk);
      if (busy) cycles++;
      if (enable_output_data) begin
        int rr = ncodes / 4 / RPS, rc = (ncodes / 4) % RPS, k = ncodes % 4;
        fcm_code_t exp_c = ref_code(k, rr, rc, thr);
        check(output_data.fcm == 2'(k) && output_data.range_idx == 6'(rr * RPS + rc),
              $sformatf("code %0d order: fcm %0d range %0d", ncodes, output_data.fcm, output_data.range_idx));
        check(output_data.code == exp_c,
              $sformatf("code %0d (fcm %0d range %0d,%0d): got %h exp %h", ncodes, k, rr, rc,
                        output_data.code, exp_c));
        if (exp_c.belong) n_belong++;
        else if (cov[16 * (k / 2) / 2 + rr][16 * (k % 2) / 2 + rc]) n_covered_reject++;
        else n_contrast_reject++;
        if (exp_c.iso != 0) n_iso_nonzero++;
        if (exp_c.bright < 0) n_neg_bright++;
        ncodes++;
      end
      if (done) got_done = 1;
    end
    check(ncodes == 4 * RPS * RPS, $sformatf("code count %0d", ncodes));
    check(cycles == SECTOR_CYCLES, $sformatf("sector cycles %0d, expected %0d", cycles, SECTOR_CYCLES));
    $display("level threshold %0d: %0d codes in %0d cycles", thr, ncodes, cycles);
    @(posedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_level(40);
    n_threshold_switch++;
    run_level(255);
    $display("belong=%0d contrast_reject=%0d covered_reject=%0d iso_nonzero=%0d neg_bright=%0d",
             n_belong, n_contrast_reject, n_covered_reject, n_iso_nonzero, n_neg_bright);
    check(n_belong > 0, "no range classified into the level");
    check(n_contrast_reject > 0, "no range rejected by contrast");
    check(n_covered_reject > 0, "no range rejected as already covered");
    check(n_iso_nonzero > 0, "no non-identity isometry chosen");
    check(n_neg_bright > 0, "no negative bright");
    check(n_threshold_switch > 0, "no threshold switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
