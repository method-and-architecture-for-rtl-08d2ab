// tb_fractal_image_coder: codes a synthetic 256 x 256 image on a four-level
// pyramid (32, 64, 128 and 256 pixels square) with the full-size array of
// 8 x 8 processing units, coarsest level first, with contrast thresholds
// 40, 80, 160 and 255 (the finest level codes whatever is left).
//
// The pyramid is built here by 2 x 2 averaging (truncated). Between levels
// the testbench carries the quad-tree rule: a zone coded at one level is
// marked covered for all finer levels. Every code of every started unit is
// compared with a reference model of the method, each level must take
// 1,296,000 cycles, and at the end every pixel of the original image must be
// covered by exactly one coded range block. Counted mechanisms, each of which
// must occur: codes at every level, rejection by contrast, rejection as
// covered, a non-identity isometry, a negative bright, a level that starts
// only part of the array.
module tb_fractal_image_coder;
  import fic_pkg::*;

  localparam int M  = 8;
  localparam int IS = 32 * M;                    // 256
  localparam int SECTOR_CYCLES = 8 * 8 * 15 * 15 * 90;
  localparam int THR [4] = '{40, 80, 160, 255};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable_input_data = 1'b0;
  logic [15:0] in_addr = '0;
  logic [7:0] input_data = '0;
  logic cover_we = 1'b0;
  logic [13:0] cover_addr = '0;
  logic cover_bit = 1'b0;
  logic [7:0] level_threshold = '0;
  logic [M*M-1:0] sector_en = '0;
  logic start = 1'b0;
  logic busy, done;
  logic [M*M-1:0] enable_output_data;
  pu_code_t output_data [M*M];

  fractal_image_coder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int lvl [4][IS][IS];          // pyramid, level 0 = coarsest (32 x 32)
  bit cov [IS/2][IS/2];         // covered map of the level being coded
  bit coded [IS/2][IS/2];       // class bits returned at that level
  int owner [IS][IS];           // how many coded blocks cover each pixel
  int n_coded [4];
  int n_contrast_reject = 0, n_covered_reject = 0, n_iso_nonzero = 0, n_neg_bright = 0, n_partial = 0;

  initial begin : watchdog
    repeat (4 * SECTOR_CYCLES + 4 * (IS * IS + IS * IS / 4) + 20000) @(posedge clk);
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

  function automatic int iso_src(input int j, input int r, input int c);
    case (j)
      0: return 2 * r + c;
      1: return 2 * (1 - c) + r;
      2: return 2 * (1 - r) + (1 - c);
      3: return 2 * c + (1 - r);
      4: return 2 * r + (1 - c);
      5: return 2 * (1 - r) + c;
      6: return 2 * c + r;
      default: return 2 * (1 - c) + (1 - r);
    endcase
  endfunction

  // reference code of range block (gy, gx) of level l, searched over sector (sy, sx)
  function automatic fcm_code_t ref_code(input int l, input int sy, input int sx, input int gy, input int gx);
    fcm_code_t c = '0;
    int r[4], rsum = 0, mx = 0, mn = 255, best = 0;
    for (int q = 0; q < 4; q++) begin
      r[q] = lvl[l][2 * gy + q / 2][2 * gx + q % 2];
      rsum += r[q];
      if (r[q] > mx) mx = r[q];
      if (r[q] < mn) mn = r[q];
    end
    c.belong = ((mx - mn) <= THR[l]) && !cov[gy][gx];
    for (int dr = 0; dr < 15; dr++)
      for (int dc = 0; dc < 15; dc++) begin
        int d[8], dq[8], dsum = 0, o, n = 0;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++)
            if ((y + x) % 2 == 1) begin
              d[n] = lvl[l][32 * sy + 2 * dr + y][32 * sx + 2 * dc + x];
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
          if ((dr == 0 && dc == 0 && j == 0) || mad < best) begin
            best = mad;
            c.mad = MAD_W'(mad); c.bright = BRIGHT_W'(o);
            c.dom_row = DPOS_W'(dr); c.dom_col = DPOS_W'(dc); c.iso = 3'(j);
          end
        end
      end
    return c;
  endfunction

  task automatic build_image();
    for (int y = 0; y < IS; y++)
      for (int x = 0; x < IS; x++) begin
        int v;
        if (y < IS / 2 && x < IS / 2)      v = (x + y) / 2;                              // smooth ramp
        else if (y < IS / 2)               v = (((x + 5) / 24) % 2) ? 160 : 60;           // 24-pixel stripes
        else if (x < IS / 2) begin                                                        // checkerboards,
          int t = 4 << ((y / 32) % 4);                                                    // tiles of 4..32,
          v = ((((x + 3) / t) + ((y + 3) / t)) % 2) ? 220 : 30;                           // off the grid
        end else                           v = ((x > y + 5) ? 240 : 15) + int'($urandom_range(0, 8)) - 4; // sharp diagonal edge
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        lvl[3][y][x] = v;
      end
    for (int l = 2; l >= 0; l--) begin
      int s = 32 << l;
      for (int y = 0; y < s; y++)
        for (int x = 0; x < s; x++)
          lvl[l][y][x] = (lvl[l + 1][2 * y][2 * x] + lvl[l + 1][2 * y][2 * x + 1]
                          + lvl[l + 1][2 * y + 1][2 * x] + lvl[l + 1][2 * y + 1][2 * x + 1]) / 4;
    end
  endtask

  task automatic code_level(input int l);
    int s = 32 << l, ns = 1 << l, cycles = 0;
    int ncode [M*M];
    bit got_done = 0;
    // load the level image and its covered map
    for (int y = 0; y < s; y++)
      for (int x = 0; x < s; x++) begin
        @(negedge clk);
        enable_input_data = 1'b1;
        in_addr = {8'(y), 8'(x)};
        input_data = 8'(lvl[l][y][x]);
      end
    for (int y = 0; y < s / 2; y++)
      for (int x = 0; x < s / 2; x++) begin
        @(negedge clk);
        enable_input_data = 1'b0;
        cover_we = 1'b1;
        cover_addr = {7'(y), 7'(x)};
        cover_bit = cov[y][x];
        coded[y][x] = 1'b0;
      end
    @(negedge clk);
    enable_input_data = 1'b0;
    cover_we = 1'b0;
    level_threshold = 8'(THR[l]);
    sector_en = '0;
    for (int sy = 0; sy < ns; sy++)
      for (int sx = 0; sx < ns; sx++) sector_en[sy * M + sx] = 1'b1;
    if (ns < M) n_partial++;
    foreach (ncode[i]) ncode[i] = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!got_done) begin
      @(posedge clk);
      if (busy) cycles++;
      for (int sidx = 0; sidx < M * M; sidx++)
        if (enable_output_data[sidx]) begin
          int sy = sidx / M, sx = sidx % M;
          int n = ncode[sidx], k = n % 4, rr = (n / 4) / 8, rc = (n / 4) % 8;
          int gy = 16 * sy + 8 * (k / 2) + rr, gx = 16 * sx + 8 * (k % 2) + rc;
          fcm_code_t e;
          check(sector_en[sidx], $sformatf("output from idle sector %0d", sidx));
          e = ref_code(l, sy, sx, gy, gx);
          check(output_data[sidx].code == e,
                $sformatf("level %0d sector %0d code %0d: got %h exp %h", l, sidx, n, output_data[sidx].code, e));
          coded[gy][gx] = output_data[sidx].code.belong;
          if (e.belong) n_coded[l]++;
          else if (cov[gy][gx]) n_covered_reject++;
          else n_contrast_reject++;
          if (e.iso != 0) n_iso_nonzero++;
          if (e.bright < 0) n_neg_bright++;
          ncode[sidx] = n + 1;
        end
      if (done) got_done = 1;
    end
    for (int i = 0; i < M * M; i++)
      check(ncode[i] == (sector_en[i] ? 256 : 0), $sformatf("sector %0d sent %0d codes", i, ncode[i]));
    check(cycles == SECTOR_CYCLES, $sformatf("level %0d took %0d cycles", l, cycles));
    $display("level %0d (%0d x %0d, U=%0d): %0d range blocks coded, %0d cycles", l + 1, s, s, THR[l],
             n_coded[l], cycles);
    // mark the original-image pixels each coded block stands for
    for (int y = 0; y < s / 2; y++)
      for (int x = 0; x < s / 2; x++)
        if (coded[y][x]) begin
          int span = 2 << (3 - l);
          for (int py = 0; py < span; py++)
            for (int px = 0; px < span; px++) owner[span * y + py][span * x + px]++;
        end
    // covered map of the next level: children of covered or coded zones
    if (l < 3)
      for (int y = s - 1; y >= 0; y--)
        for (int x = s - 1; x >= 0; x--)
          cov[y][x] = cov[y / 2][x / 2] || coded[y / 2][x / 2];
  endtask

  initial begin
    int bad = 0;
    build_image();
    foreach (cov[y, x]) cov[y][x] = 1'b0;
    foreach (owner[y, x]) owner[y][x] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < 4; l++) code_level(l);
    foreach (owner[y, x]) if (owner[y][x] != 1) bad++;
    check(bad == 0, $sformatf("%0d pixels not covered by exactly one coded block", bad));
    for (int l = 0; l < 4; l++) check(n_coded[l] > 0, $sformatf("no block coded at level %0d", l + 1));
    check(n_contrast_reject > 0, "no range rejected by contrast");
    check(n_covered_reject > 0, "no range rejected as covered");
    check(n_iso_nonzero > 0, "no non-identity isometry chosen");
    check(n_neg_bright > 0, "no negative bright");
    check(n_partial > 0, "no level started only part of the array");
    $display("contrast_reject=%0d covered_reject=%0d iso_nonzero=%0d neg_bright=%0d",
             n_contrast_reject, n_covered_reject, n_iso_nonzero, n_neg_bright);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
