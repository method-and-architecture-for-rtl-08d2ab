// tb_fractal_coding_module: runs the 90-cycle command sequence for a range
// block against a series of domain blocks, feeding pixels as the processing
// unit would, and checks the resulting code (MAD, bright, domain position,
// isometry, class) against a reference computed here from the method: means
// by truncation, D' = D/2 + o on the chessboard pixels, each range pixel
// against the two domain pixels of its quadrant, for all eight isometries,
// lowest MAD kept. Also checks that the code is final right after PH_CMP of
// the last domain, i.e. within the 90-cycle budget.
module tb_fractal_coding_module;
  import fic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  fcm_cmd_t cmd = '0;
  logic [7:0] pix_in = '0, threshold = '0;
  logic [DPOS_W-1:0] dom_row = '0, dom_col = '0;
  logic covered = 1'b0;
  fcm_code_t code;
  int checks = 0, failures = 0;
  int n_iso_nonzero = 0, n_belong = 0;
  fcm_code_t code_at_cmp;

  fractal_coding_module dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // one 90-cycle comparison; r: 2x2 range, d: 4x4 domain
  task automatic run_pair(input int r[4], input int d[4][4], input int dr, input int dc,
                          input bit first, input bit last);
    int k;
    dom_row = 4'(dr); dom_col = 4'(dc);
    cmd.first_dom = first; cmd.last_dom = last;
    for (int s = 0; s < 4; s++) begin
      cmd.phase = PH_RANGE; cmd.step = 6'(s); pix_in = 8'(r[s]);
      @(negedge clk);
    end
    k = 0;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        if ((x + y) % 2 == 1) begin
          cmd.phase = PH_DOMAIN; cmd.step = 6'(k); pix_in = 8'(d[y][x]);
          k++;
          @(negedge clk);
        end
    pix_in = 8'($urandom);
    cmd.phase = PH_BRIGHT; cmd.step = '0; @(negedge clk);
    for (int s = 0; s < 8; s++)  begin cmd.phase = PH_LUM; cmd.step = 6'(s); @(negedge clk); end
    for (int s = 0; s < 64; s++) begin cmd.phase = PH_MAD; cmd.step = 6'(s); @(negedge clk); end
    cmd.phase = PH_CMP; cmd.step = '0; @(negedge clk);
    if (last) code_at_cmp = code;   // must already be final: 86 cycles into the pair
    for (int s = 0; s < 4; s++)  begin cmd.phase = PH_XFER; cmd.step = 6'(s); @(negedge clk); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      automatic int r[4], rsum = 0, mx = 0, mn = 255, thr, best = 0;
      automatic fcm_code_t e = '0;
      automatic int nd = 1 + $urandom_range(0, 12);
      for (int q = 0; q < 4; q++) begin
        r[q] = (t % 2) ? 120 + $urandom_range(0, 30) : $urandom_range(0, 255);
        rsum += r[q];
        if (r[q] > mx) mx = r[q];
        if (r[q] < mn) mn = r[q];
      end
      thr = $urandom_range(0, 120);
      threshold = 8'(thr);
      covered = ($urandom_range(0, 3) == 0);
      e.belong = (mx - mn <= thr) && !covered;
      for (int n = 0; n < nd; n++) begin
        automatic int d[4][4], dv[8], dq[8], dsum = 0, o, i = 0;
        automatic int dr = $urandom_range(0, 14), dc = $urandom_range(0, 14);
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            d[y][x] = $urandom_range(0, 255);
            if ((x + y) % 2 == 1) begin
              dv[i] = d[y][x]; dq[i] = 2 * (y / 2) + x / 2; dsum += dv[i]; i++;
            end
          end
        o = rsum / 4 - dsum / 16;
        for (int j = 0; j < 8; j++) begin
          automatic int m = 0;
          for (int p = 0; p < 8; p++) begin
            automatic int rv = r[iso_src(j, dq[p] / 2, dq[p] % 2)], tv = dv[p] / 2 + o;
            m += (rv > tv) ? rv - tv : tv - rv;
          end
          if ((n == 0 && j == 0) || m < best) begin
            best = m;
            e.mad = MAD_W'(m); e.bright = BRIGHT_W'(o); e.dom_row = 4'(dr); e.dom_col = 4'(dc); e.iso = 3'(j);
          end
        end
        run_pair(r, d, dr, dc, n == 0, n == nd - 1);
      end
      checks++;
      if (code_at_cmp != e) begin
        failures++;
        $display("FAIL range %0d: code after PH_CMP %h exp %h", t, code_at_cmp, e);
      end
      checks++;
      if (code != e) begin
        failures++;
        $display("FAIL range %0d: code %h exp %h", t, code, e);
      end
      if (e.iso != 0) n_iso_nonzero++;
      if (e.belong) n_belong++;
    end
    checks++;
    if (n_iso_nonzero == 0 || n_belong == 0) begin
      failures++;
      $display("FAIL coverage: iso_nonzero %0d belong %0d", n_iso_nonzero, n_belong);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
