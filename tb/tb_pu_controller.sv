// tb_pu_controller: follows the controller through a whole sector at its
// default size and checks, cycle by cycle, the command schedule of each
// range/domain pair (4, 8, 1, 8, 64, 1, 4 cycles), the order of range and
// domain blocks, the first/last-domain flags, the range pixel addresses in
// PH_RANGE and the chessboard domain pixel coordinates in PH_DOMAIN, and that
// the sector takes 8 x 8 x 15 x 15 x 90 = 1,296,000 cycles.
module tb_pu_controller;
  import fic_pkg::*;
  localparam int SP = 32, RPS = 8, ND = 15;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  fcm_cmd_t cmd;
  logic [2:0] rng_row, rng_col;
  logic [3:0] dom_row, dom_col;
  logic [7:0] rng_rel;
  logic [4:0] dom_row_pix, dom_col_pix;
  int checks = 0, failures = 0;

  pu_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2 * RPS * RPS * ND * ND * 90 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    phase_e ph [90];
    int st [90];
    automatic int cycles = 0;
    // expected schedule of one pair
    begin
      automatic int c = 0;
      for (int s = 0; s < 4; s++)  begin ph[c] = PH_RANGE;  st[c] = s; c++; end
      for (int s = 0; s < 8; s++)  begin ph[c] = PH_DOMAIN; st[c] = s; c++; end
      ph[c] = PH_BRIGHT; st[c] = 0; c++;
      for (int s = 0; s < 8; s++)  begin ph[c] = PH_LUM;    st[c] = s; c++; end
      for (int s = 0; s < 64; s++) begin ph[c] = PH_MAD;    st[c] = s; c++; end
      ph[c] = PH_CMP; st[c] = 0; c++;
      for (int s = 0; s < 4; s++)  begin ph[c] = PH_XFER;   st[c] = s; c++; end
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    chk(!busy, "idle after reset");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int rr = 0; rr < RPS; rr++)
      for (int rc = 0; rc < RPS; rc++)
        for (int dr = 0; dr < ND; dr++)
          for (int dc = 0; dc < ND; dc++)
            for (int c = 0; c < 90; c++) begin
              automatic bit last = (rr == RPS - 1) && (rc == RPS - 1) && (dr == ND - 1) && (dc == ND - 1) && (c == 89);
              cycles += busy;
              if (cmd.phase != ph[c] || int'(cmd.step) != st[c] || rng_row != 3'(rr) || rng_col != 3'(rc)
                  || dom_row != 4'(dr) || dom_col != 4'(dc) || cmd.first_dom != (dr == 0 && dc == 0)
                  || cmd.last_dom != (dr == ND - 1 && dc == ND - 1) || done != last || !busy)
                chk(0, $sformatf("range %0d,%0d dom %0d,%0d cycle %0d: phase %0d step %0d", rr, rc, dr, dc, c,
                                 cmd.phase, cmd.step));
              else if (ph[c] == PH_RANGE)
                chk(rng_rel == 8'(16 * (2 * rr + st[c] / 2) + 2 * rc + st[c] % 2),
                    $sformatf("rng_rel %0d", rng_rel));
              else if (ph[c] == PH_DOMAIN) begin
                automatic int y = st[c] / 2, x = 2 * (st[c] % 2) + ((y % 2 == 0) ? 1 : 0);
                chk(dom_row_pix == 5'(2 * dr + y) && dom_col_pix == 5'(2 * dc + x) && (x + y) % 2 == 1,
                    $sformatf("dom pixel %0d,%0d", dom_row_pix, dom_col_pix));
              end
              @(negedge clk);
            end
    chk(!busy && !done, "idle after the sector");
    chk(cycles == RPS * RPS * ND * ND * 90, $sformatf("cycles %0d", cycles));
    $display("sector took %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
