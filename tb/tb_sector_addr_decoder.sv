// tb_sector_addr_decoder: checks every pixel address of a 32 x 32 sector:
// the sub-sector must be the 16 x 16 quarter the pixel lies in, the one-hot
// select must match it, and the relative position must be the pixel's
// coordinates inside that quarter.
module tb_sector_addr_decoder;
  logic [4:0] row = '0, col = '0;
  logic [1:0] sub;
  logic [3:0] sub_sel;
  logic [7:0] rel;
  int checks = 0, failures = 0;

  sector_addr_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        automatic int es = 2 * (y / 16) + (x / 16);
        automatic int er = 16 * (y % 16) + (x % 16);
        row = 5'(y); col = 5'(x);
        #1;
        checks++;
        if (sub != 2'(es) || sub_sel != 4'(1 << es) || rel != 8'(er)) begin
          failures++;
          $display("FAIL (%0d,%0d): sub %0d sel %b rel %0d", y, x, sub, sub_sel, rel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
