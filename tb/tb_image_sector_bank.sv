// tb_image_sector_bank: fills the 16 x 16 bank, then reads both ports at
// independent random addresses and compares with a shadow copy; also checks
// that a disabled write changes nothing.
module tb_image_sector_bank;
  import fic_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [7:0] waddr = '0, rng_addr = '0, dom_addr = '0;
  logic [7:0] wdata = '0, rng_data, dom_data;
  int checks = 0, failures = 0;
  int shadow [256];

  image_sector_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      shadow[a] = $urandom_range(0, 255);
      @(negedge clk);
      we = 1'b1; waddr = 8'(a); wdata = 8'(shadow[a]);
    end
    @(negedge clk);
    we = 1'b0; waddr = 8'd5; wdata = ~8'(shadow[5]);
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      automatic int ra = $urandom_range(0, 255), da = $urandom_range(0, 255);
      rng_addr = 8'(ra); dom_addr = 8'(da);
      #1;
      checks++;
      if (rng_data != 8'(shadow[ra]) || dom_data != 8'(shadow[da])) begin
        failures++;
        $display("FAIL %0d/%0d: %0d/%0d exp %0d/%0d", ra, da, rng_data, dom_data, shadow[ra], shadow[da]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
