// tb_domain_block_reg: writes the eight registers with random signed values in
// random order, overwrites some, and checks every read against a shadow copy.
module tb_domain_block_reg;
  import fic_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [2:0] waddr = '0, raddr = '0;
  logic signed [DPIX_W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int shadow [8];

  domain_block_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      shadow[k] = $urandom_range(0, 255);
      @(negedge clk);
      we = 1'b1; waddr = 3'(k); wdata = DPIX_W'(shadow[k]);
    end
    for (int t = 0; t < 200; t++) begin
      automatic int a = $urandom_range(0, 7);
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = 3'(a);
      wdata = DPIX_W'(int'($urandom_range(0, 600)) - 200);
      if (we) shadow[a] = int'(wdata);
      @(negedge clk);
      we = 1'b0;
      for (int k = 0; k < 8; k++) begin
        raddr = 3'(k);
        #1;
        checks++;
        if (int'(rdata) != shadow[k]) begin
          failures++;
          $display("FAIL reg %0d: got %0d exp %0d", k, rdata, shadow[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
