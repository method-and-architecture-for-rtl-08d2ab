// tb_range_block_reg: loads random 2x2 blocks and checks, for every isometry
// and output position, that the read port returns the pixel given by the
// geometric definition of that rotation or reflection.
module tb_range_block_reg;
  import fic_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [1:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [2:0] iso = '0;
  int checks = 0, failures = 0;
  int pix [4];

  range_block_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output (r,c) of isometry j shows input pixel src (row-major index)
  function automatic int src_of(input int j, input int r, input int c);
    case (j)
      0: return 2 * r + c;
      1: return 2 * (1 - c) + r;         // rotate 90 clockwise
      2: return 2 * (1 - r) + (1 - c);   // rotate 180
      3: return 2 * c + (1 - r);         // rotate 270
      4: return 2 * r + (1 - c);         // mirror left-right
      5: return 2 * (1 - r) + c;         // mirror top-bottom
      6: return 2 * c + r;               // transpose
      default: return 2 * (1 - c) + (1 - r);
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int q = 0; q < 4; q++) begin
        pix[q] = $urandom_range(0, 255);
        @(negedge clk);
        we = 1'b1; waddr = 2'(q); wdata = 8'(pix[q]);
      end
      @(negedge clk);
      we = 1'b0;
      for (int j = 0; j < 8; j++)
        for (int q = 0; q < 4; q++) begin
          iso = 3'(j); raddr = 2'(q);
          #1;
          checks++;
          if (rdata != 8'(pix[src_of(j, q / 2, q % 2)])) begin
            failures++;
            $display("FAIL iso %0d pos %0d: got %0d exp %0d", j, q, rdata, pix[src_of(j, q / 2, q % 2)]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
