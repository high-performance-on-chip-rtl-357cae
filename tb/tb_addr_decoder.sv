// tb_addr_decoder: random addresses; the node must be addr / 128 MB, at
// column node mod 4 and row node div 4.
module tb_addr_decoder;
  import noc_pkg::*;
  logic [ADDR_W-1:0] addr;
  logic [XW-1:0]     dst_x;
  logic [YW-1:0]     dst_y;
  int checks = 0, failures = 0;

  addr_decoder dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      int node;
      addr = $urandom;
      if (i < 16) addr = 32'(i) * 32'h0800_0000 + 32'h0000_0040;
      node = int'(addr / 32'd134217728) % 16;
      #1;
      checks++;
      if (dst_x != XW'(node % 4) || dst_y != YW'(node / 4)) begin
        failures++;
        $display("addr %h: (%0d,%0d), expected node %0d", addr, dst_x, dst_y, node);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
