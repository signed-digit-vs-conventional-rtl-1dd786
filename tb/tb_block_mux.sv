// tb_block_mux: random check that the block multiplexer returns the carry-1
// candidate when the block carry is 1 and the carry-0 candidate otherwise.
module tb_block_mux;
  int checks = 0, failures = 0;
  logic [3:0] d0, d1, d;
  logic c;

  block_mux #(.B(4)) dut (.d_c0(d0), .d_c1(d1), .c_blk(c), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      d0 = 4'($urandom);
      d1 = 4'($urandom);
      c  = 1'(n);
      #1;
      checks++;
      if (d !== (c ? d1 : d0)) begin failures++; $display("mismatch c=%0b", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
