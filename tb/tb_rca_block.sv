// tb_rca_block: checks a ripple-carry block against integer addition. The
// digit signals are formed from operand bits as the leaf cell does
// (r = a xor b, t = b); the expected sum is the low B bits of a + b + c_in.
// B = 4 is exhaustive (512 cases), B = 8 random.
module tb_rca_block;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, d4;  logic ci4;
  logic [7:0] a8, b8, d8;  logic ci8;

  rca_block #(.B(4)) dut4 (.r(a4 ^ b4), .t(b4), .c_in(ci4), .d(d4));
  rca_block #(.B(8)) dut8 (.r(a8 ^ b8), .t(b8), .c_in(ci8), .d(d8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [3:0] e;
      {ci4, a4, b4} = 9'(v);
      #1;
      e = a4 + b4 + 4'(ci4);
      checks++;
      if (d4 !== e) begin failures++; $display("B4 a=%h b=%h ci=%0b got %h exp %h", a4, b4, ci4, d4, e); end
    end
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] e;
      a8 = 8'($urandom);
      b8 = (n % 2 == 0) ? ~a8 : 8'($urandom);
      ci8 = 1'($urandom);
      #1;
      e = a8 + b8 + 8'(ci8);
      checks++;
      if (d8 !== e) begin failures++; $display("B8 a=%h b=%h ci=%0b got %h exp %h", a8, b8, ci8, d8, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
