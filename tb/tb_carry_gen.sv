// tb_carry_gen: checks the carry generator against integer addition. For
// B = 4 every combination of the block's operand bits and the carry-in is
// applied (512 cases); B = 2 is exhaustive too and B = 8 is random. The
// expected output is bit B of a + b + c_in.
module tb_carry_gen;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4;  logic ci4, co4;
  logic [1:0] a2, b2;  logic ci2, co2;
  logic [7:0] a8, b8;  logic ci8, co8;

  carry_gen #(.B(4)) dut4 (.a0(a4[0]), .b0(b4[0]), .c_in(ci4), .r(a4 ^ b4), .t(b4), .c_out(co4));
  carry_gen #(.B(2)) dut2 (.a0(a2[0]), .b0(b2[0]), .c_in(ci2), .r(a2 ^ b2), .t(b2), .c_out(co2));
  carry_gen #(.B(8)) dut8 (.a0(a8[0]), .b0(b8[0]), .c_in(ci8), .r(a8 ^ b8), .t(b8), .c_out(co8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int s;
      {ci4, a4, b4} = 9'(v);
      #1;
      s = int'(a4) + int'(b4) + int'(ci4);
      checks++;
      if (co4 !== s[4]) begin
        failures++;
        $display("B4 a=%h b=%h ci=%0b got %0b", a4, b4, ci4, co4);
      end
    end
    for (int v = 0; v < 32; v++) begin
      int s;
      {ci2, a2, b2} = 5'(v);
      #1;
      s = int'(a2) + int'(b2) + int'(ci2);
      checks++;
      if (co2 !== s[2]) begin failures++; $display("B2 a=%h b=%h ci=%0b", a2, b2, ci2); end
    end
    for (int n = 0; n < 3000; n++) begin
      int s;
      a8 = 8'($urandom);
      b8 = (n % 2 == 0) ? ~a8 ^ 8'(1 << ($urandom % 8)) : 8'($urandom);
      ci8 = 1'($urandom);
      #1;
      s = int'(a8) + int'(b8) + int'(ci8);
      checks++;
      if (co8 !== s[8]) begin failures++; $display("B8 a=%h b=%h ci=%0b", a8, b8, ci8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
