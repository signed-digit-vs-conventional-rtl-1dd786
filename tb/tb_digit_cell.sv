// tb_digit_cell: exhaustive check of the leaf cell. For every operand bit pair
// it computes the signed digit y = a - not(b) arithmetically and checks that
// r marks exactly the zero digits, r_n is its complement and, for a non-zero
// digit, t is 1 for +1 and 0 for -1.
module tb_digit_cell;
  logic a, b, r, r_n, t;
  int checks = 0, failures = 0;

  digit_cell dut (.a(a), .b(b), .r(r), .r_n(r_n), .t(t));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int y;
      logic nb;
      {a, b} = 2'(v);
      #1;
      nb = ~b;
      y = int'(a) - int'(nb);
      checks++;
      if (r !== (y == 0)) begin failures++; $display("r wrong a=%0b b=%0b", a, b); end
      checks++;
      if (r_n !== ~r) begin failures++; $display("r_n wrong a=%0b b=%0b", a, b); end
      if (y != 0) begin
        checks++;
        if (t !== (y > 0)) begin failures++; $display("t wrong a=%0b b=%0b", a, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
