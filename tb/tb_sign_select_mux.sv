// tb_sign_select_mux: exhaustive check of the sign-select cell against the
// borrow rule: a zero digit (r = 1) passes the incoming carry, a non-zero digit
// forces its own sign.
module tb_sign_select_mux;
  logic r, t, c_in, c_out;
  int checks = 0, failures = 0;

  sign_select_mux dut (.r(r), .t(t), .c_in(c_in), .c_out(c_out));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_c;
      {r, t, c_in} = 3'(v);
      #1;
      if (r) exp_c = c_in; else exp_c = t;
      checks++;
      if (c_out !== exp_c) begin
        failures++;
        $display("mismatch r=%0b t=%0b c_in=%0b got %0b", r, t, c_in, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
