// tb_inv_sign_select_mux: exhaustive check of the inverting sign-select cell:
// fed with complemented carry and sign, it must return the true outgoing carry.
module tb_inv_sign_select_mux;
  logic r, t, c_in, c_out;
  int checks = 0, failures = 0;

  inv_sign_select_mux dut (.r(r), .t_n(~t), .c_in_n(~c_in), .c_out(c_out));

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
