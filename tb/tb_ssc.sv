// tb_ssc: checks the Sign Select Circuit at B = 4 (all 256 input patterns) and
// at B = 8 and B = 2 (random patterns). The reference scans the digits from
// the most significant one: the group is zero when all digits are, and its sign
// is that of the first non-zero digit found.
module tb_ssc;
  int checks = 0, failures = 0;

  logic [3:0] r4, t4;  logic rg4, tg4;
  logic [7:0] r8, t8;  logic rg8, tg8;
  logic [1:0] r2, t2;  logic rg2, tg2;

  ssc #(.B(4)) dut4 (.r(r4), .t(t4), .r_grp(rg4), .t_grp(tg4));
  ssc #(.B(8)) dut8 (.r(r8), .t(t8), .r_grp(rg8), .t_grp(tg8));
  ssc #(.B(2)) dut2 (.r(r2), .t(t2), .r_grp(rg2), .t_grp(tg2));

  // Reference on up to 8 digits.
  function automatic void ref_grp(input int n, input logic [7:0] r, input logic [7:0] t,
                                  output logic zero, output logic sign);
    zero = 1'b1;
    sign = 1'b0;
    for (int i = n - 1; i >= 0; i--) begin
      if (zero && !r[i]) begin
        zero = 1'b0;
        sign = t[i];
      end
    end
  endfunction

  task automatic check(input string tag, input logic zero, input logic sign,
                       input logic got_r, input logic got_t);
    checks++;
    if (got_r !== zero) begin failures++; $display("%s: r_grp wrong", tag); end
    if (!zero) begin
      checks++;
      if (got_t !== sign) begin failures++; $display("%s: t_grp wrong", tag); end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic z, s;
    for (int v = 0; v < 256; v++) begin
      {r4, t4} = 8'(v);
      #1;
      ref_grp(4, {4'b0, r4}, {4'b0, t4}, z, s);
      check("B4", z, s, rg4, tg4);
    end
    for (int n = 0; n < 2000; n++) begin
      r8 = 8'($urandom);
      // bias toward long zero runs
      if (n % 3 == 0) r8 = r8 | 8'($urandom) | 8'($urandom);
      t8 = 8'($urandom);
      r2 = 2'($urandom);
      t2 = 2'($urandom);
      #1;
      ref_grp(8, r8, t8, z, s);
      check("B8", z, s, rg8, tg8);
      ref_grp(2, {6'b0, r2}, {6'b0, t2}, z, s);
      check("B2", z, s, rg2, tg2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
