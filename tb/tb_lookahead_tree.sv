// tb_lookahead_tree: checks the prefix outputs of the look-ahead tree at N = 8
// (all 65536 patterns) and N = 7 (random). For every k the reference scans the
// groups k..0 from the top: the prefix is zero when every group is, and its
// sign is that of the first non-zero group met.
module tb_lookahead_tree;
  int checks = 0, failures = 0;

  logic [7:0] r8, t8, pr8, pt8;
  logic [6:0] r7, t7, pr7, pt7;

  lookahead_tree #(.N(8)) dut8 (.r(r8), .t(t8), .pr(pr8), .pt(pt8));
  lookahead_tree #(.N(7)) dut7 (.r(r7), .t(t7), .pr(pr7), .pt(pt7));

  task automatic check_prefix(input string tag, input int n, input logic [7:0] r,
                              input logic [7:0] t, input logic [7:0] pr,
                              input logic [7:0] pt);
    for (int k = 0; k < n; k++) begin
      logic zero, sign;
      zero = 1'b1;
      sign = 1'b0;
      for (int j = k; j >= 0; j--) begin
        if (zero && !r[j]) begin
          zero = 1'b0;
          sign = t[j];
        end
      end
      checks++;
      if (pr[k] !== zero) begin failures++; $display("%s pr[%0d] wrong r=%b", tag, k, r); end
      if (!zero) begin
        checks++;
        if (pt[k] !== sign) begin failures++; $display("%s pt[%0d] wrong r=%b t=%b", tag, k, r, t); end
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {r8, t8} = 16'(v);
      #1;
      check_prefix("N8", 8, r8, t8, pr8, pt8);
    end
    for (int n = 0; n < 2000; n++) begin
      r7 = 7'($urandom) | 7'($urandom);
      t7 = 7'($urandom);
      #1;
      check_prefix("N7", 7, {1'b0, r7}, {1'b0, t7}, {1'b0, pr7}, {1'b0, pt7});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
