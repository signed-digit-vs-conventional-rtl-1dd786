// tb_sd_adder_configs: runs the adder in every word length / block size pairing
// for which the design is sized and timed: the optimal block sizes
// (8/2, 16/2, 32/4, 64/4, 128/4, 256/8) and the larger blocks used in the delay
// comparison (8/4, 16/4, 32/8, 64/8). Each instance gets random, all-propagate
// and single-non-zero-digit operands with random carry-in, and is compared with
// integer arithmetic: {c_out, sum} = a + b + c_in, overflow when both operands
// share a sign that the sum does not.
module tb_sd_adder_configs;
  localparam int NCFG = 10;
  localparam int CFG_W [NCFG] = '{8, 16, 32, 64, 128, 256, 8, 16, 32, 64};
  localparam int CFG_B [NCFG] = '{2,  2,  4,  4,   4,   8, 4,  4,  8,  8};
  localparam int VECTORS = 3000;

  int checks = 0, failures = 0, done = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    localparam int W = CFG_W[k];
    localparam int B = CFG_B[k];
    logic [W-1:0] a, b, sum;
    logic         c_in, c_out, overflow;
    logic [((W + 31) / 32) * 32 - 1:0] ra, rb;  // random words, cut to W bits

    sd_adder #(.W(W), .B(B)) dut (
      .a(a), .b(b), .c_in(c_in), .sum(sum), .c_out(c_out), .overflow(overflow)
    );

    initial begin
      int errs;
      errs = 0;
      for (int n = 0; n < VECTORS; n++) begin
        logic [W:0] full;
        logic       ovf;
        for (int w = 0; w < W; w += 32) begin
          ra[w +: 32] = $urandom;
          rb[w +: 32] = $urandom;
        end
        a = ra[W-1:0];
        b = rb[W-1:0];
        case (n % 4)
          1: b = ~a;
          2: b = ~a ^ (W'(1) << ($urandom % W));
          default: ;
        endcase
        c_in = 1'($urandom);
        #1;
        full = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, c_in};
        ovf  = (a[W-1] == b[W-1]) && (full[W-1] != a[W-1]);
        checks++;
        if (sum !== full[W-1:0] || c_out !== full[W] || overflow !== ovf) begin
          failures++;
          errs++;
          if (errs <= 5) $display("W=%0d B=%0d a=%h b=%h ci=%0b wrong", W, B, a, b, c_in);
        end
      end
      $display("W=%0d B=%0d: %0d vectors, %0d errors", W, B, VECTORS, errs);
      done++;
    end
  end

  initial begin
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
