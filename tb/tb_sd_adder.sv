// tb_sd_adder: end-to-end check of the adder at its default size (W = 32,
// B = 4, no parameter override). Every result is compared with integer
// arithmetic: {c_out, sum} = a + b + c_in, and overflow is set exactly when
// both operands have the same sign and the sum's sign differs.
//
// Directed vectors and biased random vectors make each mechanism of the design
// occur, and the bench counts them; a mechanism that never occurred counts as a
// failure:
//   cin       the external carry-in entering through the carry generator
//   subtract  A - B computed as A + not(B) + 1
//   overflow  two's complement overflow flagged
//   cout      carry out of the most significant bit
//   full_prop every digit zero, so the carry-in propagates across all blocks
//   cg_prop   digits 3..1 zero, the carry generator passes its majority carry
//   grp_skip  an upper block entirely zero, its carry skipped through the tree
//   bm_c1     a block multiplexer in block >= 1 picking the carry-1 ripple
//   bm_c0     a block multiplexer in block >= 1 picking the carry-0 ripple
// The adder is combinational; each vector is checked 1 time unit after it is
// applied (the design has no clock, so no cycle count applies).
module tb_sd_adder;
  localparam int W = 32;
  localparam int B = 4;
  localparam int N = W / B;

  logic [W-1:0] a, b, sum;
  logic         c_in, c_out, overflow;
  int checks = 0, failures = 0;

  typedef enum int {M_CIN, M_SUB, M_OVF, M_COUT, M_FULL, M_CGP, M_SKIP, M_BM1, M_BM0, M_NUM} mech_e;
  int unsigned seen [M_NUM];
  string mech_name [M_NUM] = '{"cin", "subtract", "overflow", "cout", "full_prop",
                               "cg_prop", "grp_skip", "bm_c1", "bm_c0"};

  sd_adder dut (.a(a), .b(b), .c_in(c_in), .sum(sum), .c_out(c_out), .overflow(overflow));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb, input logic ci,
                       input bit is_sub);
    logic [W:0]   full;
    logic [W-1:0] p;
    logic         ovf;
    a = va; b = vb; c_in = ci;
    #1;
    full = {1'b0, va} + {1'b0, vb} + {{W{1'b0}}, ci};
    ovf  = (va[W-1] == vb[W-1]) && (full[W-1] != va[W-1]);
    checks++;
    if (sum !== full[W-1:0] || c_out !== full[W] || overflow !== ovf) begin
      failures++;
      if (failures <= 20)
        $display("a=%h b=%h ci=%0b: got sum=%h co=%0b ov=%0b, expected sum=%h co=%0b ov=%0b",
               va, vb, ci, sum, c_out, overflow, full[W-1:0], full[W], ovf);
    end
    // Mechanism bookkeeping, from the operands alone.
    p = va ^ vb;
    if (ci) seen[M_CIN]++;
    if (is_sub) seen[M_SUB]++;
    if (ovf) seen[M_OVF]++;
    if (full[W]) seen[M_COUT]++;
    if (&p && ci) seen[M_FULL]++;
    if (&p[B-1:1]) seen[M_CGP]++;
    for (int g = 1; g < N - 1; g++) begin
      if (&p[g*B +: B]) begin
        seen[M_SKIP]++;
        break;
      end
    end
    for (int g = 1; g < N; g++) begin
      logic [W:0] mask, low;
      mask = ((W+1)'(1) << (g*B)) - (W+1)'(1);
      low  = ({1'b0, va} & mask) + ({1'b0, vb} & mask) + {{W{1'b0}}, ci};
      if (low[g*B]) seen[M_BM1]++; else seen[M_BM0]++;
    end
  endtask

  initial begin
    logic [W-1:0] x, y;
    // Directed cases.
    apply('0, '0, 1'b0, 0);
    apply('1, '0, 1'b1, 0);                     // carry through every digit
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1, 0);
    apply(32'h7FFF_FFFF, 32'h0000_0001, 1'b0, 0); // positive overflow
    apply(32'h8000_0000, 32'h8000_0000, 1'b0, 0); // negative overflow
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1, 0);
    apply(32'h1234_5678, ~32'h1234_5678, 1'b1, 1); // x - x
    apply(32'h0000_000F, 32'h0000_0001, 1'b0, 0);
    apply(32'h00F0_000E, 32'h000F_0001, 1'b1, 0);
    // Random and biased random cases.
    for (int n = 0; n < 20000; n++) begin
      x = $urandom;
      case (n % 5)
        0: y = $urandom;
        1: y = ~x;                                   // all digits zero
        2: y = ~x ^ (32'(1) << ($urandom % W));     // one non-zero digit
        3: y = ~x & ~(32'hF << (B * ($urandom % N))); // one block of generates/kills
        default: y = ~x ^ 32'($urandom & $urandom & $urandom);
      endcase
      if (n % 7 == 0) apply(x, ~y, 1'b1, 1);         // subtraction x - y
      else            apply(x, y, 1'($urandom), 0);
    end
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-9s occurred %0d times", mech_name[m], seen[m]);
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("mechanism %s never occurred", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
