// ssc: Sign Select Circuit. Reduces the (R, T) pairs of a block of B digits to
// the group pair of the whole block:
//   r_grp = 1 when every digit of the block is zero,
//   t_grp = sign of the most significant non-zero digit of the block.
// It is the lower part of the binary look-ahead tree, built level by level:
// at every level adjacent pairs (upper, lower) are merged. The upper member's
// zero indicator drives a sign-select multiplexer that passes the lower sign
// when the upper member is all zero and the upper sign otherwise; the merged
// zero indicator is the AND of the two. For B = 4 this is the circuit of two
// 2-digit multiplexers (M1 on digits 1:0, M2 on digits 3:2) feeding a third
// (M3), with NAND/NOR pairs forming R_{3:2}, R_{3:0} and their complements.
// Extending it to any power-of-two B is this design's generalisation.
// Combinational, log2(B) multiplexer levels.
module ssc #(
  parameter int unsigned B = 4  // block size in digits, a power of two
) (
  input  logic [B-1:0] r,      // per-digit zero indicators
  input  logic [B-1:0] t,      // per-digit signs
  output logic         r_grp,  // group zero indicator R_{B-1:0}
  output logic         t_grp   // group sign T_{B-1:0}
);

  localparam int unsigned L = $clog2(B);

  // Level l holds B >> l groups of 2^l digits each.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [(B >> l)-1:0] gr, gt;
    if (l == 0) begin : g_leaf
      always_comb begin
        gr = r;
        gt = t;
      end
    end else begin : g_merge
      for (genvar k = 0; k < (B >> l); k++) begin : g_node
        always_comb gr[k] = g_lvl[l-1].gr[2*k+1] & g_lvl[l-1].gr[2*k];
        sign_select_mux u_mux (
          .r(g_lvl[l-1].gr[2*k+1]), .t(g_lvl[l-1].gt[2*k+1]),
          .c_in(g_lvl[l-1].gt[2*k]), .c_out(gt[k])
        );
      end
    end
  end

  always_comb begin
    r_grp = g_lvl[L].gr[0];
    t_grp = g_lvl[L].gt[0];
  end

  initial begin
    assert (B >= 1 && (B & (B - 1)) == 0)
      else $fatal(1, "ssc: B must be a power of two");
  end

endmodule
