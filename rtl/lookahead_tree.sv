// lookahead_tree: binary (fan-in two) look-ahead tree of sign-select nodes over
// the group signals of N blocks. It returns, for every block k, the prefix pair
// over blocks k..0:
//   pr[k] = R_{k:0},  pt[k] = T_{k:0}.
// If element 0 carries (r = 0, t = carry out of block 0), as the adder wires
// it, pt[k] is the true carry out of block k, i.e. the carry into block k+1,
// and pt[N-1] is the carry out of the adder.
//
// The tree is divide and conquer (a Sklansky prefix arrangement): at level l
// the elements form aligned groups of 2^l; in every pair of neighbouring
// groups, each element of the upper group is combined with the last prefix of
// the lower group through one sign-select node (sel_op). That gives
// ceil(log2 N) node levels, each node with fan-in two. The paper fixes only the fan-in (two) and the
// node (the sign-select multiplexer); this particular prefix arrangement is this
// design's choice. Combinational.
module lookahead_tree
  import sd_adder_pkg::*;
#(
  parameter int unsigned N = 8  // number of blocks (word length / block size)
) (
  input  logic [N-1:0] r,   // group zero indicators, block k at index k
  input  logic [N-1:0] t,   // group signs
  output logic [N-1:0] pr,  // prefix zero indicators R_{k:0}
  output logic [N-1:0] pt   // prefix signs T_{k:0}
);

  localparam int unsigned LG = (N > 1) ? $clog2(N) : 1;

  // Level l holds, for each element, the prefix over its aligned 2^l group.
  for (genvar l = 0; l <= LG; l++) begin : g_lvl
    logic [N-1:0] vr, vt;
    if (l == 0) begin : g_leaf
      always_comb begin
        vr = r;
        vt = t;
      end
    end else begin : g_merge
      localparam int unsigned S = l - 1;  // size exponent of the groups merged
      for (genvar i = 0; i < N; i++) begin : g_elem
        if (((i >> S) & 1) == 1) begin : g_node
          // Last element of the lower neighbouring group.
          localparam int unsigned J = ((i >> S) << S) - 1;
          rt_t node;
          always_comb begin
            node = sel_op('{r: g_lvl[l-1].vr[i], t: g_lvl[l-1].vt[i]},
                          '{r: g_lvl[l-1].vr[J], t: g_lvl[l-1].vt[J]});
            vr[i] = node.r;
            vt[i] = node.t;
          end
        end else begin : g_pass
          always_comb begin
            vr[i] = g_lvl[l-1].vr[i];
            vt[i] = g_lvl[l-1].vt[i];
          end
        end
      end
    end
  end

  always_comb begin
    pr = g_lvl[LG].vr;
    pt = g_lvl[LG].vt;
  end

endmodule
