// block_mux: block multiplexer (BM). Chooses, per block, between the two
// precomputed ripple-carry sums by the true carry into the block:
//   d = c_blk ? d_c1 : d_c0
// The paper gives only its function; a plain B-bit 2:1 multiplexer is used.
// Combinational.
module block_mux #(
  parameter int unsigned B = 4  // block size in bits
) (
  input  logic [B-1:0] d_c0,   // block sum assuming carry-in 0
  input  logic [B-1:0] d_c1,   // block sum assuming carry-in 1
  input  logic         c_blk,  // true carry into the block
  output logic [B-1:0] d       // selected block sum
);

  always_comb d = c_blk ? d_c1 : d_c0;

endmodule
