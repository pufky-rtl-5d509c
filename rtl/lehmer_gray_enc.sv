// lehmer_gray_enc: order encoder of the ROPUF (combinational).
//
// Encodes the ascending order of B normalised frequencies F'_1..F'_B as B-1
// Lehmer coefficients L_j = sum_{i<=j} [F'_{j+1} > F'_i], j = 1..B-1, each
// with range 0..j, and writes each coefficient in binary-reflected Gray code
// on ceil(log2(j+1)) bits. Neighbouring frequencies that swap places change
// one coefficient by one and therefore a single output bit. No sorting is
// needed: all B(B-1)/2 comparisons are made in parallel.
//
// Packing (this implementation's choice): the Gray code of L_1 sits in the
// least significant bits of y, followed by L_2, ... up to L_{B-1}. For
// B = 16 the output is 49 bits wide.
module lehmer_gray_enc
  import pufky_pkg::*;
#(
  parameter int unsigned B   = ROPUF_B,
  parameter int unsigned W   = ROPUF_CNT_W + 1,
  parameter int unsigned LY  = lehmer_off(B)
) (
  input  logic signed [W-1:0] f [B],
  output logic [LY-1:0]       y
);

  always_comb begin
    y = '0;
    for (int unsigned j = 1; j < B; j++) begin
      logic [7:0] l, g;
      l = '0;
      for (int unsigned i = 0; i < j; i++)
        l = l + 8'(f[j] > f[i]);
      g = l ^ (l >> 1);
      for (int unsigned k = 0; k < lehmer_w(j); k++)
        y[lehmer_off(j) + k] = g[k];
    end
  end

endmodule
