// entropy_compress: XOR compression of the Lehmer-Gray vector (combinational).
//
// The most significant bit of a Lehmer coefficient whose range is not a
// power of two is biased. The compression folds these bits pairwise: the
// MSB of L_j (j odd, j <= B-3) is XORed into the MSB of L_{j+1}, and the
// other bits pass unchanged. For B = 16 this gives seven XORs and turns the
// 49-bit vector into the 42-bit response. The reference design states only
// that the most biased bits are selectively XORed; which bits are paired
// is this implementation's choice.
//
// Packing: coefficients in order L_1, L_2, ... from the least significant
// bit; for a pair (L_j, L_{j+1}) the lower bits of L_j come first, then L_{j+1}
// with its MSB replaced by the XOR.
module entropy_compress
  import pufky_pkg::*;
#(
  parameter int unsigned B  = ROPUF_B,
  parameter int unsigned LY = lehmer_off(B),
  parameter int unsigned LX = lehmer_off(B) - (B - 2) / 2
) (
  input  logic [LY-1:0] y,
  output logic [LX-1:0] x
);

  always_comb begin
    int unsigned o;
    logic carry;
    x = '0;
    o = 0;
    carry = 1'b0;
    for (int unsigned j = 1; j < B; j++) begin
      int unsigned w, b0;
      w  = lehmer_w(j);
      b0 = lehmer_off(j);
      if ((j % 2 == 1) && (j + 3 <= B)) begin
        for (int unsigned k = 0; k + 1 < w; k++) begin
          x[o] = y[b0 + k];
          o++;
        end
        carry = y[b0 + w - 1];
      end else begin
        for (int unsigned k = 0; k < w; k++) begin
          x[o] = y[b0 + k] ^ ((k + 1 == w) ? carry : 1'b0);
          o++;
        end
        carry = 1'b0;
      end
    end
  end

endmodule
