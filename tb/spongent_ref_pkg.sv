// spongent_ref_pkg: bit-level reference model of SPONGENT-128 for the
// testbenches. Written independently of the RTL: the state is an array of
// bits, the S-box a lookup table and the permutation is applied as
// "bit j goes to j*b/4 mod (b-1)". Message bits are taken first-bit-first
// into 8-bit blocks (first bit = block MSB), padded with 1 and zeros, and
// XORed into state bits 7..0; squeezed blocks form the key from its most
// significant byte down.
package spongent_ref_pkg;

  localparam int B = 136, R = 8, ROUNDS = 70;
  localparam bit [3:0] SBOX [16] = '{4'hE, 4'hD, 4'hB, 4'h0, 4'h2, 4'h1, 4'h4, 4'hF,
                                     4'h7, 4'hA, 4'h8, 4'h5, 4'h9, 4'hC, 4'h3, 4'h6};

  function automatic void permute(ref bit s [B]);
    bit [6:0] lc;
    bit t [B];
    lc = 7'h7A;
    for (int r = 0; r < ROUNDS; r++) begin
      for (int i = 0; i < 7; i++) begin
        s[i] ^= lc[i];
        s[B - 1 - i] ^= lc[i];
      end
      for (int n = 0; n < B / 4; n++) begin
        bit [3:0] v;
        v = {s[4*n+3], s[4*n+2], s[4*n+1], s[4*n]};
        v = SBOX[v];
        {s[4*n+3], s[4*n+2], s[4*n+1], s[4*n]} = v;
      end
      for (int j = 0; j < B; j++) t[(j == B - 1) ? j : (j * (B / 4)) % (B - 1)] = s[j];
      s = t;
      lc = {lc[5:0], lc[6] ^ lc[5]};
    end
  endfunction

  // msg[0] is the first message bit.
  function automatic bit [127:0] hash(bit msg [], int len);
    bit s [B];
    bit padded [$];
    bit [127:0] out;
    for (int i = 0; i < B; i++) s[i] = 1'b0;
    for (int i = 0; i < len; i++) padded.push_back(msg[i]);
    padded.push_back(1'b1);
    while (padded.size() % R != 0) padded.push_back(1'b0);
    for (int blk = 0; blk < padded.size() / R; blk++) begin
      for (int k = 0; k < R; k++) s[R - 1 - k] ^= padded[blk * R + k];
      permute(s);
    end
    out = '0;
    for (int q = 0; q < 128 / R; q++) begin
      if (q != 0) permute(s);
      for (int k = 0; k < R; k++) out[127 - q * R - k] = s[R - 1 - k];
    end
    return out;
  endfunction

endpackage
