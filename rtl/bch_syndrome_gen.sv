// bch_syndrome_gen: BCH syndrome generation as an LFSR division.
//
// Computes r(x) = c(x) mod g(x) for the bit stream c fed in, most
// significant coefficient first, one bit per clock while `in_valid` is
// high. g(x) is the generator polynomial of the BCH code (degree NK = n-k,
// 144 for the (318,174,17) code), derived at elaboration from the code's
// error-correcting capability T by pufky_pkg::bch_gen_poly. Each step is
// r <- x*r + bit, reduced by g when the bit shifted out of the top is one,
// so an NK-bit register does the whole division.
//
// The enrolment remainder is the BCH helper data; at reconstruction the
// remainder of the noisy data XOR the stored helper data is e(x) mod g(x),
// whose values at alpha^1..alpha^2t are the syndromes of the error e.
// `clr` (synchronous) empties the register for a new codeword. Latency:
// n clock cycles for an n-bit word, rem valid the cycle after the last bit.
module bch_syndrome_gen
  import pufky_pkg::*;
#(
  parameter int unsigned T  = BCH_T,
  parameter int unsigned NK = BCH_NK
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          in_valid,
  input  logic          in_bit,
  output logic [NK-1:0] rem
);

  localparam logic [GF_Q1:0] GFULL = bch_gen_poly(T);
  localparam logic [NK-1:0]  G     = GFULL[NK-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        rem <= '0;
    else if (clr)      rem <= '0;
    else if (in_valid) rem <= {rem[NK-2:0], in_bit} ^ (rem[NK-1] ? G : '0);
  end

endmodule
