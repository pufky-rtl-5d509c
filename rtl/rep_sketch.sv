// rep_sketch: repetition-code secure sketch, C_REP(7,1,3) (combinational).
//
// The PUF response x is cut into NB blocks of N bits (6 blocks of 7 for a
// 42-bit response); bit 0 of a block is its first bit x_1. For each block:
//   syndrome generation  h_i = x_1 XOR x_{i+1}, i = 1..N-1   -> hd_out
//   recovery             s = h(x') XOR h_stored;  e_1 = (HW(s) > (N-1)/2)
//   output               y = x'_1 XOR e_1   (one bit per block)
// The remaining error bits e_2..e_N are not needed because only the first
// bit of each block is passed on to the BCH stage, as in the reference
// design. During enrolment the caller feeds hd_out back as hd_in, so s is
// zero and y is simply x_1. `corr` flags the blocks in which e_1 was set.
//
// Helper data packing (own choice): block k occupies hd[(N-1)k +: N-1],
// with h_1 in its least significant bit.
module rep_sketch
  import pufky_pkg::*;
#(
  parameter int unsigned N  = REP_N,
  parameter int unsigned NB = REP_BLOCKS
) (
  input  logic [N*NB-1:0]     x,
  input  logic [(N-1)*NB-1:0] hd_in,
  output logic [(N-1)*NB-1:0] hd_out,
  output logic [NB-1:0]       y,
  output logic [NB-1:0]       corr
);

  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [N-2:0] h, s;
    logic [$clog2(N):0] hw;
    assign h = {(N-1){x[N*k]}} ^ x[N*k+1 +: N-1];
    assign hd_out[(N-1)*k +: N-1] = h;
    assign s = h ^ hd_in[(N-1)*k +: N-1];
    always_comb begin
      hw = '0;
      for (int i = 0; i < N - 1; i++) hw = hw + ($clog2(N)+1)'(s[i]);
    end
    assign corr[k] = (hw > ($clog2(N)+1)'((N - 1) / 2));
    assign y[k]    = x[N*k] ^ corr[k];
  end

endmodule
