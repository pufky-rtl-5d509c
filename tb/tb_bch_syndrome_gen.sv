// tb_bch_syndrome_gen: self-checking test of the BCH syndrome LFSR.
//
// Feeds random 318-bit words most significant coefficient first and
// compares the remainder with a long division done here. Codewords built
// as m(x)*g(x) must leave a zero remainder, and a single one in position
// j < 144 must leave exactly x^j. Checks the one-bit-per-cycle rate.
module tb_bch_syndrome_gen;
  import pufky_pkg::*;

  localparam int N = BCH_N, NK = BCH_NK;
  localparam logic [GF_Q1:0] G = bch_gen_poly(BCH_T);

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, in_valid = 1'b0, in_bit = 1'b0;
  logic [NK-1:0] rem;
  int checks = 0, failures = 0;

  bch_syndrome_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NK-1:0] poly_mod(logic [N-1:0] c);
    logic [N-1:0] r;
    r = c;
    for (int d = N - 1; d >= NK; d--)
      if (r[d]) r = r ^ (N'(G[NK:0]) << (d - NK));
    return r[NK-1:0];
  endfunction

  task automatic feed(input logic [N-1:0] c, output int cycles);
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    cycles = 0;
    for (int d = N - 1; d >= 0; d--) begin
      in_valid = 1'b1; in_bit = c[d];
      @(negedge clk);
      cycles++;
    end
    in_valid = 1'b0;
  endtask

  initial begin
    logic [N-1:0] c, m;
    int cyc;
    // g must have degree n-k and a constant term
    checks++;
    if (G[NK] !== 1'b1 || G[0] !== 1'b1 || G[GF_Q1:NK+1] !== '0) begin
      failures++; $display("generator polynomial degree wrong");
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      c = '0;
      for (int i = 0; i < N; i += 32) c = (c << 32) | N'($urandom);
      feed(c, cyc);
      checks++;
      if (rem !== poly_mod(c)) begin failures++; $display("random word %0d wrong", t); end
      checks++;
      if (cyc != N) begin failures++; $display("took %0d cycles", cyc); end
      // codeword m(x) g(x), deg m < k
      m = c & ((N'(1) << (N - NK)) - 1);
      c = '0;
      for (int i = 0; i < N - NK; i++) if (m[i]) c = c ^ (N'(G[NK:0]) << i);
      feed(c, cyc);
      checks++;
      if (rem !== '0) begin failures++; $display("codeword %0d: nonzero remainder", t); end
    end
    for (int j = 0; j < NK; j += 13) begin
      feed(N'(1) << j, cyc);
      checks++;
      if (rem !== (NK'(1) << j)) begin failures++; $display("x^%0d wrong", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
