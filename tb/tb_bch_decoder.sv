// tb_bch_decoder: self-checking test of the serial BCH decoder.
//
// Draws random error vectors of weight 0..T over the N code positions,
// forms their syndrome polynomial e(x) mod g(x) by long division, runs the
// decoder and compares every reported error bit with the drawn vector.
// Also checks the decode latency against the loop counts of the three
// algorithms.
module tb_bch_decoder;
  import pufky_pkg::*;

  localparam int unsigned N = BCH_N, T = BCH_T, NK = BCH_NK;
  localparam logic [GF_Q1:0] G = bch_gen_poly(T);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NK-1:0] syn;
  logic busy, done, err_valid, err_bit;
  logic [$clog2(N+1)-1:0] nerr;
  int checks = 0, failures = 0;

  bch_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NK-1:0] poly_mod(logic [N-1:0] e);
    logic [N-1:0] r;
    r = e;
    for (int d = N - 1; d >= int'(NK); d--)
      if (r[d]) for (int k = 0; k <= int'(NK); k++) r[d - int'(NK) + k] ^= G[k];
    return r[NK-1:0];
  endfunction

  int expected_cycles;
  initial begin
    expected_cycles = 2 * T * NK + 1 + T + N * T;
    for (int i = 0; i < 2 * T; i++) expected_cycles += ((i < int'(T)) ? i : int'(T)) + 1 + T + 1;
  end

  initial begin
    logic [N-1:0] e, got;
    int w, pos, cyc, ne;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 12; trial++) begin
      e = '0;
      w = (trial == 0) ? 0 : (trial == 1) ? int'(T) : (trial == 2) ? 1 : int'($urandom_range(0, T));
      while ($countones(e) < w) e[$urandom_range(0, N - 1)] = 1'b1;
      if (trial == 2) e = {1'b1, {(N-1){1'b0}}};   // highest position only
      syn = poly_mod(e);
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      got = '0; pos = N - 1; cyc = 1; ne = 0;
      while (!done) begin
        @(posedge clk); #1;
        cyc++;
        if (err_valid) begin
          got[pos] = err_bit;
          pos--;
          ne++;
        end
      end
      checks++;
      if (got !== e || ne != int'(N)) begin
        failures++;
        $display("trial %0d: weight %0d, decoded weight %0d, %0d positions", trial, w, $countones(got), ne);
      end
      checks++;
      if (int'(nerr) != w) begin failures++; $display("trial %0d: nerr %0d != %0d", trial, nerr, w); end
      checks++;
      if (cyc < expected_cycles - 2 || cyc > expected_cycles + 2) begin
        failures++;
        $display("trial %0d: latency %0d, expected about %0d", trial, cyc, expected_cycles);
      end
    end
    $display("decode latency %0d cycles", expected_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
