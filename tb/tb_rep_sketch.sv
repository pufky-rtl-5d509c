// tb_rep_sketch: self-checking test of the (7,1,3) repetition sketch.
//
// Enrols a random 42-bit response (helper data compared with x_1 XOR x_i+1
// computed here), then adds an error pattern of chosen weight per block.
// A block's output must equal the enrolled first bit when at most three of
// its seven bits flipped and its complement otherwise; the correction flag
// must be set exactly when the first bit was judged wrong.
module tb_rep_sketch;
  import pufky_pkg::*;

  localparam int N = REP_N, NB = REP_BLOCKS;

  logic [N*NB-1:0] x;
  logic [(N-1)*NB-1:0] hd_in, hd_out;
  logic [NB-1:0] y, corr;
  int checks = 0, failures = 0;

  rep_sketch dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N*NB-1:0] x0, e;
    logic [(N-1)*NB-1:0] h_ref;
    int w [NB];
    for (int trial = 0; trial < 300; trial++) begin
      x0 = {$urandom, $urandom};
      for (int b = 0; b < NB; b++)
        for (int i = 1; i < N; i++) h_ref[b*(N-1) + i - 1] = x0[b*N] ^ x0[b*N + i];
      // enrolment
      x = x0; hd_in = h_ref; #1;
      checks++;
      if (hd_out !== h_ref || corr !== '0) begin failures++; $display("enrol mismatch"); end
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (y[b] !== x0[b*N]) begin failures++; $display("enrol y[%0d]", b); end
      end
      // reconstruction with per-block error weight 0..7
      e = '0;
      for (int b = 0; b < NB; b++) begin
        w[b] = (trial < 8) ? trial : $urandom_range(0, N);
        while ($countones(e[b*N +: N]) < w[b]) e[b*N + $urandom_range(0, N - 1)] = 1'b1;
      end
      x = x0 ^ e; hd_in = h_ref; #1;
      for (int b = 0; b < NB; b++) begin
        logic exp_y;
        exp_y = (w[b] <= (N - 1) / 2) ? x0[b*N] : ~x0[b*N];
        checks++;
        if (y[b] !== exp_y || corr[b] !== (exp_y ^ x[b*N])) begin
          failures++;
          $display("trial %0d block %0d weight %0d: y=%b corr=%b", trial, b, w[b], y[b], corr[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
