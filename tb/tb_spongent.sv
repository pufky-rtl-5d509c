// tb_spongent: self-checking test of the SPONGENT-128 accumulator.
//
// Hashes random messages of several lengths (318 bits as in the key
// generator, a multiple of the block size, short ones), with random stalls
// on the input, and compares each key with the bit-level reference model.
// Also checks that a 318-bit message takes 55 permutations of 70 rounds.
module tb_spongent;
  import spongent_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0;
  logic in_valid = 1'b0, in_bit = 1'b0, in_last = 1'b0, in_ready;
  logic [127:0] key;
  logic key_valid;
  int checks = 0, failures = 0;

  spongent dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [6] = '{318, 318, 16, 8, 5, 1};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (lens[t]) begin
      bit msg [];
      bit [127:0] exp_key;
      int len, sent, cyc;
      len = lens[t];
      msg = new[len];
      foreach (msg[i]) msg[i] = 1'($urandom);
      exp_key = hash(msg, len);
      @(negedge clk); init = 1'b1;
      @(negedge clk); init = 1'b0;
      sent = 0; cyc = 0;
      while (!key_valid) begin
        // stall the input now and then on the second message
        in_valid = (sent < len) && !(t == 1 && ($urandom % 4 == 0));
        in_bit   = (sent < len) ? msg[sent] : 1'b0;
        in_last  = (sent == len - 1);
        @(posedge clk);
        if (in_valid && in_ready) sent++;
        #1; cyc++;
      end
      in_valid = 1'b0;
      checks++;
      if (key !== exp_key) begin
        failures++;
        $display("len %0d: key %h expected %h", len, key, exp_key);
      end
      if (t == 0) begin
        checks++;
        // 318 input cycles, 40 pad/XOR steps absorbed within, 55*70 rounds, 16 squeezes
        if (cyc < 55 * 70 + 318 || cyc > 55 * 70 + 318 + 40) begin
          failures++;
          $display("318-bit hash took %0d cycles", cyc);
        end
        $display("318-bit hash: %0d cycles", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
