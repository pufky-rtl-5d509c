// tb_ropuf: self-checking test of the ring-oscillator PUF.
//
// Uses 4 oscillators per batch and a short window (500 timer cycles of
// 10 ns = 5 us) to keep the run short, and a normalisation table with
// nonzero terms. For each oscillator index it checks: the raw counts match
// the modelled oscillator periods over the window; the measurement lasts
// the timer window (independent of the system clock); and the response
// equals normalisation, Lehmer coding, Gray coding and XOR compression
// recomputed here from the raw counts. Repeated measurements of the same
// index must mostly agree (low noise).
module tb_ropuf;
  import pufky_pkg::*;

  localparam int B = 16, A = 4, T_MEAS = 500;
  localparam int WID [15] = '{1, 2, 2, 3, 3, 3, 3, 4, 4, 4, 4, 4, 4, 4, 4};

  function automatic logic [15:0] mu_entry(int k);
    return 16'((k * 7) % 23);
  endfunction
  typedef logic [15:0] mu_tab_t [B*A];
  function automatic mu_tab_t mu_init();
    mu_tab_t m;
    for (int k = 0; k < B * A; k++) m[k] = mu_entry(k);
    return m;
  endfunction
  localparam mu_tab_t MU_T = mu_init();

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0] sel = '0;
  logic busy, valid;
  logic [41:0] x;
  logic [15:0] f_raw [B];
  int checks = 0, failures = 0;

  ropuf #(.A(A), .T_MEAS(T_MEAS), .MU(MU_T)) dut (.*);

  always #(9259ps) clk = ~clk;   // 54 MHz

  initial begin
    #(2ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [41:0] expected_x(logic [15:0] f [B], int s);
    int fn [B];
    bit bits [$];
    logic [41:0] r;
    bit carry;
    for (int i = 0; i < B; i++) fn[i] = int'(f[i]) - int'(MU_T[i * A + s]);
    for (int j = 1; j < B; j++) begin
      int l;
      logic [3:0] g;
      l = 0;
      for (int i = 0; i < j; i++) if (fn[j] > fn[i]) l++;
      g = 4'(l) ^ 4'(l >> 1);
      if (j % 2 == 1 && j <= 13) begin
        for (int k = 0; k < WID[j-1] - 1; k++) bits.push_back(g[k]);
        carry = g[WID[j-1] - 1];
      end else if (j % 2 == 0) begin
        for (int k = 0; k < WID[j-1] - 1; k++) bits.push_back(g[k]);
        bits.push_back(g[WID[j-1] - 1] ^ carry);
      end else begin
        for (int k = 0; k < WID[j-1]; k++) bits.push_back(g[k]);
      end
    end
    if (bits.size() != 42) $display("reference length %0d", bits.size());
    foreach (bits[i]) r[i] = bits[i];
    return r;
  endfunction

  initial begin
    logic [41:0] first [A];
    realtime t0, t1;
    int hdist;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int s = 0; s < A; s++) begin
        @(negedge clk); sel = 2'(s); start = 1'b1;
        t0 = $realtime;
        @(negedge clk); start = 1'b0;
        @(posedge valid); #1;
        t1 = $realtime;
        checks++;
        if (t1 - t0 < 5us || t1 - t0 > 5.5us) begin
          failures++; $display("measurement took %0t", t1 - t0);
        end
        for (int i = 0; i < B; i++) begin
          checks++;
          // window 5 us, periods 7920..8080 ps -> 618..632 edges
          if (f_raw[i] < 16'd615 || f_raw[i] > 16'd635) begin
            failures++; $display("batch %0d count %0d", i, f_raw[i]);
          end
        end
        checks++;
        if (x !== expected_x(f_raw, s)) begin
          failures++; $display("sel %0d: x %h expected %h", s, x, expected_x(f_raw, s));
        end
        if (rep == 0) first[s] = x;
        else begin
          hdist = $countones(first[s] ^ x);
          $display("sel %0d: %0d of 42 bits differ between two measurements", s, hdist);
          checks++;
          if (hdist > 12) begin failures++; $display("responses too noisy"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
