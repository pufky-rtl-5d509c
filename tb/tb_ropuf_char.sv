// tb_ropuf_char: response statistics of the ring-oscillator PUF.
//
// Characterisation workload in the style of the reference evaluation
// (inter- and intra-distance of responses), scaled down: five modelled
// devices (different DEVICE_SEED), 8 oscillator indices each, full 87 us
// window, three measurements per response. Checks that responses of
// different devices differ in about half their bits (inter-distance
// 35..65 %) and that repeated measurements on one device differ little
// (intra-distance below 10 %). Prints both averages.
module tb_ropuf_char;
  localparam int ND = 5, A = 8, NREP = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] sel = '0;
  logic [ND-1:0] busy, valid;
  logic [41:0] x [ND];
  logic [15:0] f_raw [ND][16];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < ND; d++) begin : g_dev
    ropuf #(.A(A), .DEVICE_SEED(d + 11)) dut (
      .clk, .rst_n, .start, .sel, .busy(busy[d]), .valid(valid[d]), .x(x[d]), .f_raw(f_raw[d])
    );
  end

  always #(9259ps) clk = ~clk;   // 54 MHz

  initial begin
    #(10ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [41:0] r [ND][A][NREP];
    int inter_sum, inter_n, intra_sum, intra_n;
    real inter, intra;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NREP; k++) begin
      for (int s = 0; s < A; s++) begin
        @(negedge clk); sel = 3'(s); start = 1'b1;
        @(negedge clk); start = 1'b0;
        // the devices finish at slightly different times; x holds its value
        wait (busy == '0);
        #1;
        for (int d = 0; d < ND; d++) r[d][s][k] = x[d];
        @(negedge clk);
      end
    end
    inter_sum = 0; inter_n = 0; intra_sum = 0; intra_n = 0;
    for (int s = 0; s < A; s++) begin
      for (int d = 0; d < ND; d++) begin
        for (int e = d + 1; e < ND; e++) begin
          inter_sum += $countones(r[d][s][0] ^ r[e][s][0]); inter_n++;
        end
        for (int k = 1; k < NREP; k++) begin
          intra_sum += $countones(r[d][s][0] ^ r[d][s][k]); intra_n++;
        end
      end
    end
    inter = 100.0 * inter_sum / (42.0 * inter_n);
    intra = 100.0 * intra_sum / (42.0 * intra_n);
    $display("average inter-distance %.1f %%, intra-distance %.1f %% (42-bit responses)", inter, intra);
    checks++;
    if (inter < 35.0 || inter > 65.0) begin failures++; $display("inter-distance out of range"); end
    checks++;
    if (intra > 10.0) begin failures++; $display("intra-distance too high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
