// tb_ring_osc: checks the ring oscillator model.
//
// Counts rising edges over a fixed window for a jitter-free instance and a
// jittered one (count must match the nominal period within the jitter
// bound), and checks that the output stops while disabled.
module tb_ring_osc;
  logic en0 = 1'b0, en1 = 1'b0, osc0, osc1;
  int e0 = 0, e1 = 0;
  int checks = 0, failures = 0;

  ring_osc #(.HALF_PS(2500), .JITTER_PS(0))   u0 (.en(en0), .osc(osc0));
  ring_osc #(.HALF_PS(4000), .JITTER_PS(200)) u1 (.en(en1), .osc(osc1));

  always @(posedge osc0) e0++;
  always @(posedge osc1) e1++;

  initial begin
    #(50us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic h0, h1;
    #(100ns);
    checks++;
    if (e0 != 0 || e1 != 0) begin failures++; $display("toggles while disabled"); end
    en0 = 1'b1; en1 = 1'b1;
    #(1us);
    en0 = 1'b0; en1 = 1'b0;
    // 1 us / 5 ns = 200 edges; 1 us / 8 ns = 125 edges
    checks++;
    if (e0 < 199 || e0 > 200) begin failures++; $display("osc0 %0d edges", e0); end
    checks++;
    if (e1 < 118 || e1 > 132) begin failures++; $display("osc1 %0d edges", e1); end
    $display("edges in 1 us: %0d and %0d", e0, e1);
    #(20ns);
    h0 = osc0; h1 = osc1;
    e0 = 0; e1 = 0;
    #(1us);
    checks++;
    if (e0 != 0 || e1 != 0 || osc0 !== h0 || osc1 !== h1) begin failures++; $display("not stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
