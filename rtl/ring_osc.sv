// ring_osc: behavioural model of one ring oscillator (not a circuit).
//
// On silicon this is a short loop of inverting cells whose frequency depends
// on process variation; it has no logic function that RTL can express. The
// model toggles `osc` every HALF_PS picoseconds while `en` is high, plus a
// random jitter of up to +/-JITTER_PS per half period (from a xorshift
// generator seeded by SEED) to mimic measurement noise. When `en` falls
// the output stops at its current level, as a gated ring does, so a
// counter clocked by it freezes. A synthesis tool reads the held output as
// a one-bit latch; a real ring has no such storage element.
//
// Interface: en (enable, from the measurement control), osc (oscillator
// output). Timing: free running, asynchronous to every clock in the design.
// The period spread between instances is chosen by whoever instantiates it.
module ring_osc #(
  parameter int unsigned HALF_PS   = 2500,
  parameter int unsigned JITTER_PS = 0,
  parameter int unsigned SEED      = 1
) (
  input  logic en,
  output logic osc
);

  // xorshift32 noise source for the jitter
  logic [31:0] rng;

  initial begin
    osc = 1'b0;
    rng = (SEED == 0) ? 32'd1 : SEED;
  end

  always begin
    if (!en) begin
      @(posedge en);
    end else begin
      int unsigned d;
      d = HALF_PS;
      rng = rng ^ (rng << 13);
      rng = rng ^ (rng >> 17);
      rng = rng ^ (rng << 5);
      if (JITTER_PS != 0) d = HALF_PS - JITTER_PS + (rng % (2 * JITTER_PS + 1));
      #(d * 1ps);
      if (en) osc = ~osc;
    end
  end

endmodule
