// ro_counter: edge counter of one ROPUF batch (the "++" box of a batch).
//
// Counts rising edges of the selected oscillator of its batch. It is clocked
// by the oscillator itself, so it can follow oscillators much faster than the
// system clock. `clr` clears it asynchronously; it is raised by the
// measurement control only while all oscillators are stopped. The count is
// read in the system clock domain only after the oscillators have been
// stopped again, when it no longer changes, so no synchronizer is needed.
// The counter saturates instead of wrapping. Width CNT_W is a choice of
// this implementation (16 bits hold 87 us of a 750 MHz oscillator).
module ro_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             ro_clk,
  input  logic             clr,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr)              count <= '0;
    else if (~&count)     count <= count + 1'b1;
  end

endmodule
