// helper_ram: dual-port helper data memory.
//
// Stores the public helper data: one 36-bit word of repetition-code helper
// data per PUF response (53 words) followed by the 144-bit BCH helper data
// in four words, 2052 bits in all. Port A belongs to the key generator's
// controller, port B is the application's helper data read/write port, so
// helper data can be exported after enrolment and loaded back before
// reconstruction. Both ports read synchronously (data one cycle after the
// address) and write on the rising clock edge. When both ports write the same
// word, port B wins; the controller only uses port A while
// busy. Word organisation and the two ports are this implementation's
// choice; the reference design only shows a helper data RAM with an
// external R/W interface.
module helper_ram
  import pufky_pkg::*;
#(
  parameter int unsigned W     = HD_W,
  parameter int unsigned DEPTH = HD_DEPTH
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic                     a_we,
  input  logic [W-1:0]             a_wdata,
  output logic [W-1:0]             a_rdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic                     b_we,
  input  logic [W-1:0]             b_wdata,
  output logic [W-1:0]             b_rdata
);

  logic [W-1:0] mem [DEPTH];

  // Port B's write takes effect when both ports write the same word.
  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
