// tb_helper_ram: self-checking test of the dual-port helper data RAM.
//
// Fills the memory through one port and reads it through the other, in
// both directions, against a model array; checks the one-cycle read
// latency and that port B wins when both ports write the same word.
module tb_helper_ram;
  import pufky_pkg::*;

  localparam int W = HD_W, DEPTH = HD_DEPTH, AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic a_we = 1'b0, b_we = 1'b0;
  logic [W-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  helper_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < DEPTH; i++) begin
        model[i] = W'({$urandom, $urandom});
        @(negedge clk);
        if (pass == 0) begin b_addr = AW'(i); b_we = 1'b1; b_wdata = model[i]; end
        else           begin a_addr = AW'(i); a_we = 1'b1; a_wdata = model[i]; end
      end
      @(negedge clk); a_we = 1'b0; b_we = 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        a_addr = AW'(i); b_addr = AW'(DEPTH - 1 - i);
        @(negedge clk);
        checks += 2;
        if (a_rdata !== model[i])             begin failures++; $display("A read %0d", i); end
        if (b_rdata !== model[DEPTH - 1 - i]) begin failures++; $display("B read %0d", i); end
      end
    end
    // same-word write: port B wins
    @(negedge clk);
    a_addr = 5; b_addr = 5; a_we = 1'b1; b_we = 1'b1; a_wdata = '1; b_wdata = W'(36'h123456789);
    @(negedge clk); a_we = 1'b0; b_we = 1'b0;
    @(negedge clk);
    checks++;
    if (a_rdata !== W'(36'h123456789)) begin failures++; $display("collision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
