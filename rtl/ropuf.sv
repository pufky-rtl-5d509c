// ropuf: ring-oscillator PUF with Lehmer-Gray order encoding.
//
// B batches of A ring oscillators; each batch has one multiplexer and one
// edge counter, so B oscillators (one per batch, all with index `sel`) are
// measured at once. The measurement window is a fixed number T_MEAS of
// cycles of an independent timer oscillator, so it does not depend on the
// system clock (87 us in the reference design). The B counts then go
// through three steps:
//   1. normalisation: F'_i = F_i - mu_i, with the expected frequency mu_i of
//      every oscillator read from a ROM (parameter MU, characterised once
//      per design; all zero by default, i.e. no structural bias removed);
//   2. Lehmer-Gray order encoding (lehmer_gray_enc), 49 bits for B = 16;
//   3. XOR entropy compression (entropy_compress), 42 bits for B = 16.
// Every oscillator index serves one response only, giving A responses.
//
// Measurement sequence (system clock domain): `start` latches `sel`,
// clears the counters and the timer for two cycles, then enables the
// selected oscillators and the timer oscillator. When the timer reaches
// T_MEAS it gates all of them off itself; its done flag is synchronised
// into the clock domain, the frozen counts are captured after a few more
// cycles, and one cycle later `x` is registered and `valid` pulses. `busy`
// is high from `start` until `valid`. `f_raw` exposes the raw counts of the
// last measurement (used for characterisation).
//
// The structure (batches, shared counters, timer oscillator, ROM, three
// encoding steps) follows the reference design. The clear/gate/sync
// handshake, counter width and the oscillator models' period spread are
// this implementation's own. The oscillators are behavioural models.
// Synthesis reports a logic loop and a latch in every ring_osc instance:
// that loop is the ring oscillator itself, which a PUF of this kind needs;
// silicon builds it from hand-placed inverting cells, not from this model.
module ropuf
  import pufky_pkg::*;
#(
  parameter int unsigned B            = ROPUF_B,
  parameter int unsigned A            = ROPUF_A,
  parameter int unsigned CNT_W        = ROPUF_CNT_W,
  parameter int unsigned LY           = lehmer_off(B),
  parameter int unsigned LX           = lehmer_off(B) - (B - 2) / 2,
  parameter int unsigned T_MEAS       = 8700,   // timer cycles: 87 us at 100 MHz
  parameter int unsigned TMR_HALF_PS  = 5000,   // timer oscillator model, 100 MHz
  parameter int unsigned RO_HALF_PS   = 4000,   // PUF oscillator model, ~125 MHz
  parameter int unsigned RO_SPREAD_PS = 40,     // device-to-device period spread
  parameter int unsigned RO_JITTER_PS = 40,     // per half-period jitter
  parameter int unsigned DEVICE_SEED  = 1,      // selects the modelled device
  parameter logic [CNT_W-1:0] MU [B*A] = '{default: '0}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [$clog2(A)-1:0] sel,
  output logic                 busy,
  output logic                 valid,
  output logic [LX-1:0]        x,
  output logic [CNT_W-1:0]     f_raw [B]
);

  // Half period of oscillator (bi, ai) of the modelled device.
  function automatic int unsigned ro_half(int unsigned bi, int unsigned ai);
    int unsigned h;
    h = (DEVICE_SEED * 32'h9E3779B1) ^ (bi * 32'h85EBCA6B) ^ (ai * 32'hC2B2AE35);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return RO_HALF_PS - RO_SPREAD_PS + (h % (2 * RO_SPREAD_PS + 1));
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_RUN, S_SETTLE, S_CAP, S_ENC} state_t;
  state_t state;

  logic [$clog2(A)-1:0] sel_q;
  logic                 clr, run;
  logic [2:0]           wait_cnt;

  // ------------------------------------------------ timer oscillator
  logic tmr_osc, tdone;
  logic [$clog2(T_MEAS+1)-1:0] tcnt;
  logic ro_en;

  assign tdone = (tcnt == T_MEAS[$bits(tcnt)-1:0]);
  assign ro_en = run & ~tdone;

  ring_osc #(.HALF_PS(TMR_HALF_PS), .JITTER_PS(0)) u_tmr_osc (.en(ro_en), .osc(tmr_osc));

  always_ff @(posedge tmr_osc or posedge clr) begin
    if (clr)         tcnt <= '0;
    else if (!tdone) tcnt <= tcnt + 1'b1;
  end

  logic [1:0] tdone_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tdone_sync <= '0;
    else        tdone_sync <= {tdone_sync[0], tdone};
  end

  // ------------------------------------------------ oscillator batches
  logic [CNT_W-1:0] cnt [B];

  for (genvar bi = 0; bi < B; bi++) begin : g_batch
    logic [A-1:0] osc;
    for (genvar ai = 0; ai < A; ai++) begin : g_ro
      ring_osc #(.HALF_PS(ro_half(bi, ai)), .JITTER_PS(RO_JITTER_PS),
                 .SEED(DEVICE_SEED * 7919 + bi * 1009 + ai + 1)) u_ro (
        .en (ro_en && (sel_q == ai)),
        .osc(osc[ai])
      );
    end
    ro_counter #(.CNT_W(CNT_W)) u_cnt (.ro_clk(osc[sel_q]), .clr(clr), .count(cnt[bi]));
  end

  // ------------------------------------------------ normalisation ROM
  logic [CNT_W-1:0] mu_q [B];
  always_ff @(posedge clk) begin
    for (int unsigned bi = 0; bi < B; bi++) mu_q[bi] <= MU[bi * A + int'(sel_q)];
  end

  logic signed [CNT_W:0] fn [B];
  always_comb begin
    for (int unsigned bi = 0; bi < B; bi++)
      fn[bi] = $signed({1'b0, f_raw[bi]}) - $signed({1'b0, mu_q[bi]});
  end

  logic [LY-1:0] y;
  logic [LX-1:0] x_c;
  lehmer_gray_enc  #(.B(B), .W(CNT_W + 1), .LY(LY)) u_lehmer (.f(fn), .y(y));
  entropy_compress #(.B(B), .LY(LY), .LX(LX))       u_comp   (.y(y), .x(x_c));

  // ------------------------------------------------ measurement control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sel_q    <= '0;
      clr      <= 1'b1;
      run      <= 1'b0;
      wait_cnt <= '0;
      valid    <= 1'b0;
      x        <= '0;
      for (int unsigned bi = 0; bi < B; bi++) f_raw[bi] <= '0;
    end else begin
      valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          sel_q    <= sel;
          clr      <= 1'b1;
          wait_cnt <= '0;
          state    <= S_CLR;
        end
        S_CLR: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 3'd1) begin
            clr   <= 1'b0;
            run   <= 1'b1;
            state <= S_RUN;
          end
        end
        S_RUN: if (tdone_sync[1]) begin
          wait_cnt <= '0;
          state    <= S_SETTLE;
        end
        S_SETTLE: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 3'd3) state <= S_CAP;
        end
        S_CAP: begin
          for (int unsigned bi = 0; bi < B; bi++) f_raw[bi] <= cnt[bi];
          state <= S_ENC;
        end
        S_ENC: begin
          x     <= x_c;
          valid <= 1'b1;
          run   <= 1'b0;
          clr   <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
