// spongent: SPONGENT-128 entropy accumulator (hash), one round per cycle.
//
// A sponge with a 136-bit state (capacity 128, rate 8). The message is
// taken one bit per cycle through a valid/ready handshake, first bit into
// the most significant bit of an 8-bit block. Each full block is XORed into
// the 8 least significant state bits and followed by the 70-round
// permutation, one round per clock. After the bit marked `in_last`, the
// message is padded with a single one bit and zeros up to the block size.
// Then 16 blocks of 8 bits are squeezed, with a permutation between them,
// and `key` (first squeezed block in the most significant byte) is
// presented with a one-cycle `key_valid` pulse; `key` holds its value.
// `init` clears the state for a new message.
//
// One round: XOR of the 7-bit round counter into the low state bits and of
// its bit-reversal into the high state bits, the 4-bit S-box on all 34
// nibbles, then the bit permutation j -> j*34 mod 135. For a 318-bit
// message: 40 absorbed blocks and 15 extra permutations, 55 * 70 = 3850
// round cycles plus one cycle per message bit.
//
// That a SPONGENT-128 hash is the entropy accumulator follows the reference
// design; the round definition is taken from the published SPONGENT-128/
// 128/8 specification, and the bit ordering of message and output, the
// serial input and the round-per-cycle datapath are this implementation's
// choices.
module spongent
  import pufky_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic                   in_valid,
  input  logic                   in_bit,
  input  logic                   in_last,
  output logic                   in_ready,
  output logic [SPG_N-1:0]       key,
  output logic                   key_valid
);

  localparam int unsigned NSQ = SPG_N / SPG_R;   // 16 squeezed blocks

  typedef enum logic [2:0] {H_ABSORB, H_PAD, H_PERM, H_SQUEEZE, H_DONE} hstate_t;
  hstate_t state;

  logic [SPG_B-1:0] st;
  logic [SPG_R-1:0] blk;
  logic [2:0]       nbits;
  logic             last_seen;
  logic             pad_done;
  logic [6:0]       lc;
  logic [6:0]       rnd;
  logic [4:0]       nsq;

  // One permutation round of the state.
  function automatic logic [SPG_B-1:0] spg_round(logic [SPG_B-1:0] s, logic [6:0] c);
    logic [SPG_B-1:0] t, p;
    t = s;
    t[6:0] = t[6:0] ^ c;
    for (int i = 0; i < 7; i++) t[SPG_B-1-i] = t[SPG_B-1-i] ^ c[i];
    for (int n = 0; n < SPG_B / 4; n++) t[4*n +: 4] = spg_sbox(t[4*n +: 4]);
    p = '0;
    for (int unsigned b = 0; b < SPG_B; b++) p[spg_perm(b)] = t[b];
    return p;
  endfunction

  assign in_ready = (state == H_ABSORB) && !last_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= H_ABSORB; st <= '0; blk <= '0; nbits <= '0; last_seen <= 1'b0; pad_done <= 1'b0;
      lc <= SPG_LC_INIT; rnd <= '0; nsq <= '0; key <= '0; key_valid <= 1'b0;
    end else begin
      key_valid <= 1'b0;
      if (init) begin
        state <= H_ABSORB; st <= '0; blk <= '0; nbits <= '0; last_seen <= 1'b0; pad_done <= 1'b0;
        nsq   <= '0;
      end else begin
        case (state)
          H_ABSORB: if (in_valid && in_ready) begin
            if (nbits == 3'(SPG_R - 1)) begin
              st[SPG_R-1:0] <= st[SPG_R-1:0] ^ {blk[SPG_R-2:0], in_bit};
              nbits <= '0;
              lc    <= SPG_LC_INIT;
              rnd   <= '0;
              state <= H_PERM;
              if (in_last) last_seen <= 1'b1;
            end else begin
              blk   <= {blk[SPG_R-2:0], in_bit};
              nbits <= nbits + 1'b1;
              if (in_last) begin
                last_seen <= 1'b1;
                state     <= H_PAD;
              end
            end
          end
          // Pad: one 1 bit then zeros up to the block boundary.
          H_PAD: begin
            logic [SPG_R-1:0] pb;
            pb = blk;
            for (int n = 0; n < SPG_R; n++) begin
              if (n >= int'(nbits)) begin
                pb = {pb[SPG_R-2:0], (n == int'(nbits))};
              end
            end
            st[SPG_R-1:0] <= st[SPG_R-1:0] ^ pb;
            pad_done <= 1'b1;
            nbits <= '0;
            lc    <= SPG_LC_INIT;
            rnd   <= '0;
            state <= H_PERM;
          end
          H_PERM: begin
            st  <= spg_round(st, lc);
            lc  <= spg_lc_next(lc);
            rnd <= rnd + 1'b1;
            if (rnd == 7'(SPG_ROUNDS - 1)) begin
              if (!last_seen)       state <= H_ABSORB;
              else if (!pad_done)   state <= H_PAD;     // message ended on a block boundary
              else                  state <= H_SQUEEZE;
            end
          end
          H_SQUEEZE: begin
            key <= {key[SPG_N-SPG_R-1:0], st[SPG_R-1:0]};
            nsq <= nsq + 1'b1;
            if (nsq == 5'(NSQ - 1)) begin
              key_valid <= 1'b1;
              state     <= H_DONE;
            end else begin
              lc    <= SPG_LC_INIT;
              rnd   <= '0;
              state <= H_PERM;
            end
          end
          H_DONE: ;
          default: state <= H_ABSORB;
        endcase
      end
    end
  end

endmodule
