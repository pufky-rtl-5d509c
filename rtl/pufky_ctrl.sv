// pufky_ctrl: controller of the key generator.
//
// Sequences one key generation, either an enrolment (`enroll` = 1 at
// `start`: helper data is produced and written to the helper RAM) or a
// reconstruction (`enroll` = 0: helper data is read back and used to
// correct the noisy PUF responses). Both end with the same key if the
// errors stay within what the codes correct. Steps:
//   1. for each of the A oscillator indices: measure a 42-bit response,
//      pass it through the repetition sketch (helper word idx of the RAM is
//      written at enrolment or read at reconstruction) and shift the 6
//      corrected bits into the BCH syndrome LFSR and into a 318-bit buffer;
//   2. write (enrolment) or read (reconstruction) the 4 words of BCH helper
//      data that follow the A repetition words;
//   3. reconstruction only: start the BCH decoder on remainder XOR helper
//      data and rotate the buffer once, XORing in the error bit that the
//      decoder reports for each position; at enrolment the syndrome is zero
//      by construction and decoding is skipped;
//   4. stream the 318 buffered bits into the hash and wait for the key.
// `busy` is high from `start` to `done` (one-cycle pulse). `rep_corr`
// and `bch_corr` count the bits corrected by each code in the last run.
//
// The order of the steps follows the reference architecture; the buffer
// that holds the BCH input while it is decoded, the RAM word layout and
// the decoder bypass at enrolment are this implementation's choices.
module pufky_ctrl
  import pufky_pkg::*;
#(
  parameter int unsigned A    = ROPUF_A,
  parameter int unsigned NB   = REP_BLOCKS,
  parameter int unsigned HW   = HD_W,
  parameter int unsigned NK   = BCH_NK,
  parameter int unsigned N    = A * NB,
  parameter int unsigned NHW  = NK / HW,
  parameter int unsigned AW   = $clog2(A + NK / HW)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // application control
  input  logic                 start,
  input  logic                 enroll,
  output logic                 busy,
  output logic                 done,
  output logic                 mode_enroll,
  output logic [8:0]           rep_corr,
  output logic [8:0]           bch_corr,
  // ROPUF
  output logic                 puf_start,
  output logic [$clog2(A)-1:0] puf_sel,
  input  logic                 puf_valid,
  // repetition sketch
  input  logic [NB-1:0]        rep_y,
  input  logic [NB-1:0]        rep_fix,
  input  logic [HW-1:0]        rep_hd,
  // helper RAM port A
  output logic [AW-1:0]        ram_addr,
  output logic                 ram_we,
  output logic [HW-1:0]        ram_wdata,
  input  logic [HW-1:0]        ram_rdata,
  // BCH syndrome generator
  output logic                 lfsr_clr,
  output logic                 lfsr_valid,
  output logic                 lfsr_bit,
  input  logic [NK-1:0]        lfsr_rem,
  // BCH decoder
  output logic                 dec_start,
  output logic [NK-1:0]        dec_syn,
  input  logic                 dec_done,
  input  logic                 dec_err_valid,
  input  logic                 dec_err_bit,
  input  logic [8:0]           dec_nerr,
  // entropy accumulator
  output logic                 hash_init,
  output logic                 hash_valid,
  output logic                 hash_bit,
  output logic                 hash_last,
  input  logic                 hash_ready,
  input  logic                 key_valid
);

  typedef enum logic [3:0] {
    C_IDLE, C_MEAS, C_WAIT, C_REP, C_SHIFT, C_BHD, C_DEC, C_DWAIT, C_HASH, C_KWAIT
  } cstate_t;

  cstate_t state;
  logic [$clog2(A)-1:0]   idx;
  logic [NB-1:0]          rep_bits;
  logic [$clog2(NB)-1:0]  kb;
  logic [2:0]             w;
  logic [N-1:0]           dbuf;
  logic [NK-1:0]          hd_bch;
  logic [$clog2(N)-1:0]   cnt;

  assign busy    = (state != C_IDLE);
  assign puf_sel = idx;
  assign dec_syn = lfsr_rem ^ hd_bch;

  always_comb begin
    puf_start  = 1'b0;
    ram_addr   = AW'(idx);
    ram_we     = 1'b0;
    ram_wdata  = rep_hd;
    lfsr_clr   = 1'b0;
    lfsr_valid = 1'b0;
    lfsr_bit   = rep_bits[kb];
    dec_start  = 1'b0;
    hash_init  = 1'b0;
    hash_valid = 1'b0;
    hash_bit   = dbuf[N-1];
    hash_last  = (cnt == $bits(cnt)'(N - 1));
    case (state)
      C_IDLE:  begin lfsr_clr = start; hash_init = start; end
      C_MEAS:  puf_start = 1'b1;
      C_REP:   ram_we = mode_enroll;
      C_SHIFT: lfsr_valid = 1'b1;
      C_BHD: begin
        ram_addr  = AW'(A) + AW'(int'(w) % NHW);
        ram_we    = mode_enroll && (w < 3'(NHW));
        ram_wdata = lfsr_rem[HW*(int'(w) % NHW) +: HW];
      end
      C_DEC:   dec_start = 1'b1;
      C_HASH:  hash_valid = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; idx <= '0; rep_bits <= '0; kb <= '0; w <= '0;
      dbuf <= '0; hd_bch <= '0; cnt <= '0; done <= 1'b0; mode_enroll <= 1'b0;
      rep_corr <= '0; bch_corr <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        C_IDLE: if (start) begin
          mode_enroll <= enroll;
          idx      <= '0;
          hd_bch   <= '0;
          rep_corr <= '0;
          bch_corr <= '0;
          state    <= C_MEAS;
        end
        C_MEAS: state <= C_WAIT;
        C_WAIT: if (puf_valid) state <= C_REP;
        C_REP: begin
          rep_bits <= rep_y;
          rep_corr <= rep_corr + 9'($countones(rep_fix));
          kb       <= '0;
          state    <= C_SHIFT;
        end
        C_SHIFT: begin
          dbuf <= {dbuf[N-2:0], rep_bits[kb]};
          kb   <= kb + 1'b1;
          if (kb == $bits(kb)'(NB - 1)) begin
            if (idx == $bits(idx)'(A - 1)) begin
              w     <= '0;
              state <= C_BHD;
            end else begin
              idx   <= idx + 1'b1;
              state <= C_MEAS;
            end
          end
        end
        C_BHD: begin
          w <= w + 1'b1;
          if (w != 3'd0) hd_bch[HW*(int'(w) - 1) +: HW] <= ram_rdata;
          if (mode_enroll && w == 3'(NHW - 1)) begin
            cnt   <= '0;
            state <= C_HASH;
          end else if (!mode_enroll && w == 3'(NHW)) begin
            state <= C_DEC;
          end
        end
        C_DEC: state <= C_DWAIT;
        C_DWAIT: begin
          if (dec_err_valid) dbuf <= {dbuf[N-2:0], dbuf[N-1] ^ dec_err_bit};
          if (dec_done) begin
            bch_corr <= dec_nerr;
            cnt      <= '0;
            state    <= C_HASH;
          end
        end
        C_HASH: if (hash_ready) begin
          dbuf <= {dbuf[N-2:0], dbuf[N-1]};
          cnt  <= cnt + 1'b1;
          if (hash_last) state <= C_KWAIT;
        end
        C_KWAIT: if (key_valid) begin
          done  <= 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
