// pufky: PUF-based cryptographic key generator (top level).
//
// Regenerates a 128-bit key from the frequency ordering of on-chip ring
// oscillators, so the key never has to be stored. A ring-oscillator PUF
// (ropuf) produces 53 responses of 42 bits. A concatenated secure sketch
// removes their noise: a (7,1,3) repetition code (rep_sketch) turns each
// response into 6 bits with 36 bits of helper data, and a shortened
// (318,174,17) BCH code (bch_syndrome_gen, bch_decoder) corrects the 318
// resulting bits with 144 more bits of helper data. SPONGENT-128 (spongent)
// then compresses the 318 corrected bits, which hold at least 128 bits of
// entropy after the 2052 public helper bits are accounted for, into the key.
// The helper data lives in a dual-port RAM (helper_ram) that the application
// reads after enrolment and writes back before a reconstruction.
//
// Interface: pulse `start` with `enroll` = 1 to enrol (create helper data
// and a key) or 0 to reconstruct the key from stored helper data; `busy`
// stays high until the one-cycle `done`; `key` is valid from `key_valid`
// (pulsed just before `done`) on. The hd_* port accesses the helper RAM
// (word w < 53: repetition helper data of response w; words 53..56: BCH
// helper data, least significant word first) and must be left alone while
// busy. `rep_corr` and `bch_corr` report how many bits each code corrected
// in the last run. One key takes about 53 * 87 us of oscillator
// measurement plus about 18k clock cycles.
//
// The block structure follows the reference architecture; see the
// submodules for the choices made where it gives no detail. The ring
// oscillators inside ropuf are behavioural models; the logic loop and
// latch that synthesis reports for each of them are the rings themselves.
module pufky
  import pufky_pkg::*;
#(
  parameter int unsigned T_MEAS       = 8700,
  parameter int unsigned RO_JITTER_PS = 40,
  parameter int unsigned DEVICE_SEED  = 1,
  parameter logic [ROPUF_CNT_W-1:0] MU [ROPUF_B*ROPUF_A] = '{default: '0}
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        enroll,
  output logic                        busy,
  output logic                        done,
  output logic [SPG_N-1:0]            key,
  output logic                        key_valid,
  input  logic [$clog2(HD_DEPTH)-1:0] hd_addr,
  input  logic                        hd_we,
  input  logic [HD_W-1:0]             hd_wdata,
  output logic [HD_W-1:0]             hd_rdata,
  output logic [8:0]                  rep_corr,
  output logic [8:0]                  bch_corr
);

  localparam int unsigned AW = $clog2(HD_DEPTH);

  logic                       puf_start, puf_valid;
  logic [$clog2(ROPUF_A)-1:0] puf_sel;
  logic [ROPUF_LX-1:0]        puf_x;

  logic                       mode_enroll;
  logic [HD_W-1:0]            rep_hd_out, rep_hd_in;
  logic [REP_BLOCKS-1:0]      rep_y, rep_fix;

  logic [AW-1:0]              ram_addr;
  logic                       ram_we;
  logic [HD_W-1:0]            ram_wdata, ram_rdata;

  logic                       lfsr_clr, lfsr_valid, lfsr_bit;
  logic [BCH_NK-1:0]          lfsr_rem, dec_syn;

  logic                       dec_start, dec_done, dec_err_valid, dec_err_bit;
  logic [8:0]                 dec_nerr;

  logic                       hash_init, hash_valid, hash_bit, hash_last, hash_ready;

  ropuf #(
    .T_MEAS      (T_MEAS),
    .RO_JITTER_PS(RO_JITTER_PS),
    .DEVICE_SEED (DEVICE_SEED),
    .MU          (MU)
  ) u_ropuf (
    .clk, .rst_n,
    .start(puf_start), .sel(puf_sel), .busy(), .valid(puf_valid),
    .x(puf_x), .f_raw()
  );

  // At enrolment the sketch compares the response with its own helper data.
  assign rep_hd_in = mode_enroll ? rep_hd_out : ram_rdata;

  rep_sketch u_rep (
    .x(puf_x), .hd_in(rep_hd_in), .hd_out(rep_hd_out), .y(rep_y), .corr(rep_fix)
  );

  helper_ram u_ram (
    .clk,
    .a_addr(ram_addr), .a_we(ram_we), .a_wdata(ram_wdata), .a_rdata(ram_rdata),
    .b_addr(hd_addr),  .b_we(hd_we),  .b_wdata(hd_wdata),  .b_rdata(hd_rdata)
  );

  bch_syndrome_gen u_bch_syn (
    .clk, .rst_n, .clr(lfsr_clr), .in_valid(lfsr_valid), .in_bit(lfsr_bit), .rem(lfsr_rem)
  );

  bch_decoder u_bch_dec (
    .clk, .rst_n, .start(dec_start), .syn(dec_syn), .busy(), .done(dec_done),
    .err_valid(dec_err_valid), .err_bit(dec_err_bit), .nerr(dec_nerr)
  );

  spongent u_hash (
    .clk, .rst_n, .init(hash_init), .in_valid(hash_valid), .in_bit(hash_bit),
    .in_last(hash_last), .in_ready(hash_ready), .key(key), .key_valid(key_valid)
  );

  pufky_ctrl u_ctrl (
    .clk, .rst_n, .start, .enroll, .busy, .done, .mode_enroll, .rep_corr, .bch_corr,
    .puf_start, .puf_sel, .puf_valid,
    .rep_y, .rep_fix, .rep_hd(rep_hd_out),
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata,
    .lfsr_clr, .lfsr_valid, .lfsr_bit, .lfsr_rem,
    .dec_start, .dec_syn, .dec_done, .dec_err_valid, .dec_err_bit, .dec_nerr,
    .hash_init, .hash_valid, .hash_bit, .hash_last, .hash_ready, .key_valid
  );

endmodule
