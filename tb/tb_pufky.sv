// tb_pufky: end-to-end test of the key generator at its default size.
//
// 1. Enrolment: records every PUF response as it is produced, then checks
//    the helper data read through the application port (repetition helper
//    words and the BCH remainder, both recomputed here) and the key against
//    the reference SPONGENT-128 model applied to the first bit of every
//    repetition block.
// 2. Reconstruction: the responses are measured again (with oscillator
//    noise) and, in addition, four bits of one repetition block in each of
//    NINJ helper words are inverted before being written back. Each such
//    block then decodes its first bit wrongly (unless noise happens to
//    undo it), which the BCH code must repair. The reconstructed key must
//    equal the enrolled key, and the BCH correction count must equal the
//    number of wrong repetition decisions recomputed here.
// Counts how often each mechanism happened (enrolment, reconstruction,
// helper data export and import, decoder bypass at enrolment, repetition
// and BCH corrections) and fails if one never did. Checks the key
// generation time against the reference design's 5.62 ms.
module tb_pufky;
  import pufky_pkg::*;
  import spongent_ref_pkg::*;

  localparam int NINJ = 10;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, enroll = 1'b0;
  logic busy, done, key_valid;
  logic [127:0] key;
  logic [$clog2(HD_DEPTH)-1:0] hd_addr = '0;
  logic hd_we = 1'b0;
  logic [HD_W-1:0] hd_wdata = '0, hd_rdata;
  logic [8:0] rep_corr, bch_corr;
  int checks = 0, failures = 0;

  int n_enrol = 0, n_recon = 0, n_export = 0, n_import = 0, n_bypass = 0;
  int n_rep_corr = 0, n_bch_corr = 0;

  pufky dut (.*);

  always #(9259ps) clk = ~clk;   // 54 MHz

  initial begin
    #(30ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responses as produced by the PUF during the current run
  logic [41:0] resp [ROPUF_A];
  int nresp;
  always @(posedge clk) if (dut.puf_valid) begin
    #1 resp[nresp] = dut.puf_x;
    nresp++;
  end

  bit dec_active;
  always @(posedge clk) if (dut.u_bch_dec.busy) dec_active = 1'b1;

  localparam logic [GF_Q1:0] G = bch_gen_poly(BCH_T);
  function automatic logic [BCH_NK-1:0] poly_mod(logic [BCH_N-1:0] c);
    logic [BCH_N-1:0] r;
    r = c;
    for (int d = BCH_N - 1; d >= BCH_NK; d--)
      if (r[d]) r = r ^ (BCH_N'(G[BCH_NK:0]) << (d - BCH_NK));
    return r[BCH_NK-1:0];
  endfunction

  task automatic run(input logic mode, output realtime dur);
    realtime t0;
    nresp = 0; dec_active = 1'b0;
    @(negedge clk); enroll = mode; start = 1'b1; t0 = $realtime;
    @(negedge clk); start = 1'b0;
    @(posedge done);
    dur = $realtime - t0;
    #1;
  endtask

  task automatic hd_read(input int a, output logic [HD_W-1:0] d);
    @(negedge clk); hd_addr = $bits(hd_addr)'(a);
    @(negedge clk); d = hd_rdata;
  endtask

  task automatic hd_write(input int a, input logic [HD_W-1:0] d);
    @(negedge clk); hd_addr = $bits(hd_addr)'(a); hd_we = 1'b1; hd_wdata = d;
    @(negedge clk); hd_we = 1'b0;
  endtask

  initial begin
    realtime dur;
    logic [BCH_N-1:0] cw;
    bit msg [];
    logic [127:0] key_enrol, exp_key;
    logic [HD_W-1:0] hd [HD_DEPTH];
    logic [41:0] enrol_resp [ROPUF_A];
    int p, flips, nbch;

    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // ------------------------------------------------------------ enrolment
    run(1'b1, dur);
    n_enrol++;
    $display("enrolment: %0t", dur);
    if (!dec_active) n_bypass++;
    checks++;
    if (nresp != int'(ROPUF_A)) begin failures++; $display("%0d responses", nresp); end
    msg = new[BCH_N];
    p = 0;
    for (int r = 0; r < int'(ROPUF_A); r++) begin
      enrol_resp[r] = resp[r];
      for (int b = 0; b < int'(REP_BLOCKS); b++) begin
        msg[p] = resp[r][b * REP_N];
        cw[BCH_N - 1 - p] = resp[r][b * REP_N];
        p++;
      end
    end
    exp_key = hash(msg, BCH_N);
    key_enrol = key;
    checks++;
    if (key !== exp_key) begin failures++; $display("enrol key %h expected %h", key, exp_key); end
    checks++;
    if (rep_corr != 0 || bch_corr != 0) begin failures++; $display("corrections at enrolment"); end

    // helper data export
    for (int a = 0; a < int'(HD_DEPTH); a++) hd_read(a, hd[a]);
    n_export++;
    for (int r = 0; r < int'(ROPUF_A); r++) begin
      logic [HD_W-1:0] h;
      for (int b = 0; b < int'(REP_BLOCKS); b++)
        for (int i = 1; i < int'(REP_N); i++)
          h[b * (REP_N - 1) + i - 1] = resp[r][b * REP_N] ^ resp[r][b * REP_N + i];
      checks++;
      if (hd[r] !== h) begin failures++; $display("REP helper word %0d", r); end
    end
    checks++;
    if ({hd[ROPUF_A + 3], hd[ROPUF_A + 2], hd[ROPUF_A + 1], hd[ROPUF_A]} !== poly_mod(cw)) begin
      failures++; $display("BCH helper data wrong");
    end

    // ---------------------------------------------- import with errors
    for (int k = 0; k < NINJ; k++) begin
      int w, b;
      w = 3 + 5 * k;
      b = k % int'(REP_BLOCKS);
      hd[w][b * (REP_N - 1) +: 4] = ~hd[w][b * (REP_N - 1) +: 4];
    end
    for (int a = 0; a < int'(HD_DEPTH); a++) hd_write(a, hd[a]);
    n_import++;

    // ------------------------------------------------------- reconstruction
    for (int it = 0; it < 2; it++) begin
      run(1'b0, dur);
      n_recon++;
      flips = 0;
      for (int r = 0; r < int'(ROPUF_A); r++) flips += $countones(resp[r] ^ enrol_resp[r]);
      $display("reconstruction %0d: %0t, %0d response bits flipped by noise, rep_corr %0d, bch_corr %0d",
               it, dur, flips, rep_corr, bch_corr);
      checks++;
      if (key !== key_enrol) begin failures++; $display("key %h expected %h", key, key_enrol); end
      // bits the BCH stage must repair: repetition decisions (noisy
      // response with imported helper data) that differ from enrolment
      nbch = 0;
      for (int r = 0; r < int'(ROPUF_A); r++)
        for (int b = 0; b < int'(REP_BLOCKS); b++) begin
          int hw;
          hw = int'(resp[r][b * REP_N]);
          for (int i = 1; i < int'(REP_N); i++)
            hw += int'(resp[r][b * REP_N + i] ^ hd[r][b * (REP_N - 1) + i - 1]);
          if ((hw > int'(REP_N / 2)) != enrol_resp[r][b * REP_N]) nbch++;
        end
      checks++;
      if (int'(bch_corr) != nbch || nbch < NINJ / 2) begin
        failures++; $display("BCH corrected %0d, expected %0d", bch_corr, nbch);
      end
      checks++;
      if (dur > 5.62ms || dur < 53 * 87us) begin failures++; $display("key generation time %0t", dur); end
      n_rep_corr += int'(rep_corr);
      n_bch_corr += int'(bch_corr);
    end

    $display("mechanisms: enrol %0d recon %0d export %0d import %0d bypass %0d rep_corr %0d bch_corr %0d",
             n_enrol, n_recon, n_export, n_import, n_bypass, n_rep_corr, n_bch_corr);
    checks++;
    if (n_enrol == 0 || n_recon == 0 || n_export == 0 || n_import == 0 || n_bypass == 0 ||
        n_rep_corr == 0 || n_bch_corr == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
