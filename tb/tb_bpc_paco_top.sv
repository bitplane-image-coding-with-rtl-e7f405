// tb_bpc_paco_top - end-to-end test of the codec at reduced size.
//
// Codeblocks of 4 stripes x 8 rows with 8 bitplanes and a 64-slot bitstream.
// For each random codeblock: load the probability table and the coefficients,
// encode, compare the bitstream, its length and the per-pass truncation
// points with the reference model, decode the whole stream and check that the
// result is lossless, then decode a prefix cut at a pass boundary or at a
// random length and compare with the model's decode of the same prefix. One
// subband holds probabilities of zero so that its codeblocks overflow the
// bitstream. Counted mechanisms, each of which must occur: dispatch stalls,
// sign steps, several codewords finishing in one step, all three pass types,
// codeword fetches, truncated decoding, overflow and the empty codeblock.
module tb_bpc_paco_top;
  import bpc_pkg::*;
  import bpc_ref_pkg::*;

  localparam int unsigned T = 4, ROWS = 8, W = 16, PHAT = 7, MAG_W = 8, NSUB = 4;
  localparam int unsigned BS_WORDS = 64;
  localparam int unsigned NBLOCKS = 40, MAX_BITS = 8;
  localparam int OVERFLOW_SUB = 3, NEED_EMPTY = 1;
  localparam int unsigned WATCHDOG = 3000000;

  localparam int unsigned COLS = 2 * T;
  localparam int unsigned ROW_W = $clog2(ROWS), COL_W = $clog2(COLS);
  localparam int unsigned BP_W = $clog2(MAG_W), NBP_W = $clog2(MAG_W + 1);
  localparam int unsigned SUB_W = (NSUB > 1) ? $clog2(NSUB) : 1;
  localparam int unsigned AW = $clog2(BS_WORDS), SLOT_W = AW + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              lut_wr_en = 0;
  logic [SUB_W-1:0]  lut_wr_sub = '0;
  logic [BP_W-1:0]   lut_wr_plane = '0;
  logic [CTX_W-1:0]  lut_wr_ctx = '0;
  logic [PHAT-1:0]   lut_wr_prob = '0;
  logic              cb_clear = 0, cb_wr_en = 0, cb_wr_neg = 0;
  logic [ROW_W-1:0]  cb_wr_row = '0;
  logic [COL_W-1:0]  cb_wr_col = '0;
  logic [MAG_W-1:0]  cb_wr_mag = '0;
  logic [ROW_W-1:0]  cb_rd_row = '0;
  logic [COL_W-1:0]  cb_rd_col = '0;
  logic              cb_rd_neg;
  logic [MAG_W-1:0]  cb_rd_mag;
  logic              enc_start = 0;
  logic [SUB_W-1:0]  enc_subband = '0;
  logic              enc_busy, enc_done, enc_overflow, enc_stall, enc_pass_done;
  logic [NBP_W-1:0]  enc_nbp;
  logic [SLOT_W-1:0] enc_words;
  pass_e             enc_pass_type;
  logic [BP_W-1:0]   enc_pass_plane;
  logic [AW-1:0]     bs_rd_addr = '0;
  logic [W-1:0]      bs_rd_data;
  logic              dec_start = 0;
  logic [SUB_W-1:0]  dec_subband = '0;
  logic [NBP_W-1:0]  dec_nbp = '0;
  logic [SLOT_W-1:0] dec_word_limit = '0;
  logic              dec_busy, dec_done, dec_truncated, dec_fetch, dec_pass_done;
  logic [SLOT_W-1:0] dec_words_read;
  pass_e             dec_pass_type;
  logic [BP_W-1:0]   dec_pass_plane;
  logic [ROW_W-1:0]  out_rd_row = '0;
  logic [COL_W-1:0]  out_rd_col = '0;
  logic              out_rd_neg;
  logic [MAG_W-1:0]  out_rd_mag;

  bpc_paco_top #(.T(T), .ROWS(ROWS), .W(W), .PHAT(PHAT), .MAG_W(MAG_W), .NSUB(NSUB), .BS_WORDS(BS_WORDS)) dut (.*);

  bpc_ref #(.T(T), .ROWS(ROWS), .W(W), .PHAT(PHAT), .MAG_W(MAG_W), .NSUB(NSUB)) m;

  int unsigned got_pass_len[$];
  int n_stall = 0, n_fetch = 0, n_overflow = 0, n_trunc = 0, n_empty = 0;
  int n_sign = 0, n_multi = 0, n_lossless = 0;
  int n_pass[3];
  int unsigned got_dec_pass[$];
  int unsigned enc_cycles, dec_cycles;

  always @(posedge clk) begin
    if (enc_stall) n_stall++;
    if (dec_fetch) n_fetch++;
    if (dec_pass_done) got_dec_pass.push_back(64 * int'(dec_pass_type) + int'(dec_pass_plane));
    if (enc_pass_done) begin
      got_pass_len.push_back(int'(enc_words));
      n_pass[int'(enc_pass_type)]++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic load_lut();
    for (int s = 0; s < int'(NSUB); s++)
      for (int j = 0; j < int'(MAG_W); j++)
        for (int k = 0; k < int'(NCTX); k++) begin
          @(negedge clk);
          lut_wr_en = 1; lut_wr_sub = SUB_W'(s); lut_wr_plane = BP_W'(j);
          lut_wr_ctx = CTX_W'(k); lut_wr_prob = PHAT'(m.prob[s][j][k]);
        end
    @(negedge clk) lut_wr_en = 0;
  endtask

  task automatic load_block();
    @(negedge clk) cb_clear = 1;
    @(negedge clk) cb_clear = 0;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        @(negedge clk);
        cb_wr_en = 1; cb_wr_row = ROW_W'(r); cb_wr_col = COL_W'(c);
        cb_wr_mag = MAG_W'(m.mag[r][c]); cb_wr_neg = m.neg[r][c];
      end
    @(negedge clk) cb_wr_en = 0;
    for (int i = 0; i < 16; i++) begin
      cb_rd_row = ROW_W'($urandom_range(ROWS - 1)); cb_rd_col = COL_W'($urandom_range(COLS - 1));
      #1;
      check(cb_rd_mag == MAG_W'(m.mag[cb_rd_row][cb_rd_col]) &&
            cb_rd_neg == m.neg[cb_rd_row][cb_rd_col], "input buffer read back");
    end
  endtask

  task automatic encode(int unsigned sub, output bit ovf);
    int unsigned cyc = 0;
    m.encode(sub);
    n_sign += m.n_sign_steps;
    n_multi += m.n_multi_finish_steps;
    got_pass_len.delete();
    @(negedge clk);
    check(int'(enc_nbp) == m.nbp(), "number of bitplanes");
    enc_start = 1; enc_subband = SUB_W'(sub);
    @(negedge clk) enc_start = 0;
    while (!enc_done && cyc < 10000000) begin @(negedge clk); cyc++; end
    enc_cycles = cyc;
    check(enc_done, "encoder done");
    ovf = m.bs.size() > BS_WORDS;
    check(enc_overflow == ovf, $sformatf("overflow flag %0d, model length %0d", enc_overflow, m.bs.size()));
    if (ovf) begin
      n_overflow++;
      check(int'(enc_words) == BS_WORDS, "length saturates at the bitstream size");
      return;
    end
    if (m.nbp() == 0) n_empty++;
    check(int'(enc_words) == m.bs.size(), $sformatf("length %0d vs %0d", enc_words, m.bs.size()));
    check(got_pass_len.size() == m.pass_len.size(), "number of passes");
    for (int i = 0; i < got_pass_len.size() && i < m.pass_len.size(); i++)
      check(got_pass_len[i] == m.pass_len[i], $sformatf("pass %0d length", i));
    for (int i = 0; i < m.bs.size(); i++) begin
      bs_rd_addr = AW'(i);
      #1;
      check(bs_rd_data == W'(m.bs[i]), $sformatf("word %0d", i));
    end
  endtask

  task automatic decode(int unsigned sub, int unsigned lim, bit lossless);
    int unsigned cyc = 0;
    m.decode(sub, m.nbp(), lim);
    got_dec_pass.delete();
    @(negedge clk);
    dec_start = 1; dec_subband = SUB_W'(sub); dec_nbp = NBP_W'(m.nbp());
    dec_word_limit = SLOT_W'(lim);
    @(negedge clk) dec_start = 0;
    while (!dec_done && cyc < 10000000) begin @(negedge clk); cyc++; end
    dec_cycles = cyc;
    check(dec_done, "decoder done");
    check(dec_truncated == m.stopped, "truncation flag");
    check(int'(dec_words_read) == m.rd_ptr, "words read");
    if (dec_truncated) n_trunc++;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        out_rd_row = ROW_W'(r); out_rd_col = COL_W'(c);
        #1;
        check(out_rd_mag == MAG_W'(m.dmag[r][c]) && (out_rd_mag == 0 || out_rd_neg == m.dneg[r][c]),
              $sformatf("decoded (%0d,%0d) %0d vs model %0d", r, c, out_rd_mag, m.dmag[r][c]));
        if (lossless)
          check(out_rd_mag == MAG_W'(m.mag[r][c]) && (out_rd_mag == 0 || out_rd_neg == m.neg[r][c]),
                $sformatf("lossless (%0d,%0d)", r, c));
      end
    if (lossless) begin
      n_lossless++;
      // every pass completes, in the order SPP, MRP, CP per bitplane
      check(got_dec_pass.size() == m.pass_len.size(), "decoder pass count");
      for (int i = 0; i < got_dec_pass.size(); i++) begin
        int unsigned pl = (m.nbp() - 1) - (i + 2) / 3;
        int unsigned ty = (i == 0) ? 2 : (i - 1) % 3;
        check(got_dec_pass[i] == 64 * ty + pl, $sformatf("decoder pass %0d", i));
      end
    end
  endtask

  initial begin
    bit ovf;
    int unsigned sub, cut;
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Probabilities of a stationary model: skewed towards 0 in high
    // bitplanes, around one half for signs and refinement.
    foreach (m.prob[s, j, k]) begin
      if (k < 9) m.prob[s][j][k] = $urandom_range(120, 60 - 6 * (k % 9));
      else m.prob[s][j][k] = $urandom_range(80, 48);
    end
    if (OVERFLOW_SUB >= 0)
      foreach (m.prob[s, j, k]) if (s == OVERFLOW_SUB) m.prob[s][j][k] = 0;
    load_lut();
    for (int b = 0; b < int'(NBLOCKS); b++) begin
      if (b == 1) foreach (m.mag[r, c]) m.mag[r][c] = 0;
      else m.random_block(MAX_BITS, 20 + (b * 7) % 60);
      sub = (b % 4 == 3 && OVERFLOW_SUB >= 0) ? OVERFLOW_SUB : $urandom_range(NSUB - 2, 0);
      load_block();
      encode(sub, ovf);
      if (ovf) continue;
      decode(sub, m.bs.size(), 1);
      if (m.bs.size() > 0) begin
        cut = (b % 2 == 0 && m.pass_len.size() > 2) ? m.pass_len[m.pass_len.size() / 2]
                                                     : $urandom_range(m.bs.size() - 1, 0);
        decode(sub, cut, 0);
      end
      if (b == 0) $display("codeblock 0: %0d words, encode %0d cycles, full decode %0d cycles",
                           m.bs.size(), enc_cycles, dec_cycles);
    end
    check(n_stall > 0, "dispatch stall happened");
    check(n_sign > 0, "sign steps happened");
    check(n_multi > 0, "several codewords finished in one step");
    check(n_pass[0] > 0 && n_pass[1] > 0 && n_pass[2] > 0, "all three passes ran");
    check(n_fetch > 0, "decoder fetched codewords");
    check(n_trunc > 0, "truncated decoding happened");
    check(n_lossless > 0, "lossless round trip happened");
    check(n_empty > 0 || NEED_EMPTY == 0, "empty codeblock coded");
    check(n_overflow > 0 || OVERFLOW_SUB < 0, "bitstream overflow happened");
    $display("stalls=%0d sign_steps=%0d multi=%0d passes=%0d/%0d/%0d fetches=%0d truncated=%0d overflow=%0d empty=%0d lossless=%0d",
             n_stall, n_sign, n_multi, n_pass[0], n_pass[1], n_pass[2], n_fetch, n_trunc,
             n_overflow, n_empty, n_lossless);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
