// tb_bpc_paco_workload - wavelet codeblocks of 8, 12 and 16-bit images
// through the codec at its default size.
//
// For each bit depth a 256x256 synthetic image is built (a slanted ramp, a
// bright disc with a sharp edge, fine stripes and noise), level-shifted to
// signed samples and transformed here with the reversible 5/3 lifting
// wavelet, 5 levels, which leaves 16 subbands of 128x128 down to 8x8
// coefficients. The subbands are cut into 64x64 codeblocks (25 in all;
// subbands smaller than that are padded with zeros) and each is coded with
// its subband index. The probability table is estimated from the same
// codeblocks: for subband u and bitplane j the share of not-yet-significant
// coefficients that stay insignificant, lowered a little per significant
// neighbour; signs and refinement use one half.
// Every codeblock is encoded and compared word for word with the reference
// model, decoded losslessly, and decoded again from the stream cut at the
// end of a middle pass (the lossy case), which must match the model. The
// rate of each image, in bits per sample, is printed.
module tb_bpc_paco_workload;
  import bpc_pkg::*;
  import bpc_ref_pkg::*;

  localparam int unsigned T = T_DEF, ROWS = ROWS_DEF, W = W_DEF, PHAT = PHAT_DEF;
  localparam int unsigned MAG_W = MAG_W_DEF, NSUB = NSUB_DEF, BS_WORDS = BS_WORDS_DEF;
  localparam int unsigned WATCHDOG = 40000000;

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

  bpc_paco_top dut (.*);

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


  localparam int IMG = 256, LEVELS = 5;
  int img [IMG][IMG];
  int vec [IMG];
  int tmp [IMG];

  // one level of reversible 5/3 lifting on vec[0..n-1], symmetric extension;
  // low-pass results go to the first half, high-pass to the second
  function automatic void lift(int n);
    int half = n / 2;
    for (int i = 0; i < half; i++) begin
      int xr = (2 * i + 2 < n) ? vec[2 * i + 2] : vec[n - 2];
      tmp[half + i] = vec[2 * i + 1] - ((vec[2 * i] + xr) >>> 1);
    end
    for (int i = 0; i < half; i++) begin
      int dl = (i > 0) ? tmp[half + i - 1] : tmp[half];
      tmp[i] = vec[2 * i] + ((dl + tmp[half + i] + 2) >>> 2);
    end
    for (int i = 0; i < n; i++) vec[i] = tmp[i];
  endfunction

  function automatic void make_image(int bits);
    int maxv = (1 << bits) - 1;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        int v = ((3 * r + 2 * c) * maxv) / (5 * IMG) / 2;
        if ((r - 70) * (r - 70) + (c - 45) * (c - 45) < 900) v += maxv / 3;
        if (c >= 96 && ((r >> 1) % 2 == 0)) v += maxv / 8;
        v += int'($urandom_range(maxv / 64 + 1));
        if (v > maxv) v = maxv;
        img[r][c] = v - (1 << (bits - 1));
      end
    for (int l = 0; l < LEVELS; l++) begin
      int n = IMG >> l;
      for (int r = 0; r < n; r++) begin
        for (int c = 0; c < n; c++) vec[c] = img[r][c];
        lift(n);
        for (int c = 0; c < n; c++) img[r][c] = vec[c];
      end
      for (int c = 0; c < n; c++) begin
        for (int r = 0; r < n; r++) vec[r] = img[r][c];
        lift(n);
        for (int r = 0; r < n; r++) img[r][c] = vec[r];
      end
    end
  endfunction

  // subband u: 0 is the final low-pass band, then HL, LH, HH from the
  // coarsest level to the finest
  function automatic void subband_origin(int u, output int r0, output int c0, output int h);
    if (u == 0) begin r0 = 0; c0 = 0; h = IMG >> LEVELS; return; end
    begin
      int lv = LEVELS - (u - 1) / 3;
      int o = (u - 1) % 3;
      h = IMG >> lv;
      r0 = (o == 0) ? 0 : h;
      c0 = (o == 1) ? 0 : h;
    end
  endfunction

  // codeblock (br, bc) of subband u, padded with zeros beyond the subband
  function automatic int coef(int u, int br, int bc, int r, int c);
    int r0, c0, h, y, x;
    subband_origin(u, r0, c0, h);
    y = br * int'(ROWS) + r;
    x = bc * int'(2 * T) + c;
    return (y < h && x < h) ? img[r0 + y][c0 + x] : 0;
  endfunction

  function automatic int nblk(int u);
    int r0, c0, h;
    subband_origin(u, r0, c0, h);
    return (h + int'(ROWS) - 1) / int'(ROWS);
  endfunction

  function automatic void take_block(int u, int br, int bc);
    foreach (m.mag[r, c]) begin
      int v = coef(u, br, bc, r, c);
      m.neg[r][c] = v < 0;
      m.mag[r][c] = (v < 0) ? -v : v;
    end
  endfunction

  function automatic void estimate_table();
    for (int u = 0; u < int'(NSUB); u++)
      for (int j = 0; j < int'(MAG_W); j++) begin
        int below = 0, stay = 0, p0;
        for (int br = 0; br < nblk(u); br++)
          for (int bc = 0; bc < nblk(u); bc++)
            for (int r = 0; r < int'(ROWS); r++)
              for (int c = 0; c < int'(2 * T); c++) begin
                int v = coef(u, br, bc, r, c);
                int a = (v < 0) ? -v : v;
                if (a < (1 << (j + 1))) begin
                  below++;
                  if (a < (1 << j)) stay++;
                end
              end
        p0 = (below == 0) ? 127 : (stay * 128) / below;
        for (int k = 0; k < int'(NCTX); k++) begin
          int p = (k < 9) ? p0 - 6 * k : 64;
          if (p < 4) p = 4;
          if (p > 127) p = 127;
          m.prob[u][j][k] = p;
        end
      end
  endfunction

  initial begin
    bit ovf;
    int unsigned total_words, cut, max_words;
    int bit_depth [3] = '{8, 12, 16};
    int n_blocks = 0;
    for (int u = 0; u < int'(NSUB); u++) n_blocks += nblk(u) * nblk(u);
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (bit_depth[d]) begin
      make_image(bit_depth[d]);
      estimate_table();
      load_lut();
      total_words = 0;
      max_words = 0;
      for (int u = 0; u < int'(NSUB); u++)
      for (int br = 0; br < nblk(u); br++)
      for (int bc = 0; bc < nblk(u); bc++) begin
        take_block(u, br, bc);
        check(m.nbp() <= MAG_W, "magnitudes fit the bitplanes");
        load_block();
        encode(u, ovf);
        check(!ovf, "codeblock fits the bitstream memory");
        if (ovf) continue;
        total_words += m.bs.size();
        if (m.bs.size() > max_words) max_words = m.bs.size();
        decode(u, m.bs.size(), 1);
        if (m.pass_len.size() > 2) begin
          cut = m.pass_len[m.pass_len.size() / 2];
          decode(u, cut, 0);
        end
      end
      $display("%0d-bit image: %0d codewords, %0d.%02d bits per sample, largest codeblock %0d words, lossless",
               bit_depth[d], total_words, (total_words * W) / (IMG * IMG),
               ((total_words * W * 100) / (IMG * IMG)) % 100, max_words);
    end
    check(n_lossless == 3 * n_blocks, "every codeblock decoded losslessly");
    check(n_sign > 0 && n_pass[1] > 0 && n_fetch > 0, "signs, refinement and fetches happened");
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
