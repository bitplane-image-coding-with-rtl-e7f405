// tb_bpc_decoder - self-checking test of the bitplane decoder.
//
// The reference model encodes random reduced codeblocks (4 stripes x 8 rows,
// 8 bitplanes); the testbench writes the model's bitstream into the bitstream
// memory and lets the decoder rebuild the codeblock in its output buffer.
// With the whole stream the result must equal the original coefficients
// (lossless). With a stream cut at a random length the decoder must stop,
// report truncation, have read exactly the available words, and hold exactly
// what the model decodes from the same prefix. Codeword fetches, sign steps
// and truncations are counted and must all occur.
module tb_bpc_decoder;
  import bpc_pkg::*;
  import bpc_ref_pkg::*;

  localparam int unsigned T = 4, ROWS = 8, W = 16, PHAT = 7, MAG_W = 8, NSUB = 4;
  localparam int unsigned BS_WORDS = 1024, COLS = 2 * T;
  localparam int unsigned AW = $clog2(BS_WORDS), SLOT_W = AW + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic             lut_wr_en = 0;
  logic [1:0]       lut_sub = '0;
  logic [2:0]       lut_plane = '0;
  logic [3:0]       lut_ctx = '0;
  logic [PHAT-1:0]  lut_prob = '0;
  logic             bs_we = 0;
  logic [AW-1:0]    bs_wa = '0;
  logic [W-1:0]     bs_wd = '0;
  logic             start = 0;
  logic [1:0]       subband = '0;
  logic [3:0]       nbp_in = '0;
  logic [SLOT_W-1:0] limit = '0;
  logic [2:0]       rd_row = '0, rd_col = '0;

  logic             busy, done, truncated, buf_clear, bw_en, sw_en, fetch, pass_done;
  logic [SLOT_W-1:0] words_read;
  logic [AW-1:0]    rd_addr;
  logic [W-1:0]     rd_data, unused_rd;
  logic [2:0]       sr_row, bw_row, sw_row, bw_plane, lp, pass_plane, pr_unused_plane;
  logic [COLS-1:0]  sr_up, sr_mid, sr_dn, bw_mask, bw_bits, sw_mask, sw_bits, pr_bits;
  logic [1:0]       ls;
  logic [3:0]       lctx [T];
  logic [PHAT-1:0]  lprob [T];
  pass_e            pass_type;
  logic             out_neg;
  logic [MAG_W-1:0] out_mag;
  logic [3:0]       nbp_unused;

  bpc_prob_lut #(.NRD(T), .NSUB(NSUB), .NBP(MAG_W), .PHAT(PHAT)) u_lut (
    .clk(clk), .wr_en(lut_wr_en), .wr_sub(lut_sub), .wr_plane(lut_plane), .wr_ctx(lut_ctx),
    .wr_prob(lut_prob), .rd_sub(ls), .rd_plane(lp), .rd_ctx(lctx), .rd_prob(lprob));

  bpc_bitstream_buf #(.W(W), .BS_WORDS(BS_WORDS)) u_bs (
    .clk(clk), .wr_en(bs_we), .wr_addr(bs_wa), .wr_data(bs_wd),
    .rd0_addr(rd_addr), .rd0_data(rd_data), .rd1_addr('0), .rd1_data(unused_rd));

  bpc_cb_buffer #(.T(T), .ROWS(ROWS), .MAG_W(MAG_W)) u_cb (
    .clk(clk), .rst_n(rst_n), .clear(buf_clear),
    .cw_en(1'b0), .cw_row('0), .cw_col('0), .cw_neg(1'b0), .cw_mag('0),
    .cr_row(rd_row), .cr_col(rd_col), .cr_neg(out_neg), .cr_mag(out_mag), .nbp(nbp_unused),
    .pr_plane('0), .pr_row('0), .pr_bits(pr_bits),
    .sr_row(sr_row), .sr_up(sr_up), .sr_mid(sr_mid), .sr_dn(sr_dn),
    .bw_en(bw_en), .bw_plane(bw_plane), .bw_row(bw_row), .bw_mask(bw_mask), .bw_bits(bw_bits),
    .sw_en(sw_en), .sw_row(sw_row), .sw_mask(sw_mask), .sw_bits(sw_bits));

  bpc_decoder #(.T(T), .ROWS(ROWS), .W(W), .PHAT(PHAT), .MAG_W(MAG_W), .NSUB(NSUB),
                .BS_WORDS(BS_WORDS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .subband(subband), .nbp(nbp_in),
    .word_limit(limit), .busy(busy), .done(done), .truncated(truncated),
    .words_read(words_read), .bs_rd_addr(rd_addr), .bs_rd_data(rd_data),
    .buf_clear(buf_clear), .sr_row(sr_row), .sr_up(sr_up), .sr_mid(sr_mid), .sr_dn(sr_dn),
    .bw_en(bw_en), .bw_plane(bw_plane), .bw_row(bw_row), .bw_mask(bw_mask), .bw_bits(bw_bits),
    .sw_en(sw_en), .sw_row(sw_row), .sw_mask(sw_mask), .sw_bits(sw_bits),
    .lut_sub(ls), .lut_plane(lp), .lut_ctx(lctx), .lut_prob(lprob),
    .fetch(fetch), .pass_done(pass_done), .pass_type(pass_type), .pass_plane(pass_plane));

  bpc_ref #(.T(T), .ROWS(ROWS), .W(W), .PHAT(PHAT), .MAG_W(MAG_W), .NSUB(NSUB)) m;

  int fetches = 0, truncations = 0, sign_steps = 0, passes = 0;
  always @(posedge clk) begin
    if (fetch) fetches++;
    if (pass_done) passes++;
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
        for (int k = 0; k < 14; k++) begin
          @(negedge clk);
          lut_wr_en = 1; lut_sub = 2'(s); lut_plane = 3'(j); lut_ctx = 4'(k);
          lut_prob = PHAT'(m.prob[s][j][k]);
        end
    @(negedge clk) lut_wr_en = 0;
  endtask

  task automatic load_stream();
    for (int i = 0; i < m.bs.size(); i++) begin
      @(negedge clk);
      bs_we = 1; bs_wa = AW'(i); bs_wd = W'(m.bs[i]);
    end
    @(negedge clk) bs_we = 0;
  endtask

  // Decode with the given limit and compare with the model's decode of it.
  task automatic run_dec(int unsigned sub, int unsigned nb, int unsigned lim, bit lossless);
    int cyc = 0;
    m.decode(sub, nb, lim);
    @(negedge clk);
    start = 1; subband = 2'(sub); nbp_in = 4'(nb); limit = SLOT_W'(lim);
    @(negedge clk) start = 0;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    check(done, "decoder finished");
    check(truncated == m.stopped, $sformatf("truncated %0d vs %0d", truncated, m.stopped));
    check(int'(words_read) == m.rd_ptr, $sformatf("words read %0d vs %0d", words_read, m.rd_ptr));
    if (truncated) truncations++;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        rd_row = 3'(r); rd_col = 3'(c);
        #1;
        check(out_mag == MAG_W'(m.dmag[r][c]) && (out_mag == 0 || out_neg == m.dneg[r][c]),
              $sformatf("coef (%0d,%0d) %0d/%0d vs model %0d/%0d", r, c, out_mag, out_neg,
                        m.dmag[r][c], m.dneg[r][c]));
        if (lossless)
          check(out_mag == MAG_W'(m.mag[r][c]) && (out_mag == 0 || out_neg == m.neg[r][c]),
                $sformatf("coef (%0d,%0d) lossless", r, c));
      end
  endtask

  initial begin
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int lutn = 0; lutn < 3; lutn++) begin
      m.random_lut(lutn == 1 ? 20 : 0, lutn == 1 ? 110 : 127);
      load_lut();
      for (int b = 0; b < 5; b++) begin
        int unsigned sub;
        sub = $urandom_range(NSUB - 1, 0);
        m.random_block(MAG_W, 15 + 12 * b);
        m.encode(sub);
        sign_steps += m.n_sign_steps;
        load_stream();
        run_dec(sub, m.nbp(), m.bs.size(), 1);
        run_dec(sub, m.nbp(), $urandom_range(m.bs.size() - 1, 0), 0);
      end
    end
    check(fetches > 0, "codeword fetches happened");
    check(truncations > 0, "truncated decoding happened");
    check(sign_steps > 0, "sign steps happened");
    check(passes > 0, "passes completed");
    $display("fetches=%0d truncations=%0d sign_steps=%0d passes=%0d", fetches, truncations, sign_steps, passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
