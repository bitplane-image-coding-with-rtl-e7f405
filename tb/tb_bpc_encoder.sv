// tb_bpc_encoder - self-checking test of the bitplane encoder.
//
// A reduced codeblock (4 stripes x 8 rows, 8 bitplanes) is coded many times
// with random coefficients and random probability tables. The encoder works
// with its codeblock buffer, probability table and bitstream memory around it.
// Every run is compared with the reference model: the number of bitplanes,
// the length after every pass, the final length and every codeword. The test
// also counts stalls (several codewords finishing in one step), sign steps and
// all-zero codeblocks, and fails if one of them never happened.
module tb_bpc_encoder;
  import bpc_pkg::*;
  import bpc_ref_pkg::*;

  localparam int unsigned T = 4, ROWS = 8, W = 16, PHAT = 7, MAG_W = 8, NSUB = 4;
  localparam int unsigned BS_WORDS = 1024, COLS = 2 * T;
  localparam int unsigned AW = $clog2(BS_WORDS), SLOT_W = AW + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // host side
  logic             cb_clear = 0, cb_wr_en = 0, cb_neg = 0;
  logic [2:0]       cb_row = '0;
  logic [2:0]       cb_col = '0;
  logic [MAG_W-1:0] cb_mag = '0;
  logic             lut_wr_en = 0;
  logic [1:0]       lut_sub = '0;
  logic [2:0]       lut_plane = '0;
  logic [3:0]       lut_ctx = '0;
  logic [PHAT-1:0]  lut_prob = '0;
  logic             start = 0;
  logic [1:0]       subband = '0;
  logic [AW-1:0]    rd_addr = '0;

  // wiring
  logic [3:0]       nbp;
  logic [2:0]       pr_plane, lp;
  logic [2:0]       pr_row, sr_row;
  logic [COLS-1:0]  pr_bits, sr_up, sr_mid, sr_dn;
  logic [1:0]       ls;
  logic [3:0]       lctx [T];
  logic [PHAT-1:0]  lprob [T];
  logic             wr_en, busy, done, overflow, pass_done, stall;
  logic [AW-1:0]    wr_addr;
  logic [W-1:0]     wr_data, rd_data, unused_rd;
  logic [SLOT_W-1:0] words;
  pass_e            pass_type;
  logic [2:0]       pass_plane;
  logic             cr_neg;
  logic [MAG_W-1:0] cr_mag;

  bpc_cb_buffer #(.T(T), .ROWS(ROWS), .MAG_W(MAG_W)) u_cb (
    .clk(clk), .rst_n(rst_n), .clear(cb_clear),
    .cw_en(cb_wr_en), .cw_row(cb_row), .cw_col(cb_col), .cw_neg(cb_neg), .cw_mag(cb_mag),
    .cr_row('0), .cr_col('0), .cr_neg(cr_neg), .cr_mag(cr_mag), .nbp(nbp),
    .pr_plane(pr_plane), .pr_row(pr_row), .pr_bits(pr_bits),
    .sr_row(sr_row), .sr_up(sr_up), .sr_mid(sr_mid), .sr_dn(sr_dn),
    .bw_en(1'b0), .bw_plane('0), .bw_row('0), .bw_mask('0), .bw_bits('0),
    .sw_en(1'b0), .sw_row('0), .sw_mask('0), .sw_bits('0));

  bpc_prob_lut #(.NRD(T), .NSUB(NSUB), .NBP(MAG_W), .PHAT(PHAT)) u_lut (
    .clk(clk), .wr_en(lut_wr_en), .wr_sub(lut_sub), .wr_plane(lut_plane), .wr_ctx(lut_ctx),
    .wr_prob(lut_prob), .rd_sub(ls), .rd_plane(lp), .rd_ctx(lctx), .rd_prob(lprob));

  bpc_bitstream_buf #(.W(W), .BS_WORDS(BS_WORDS)) u_bs (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd0_addr(rd_addr), .rd0_data(rd_data), .rd1_addr('0), .rd1_data(unused_rd));

  bpc_encoder #(.T(T), .ROWS(ROWS), .W(W), .PHAT(PHAT), .MAG_W(MAG_W), .NSUB(NSUB),
                .BS_WORDS(BS_WORDS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .subband(subband), .nbp(nbp),
    .busy(busy), .done(done),
    .pr_plane(pr_plane), .pr_row(pr_row), .pr_bits(pr_bits),
    .sr_row(sr_row), .sr_up(sr_up), .sr_mid(sr_mid), .sr_dn(sr_dn),
    .lut_sub(ls), .lut_plane(lp), .lut_ctx(lctx), .lut_prob(lprob),
    .bs_wr_en(wr_en), .bs_wr_addr(wr_addr), .bs_wr_data(wr_data),
    .words(words), .overflow(overflow),
    .pass_done(pass_done), .pass_type(pass_type), .pass_plane(pass_plane), .stall(stall));

  bpc_ref #(.T(T), .ROWS(ROWS), .W(W), .PHAT(PHAT), .MAG_W(MAG_W), .NSUB(NSUB)) m;

  int unsigned got_pass_len[$];
  int stall_cycles = 0, sign_steps = 0, multi = 0, empty_blocks = 0, runs_ok = 0;

  always @(posedge clk) begin
    if (pass_done) got_pass_len.push_back(int'(words));
    if (stall) stall_cycles++;
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

  task automatic load_block();
    @(negedge clk) cb_clear = 1;
    @(negedge clk) cb_clear = 0;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        @(negedge clk);
        cb_wr_en = 1; cb_row = 3'(r); cb_col = 3'(c);
        cb_mag = MAG_W'(m.mag[r][c]); cb_neg = m.neg[r][c];
      end
    @(negedge clk) cb_wr_en = 0;
  endtask

  task automatic run_one(int unsigned sub);
    int cyc = 0;
    m.encode(sub);
    got_pass_len.delete();
    @(negedge clk);
    check(nbp == 4'(m.nbp()), $sformatf("nbp %0d vs %0d", nbp, m.nbp()));
    start = 1; subband = 2'(sub);
    @(negedge clk) start = 0;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    check(done, "encoder finished");
    check(!overflow, "no overflow");
    check(int'(words) == m.bs.size(), $sformatf("length %0d vs %0d", words, m.bs.size()));
    check(got_pass_len.size() == m.pass_len.size(), "number of passes");
    for (int i = 0; i < got_pass_len.size() && i < m.pass_len.size(); i++)
      check(got_pass_len[i] == m.pass_len[i], $sformatf("pass %0d length", i));
    for (int i = 0; i < m.bs.size(); i++) begin
      rd_addr = AW'(i);
      #1;
      check(rd_data == W'(m.bs[i]), $sformatf("word %0d: %h vs %h", i, rd_data, m.bs[i]));
    end
    sign_steps += m.n_sign_steps;
    multi += m.n_multi_finish_steps;
    if (m.nbp() == 0) empty_blocks++;
  endtask

  initial begin
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int lutn = 0; lutn < 3; lutn++) begin
      if (lutn == 0) m.random_lut(1, 127);
      else if (lutn == 1) m.random_lut(20, 110);
      else m.random_lut(0, 127);
      load_lut();
      for (int b = 0; b < 6; b++) begin
        if (b == 5) foreach (m.mag[r, c]) m.mag[r][c] = 0;
        else m.random_block(MAG_W, 20 + 10 * b);
        load_block();
        run_one($urandom_range(NSUB - 1, 0));
      end
    end
    check(stall_cycles > 0, "dispatch stalls happened");
    check(sign_steps > 0, "sign steps happened");
    check(multi > 0, "several codewords finished in one step");
    check(empty_blocks > 0, "empty codeblock coded");
    $display("stall_cycles=%0d sign_steps=%0d multi_finish_steps=%0d", stall_cycles, sign_steps, multi);
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
