// tb_bpc_cb_buffer - checks the bitplane-organised codeblock store.
//
// Writes a random codeblock one coefficient at a time and checks: coefficient
// read-back, the number of bitplanes, every bitplane row against the bits of
// the written magnitudes, the three sign rows with zero rows outside the
// block, masked bitplane and sign writes, and clear.
module tb_bpc_cb_buffer;
  localparam int unsigned T = 4, ROWS = 8, MAG_W = 10, COLS = 2 * T;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic             clear = 0, cw_en = 0, cw_neg = 0, bw_en = 0, sw_en = 0;
  logic [2:0]       cw_row = '0, cw_col = '0, cr_row = '0, cr_col = '0, pr_row = '0, sr_row = '0;
  logic [2:0]       bw_row = '0, sw_row = '0;
  logic [MAG_W-1:0] cw_mag = '0, cr_mag;
  logic             cr_neg;
  logic [3:0]       nbp, pr_plane = '0, bw_plane = '0;
  logic [COLS-1:0]  pr_bits, sr_up, sr_mid, sr_dn, bw_mask = '0, bw_bits = '0, sw_mask = '0, sw_bits = '0;
  int unsigned rm [ROWS][COLS];
  bit          rn [ROWS][COLS];
  int checks = 0, failures = 0;

  bpc_cb_buffer #(.T(T), .ROWS(ROWS), .MAG_W(MAG_W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic verify();
    int unsigned o = 0, nb = 0;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        cr_row = 3'(r); cr_col = 3'(c);
        #1;
        check(int'(cr_mag) == rm[r][c] && cr_neg == rn[r][c], $sformatf("coef %0d,%0d", r, c));
        o |= rm[r][c];
      end
    for (int b = 0; b < int'(MAG_W); b++) if (o[b]) nb = b + 1;
    check(int'(nbp) == nb, $sformatf("nbp %0d vs %0d", nbp, nb));
    for (int b = 0; b < int'(MAG_W); b++)
      for (int r = 0; r < int'(ROWS); r++) begin
        pr_plane = 4'(b); pr_row = 3'(r); sr_row = 3'(r);
        #1;
        for (int c = 0; c < int'(COLS); c++) begin
          check(pr_bits[c] == rm[r][c][b], "bitplane row");
          check(sr_mid[c] == rn[r][c], "sign row");
          check(sr_up[c] == (r > 0 ? rn[r-1][c] : 1'b0), "sign row above");
          check(sr_dn[c] == (r < ROWS - 1 ? rn[r+1][c] : 1'b0), "sign row below");
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        @(negedge clk);
        cw_en = 1; cw_row = 3'(r); cw_col = 3'(c);
        cw_mag = MAG_W'($urandom_range((1 << 9) - 1, 0)); cw_neg = 1'($urandom());
        rm[r][c] = cw_mag; rn[r][c] = cw_neg;
      end
    @(negedge clk) cw_en = 0;
    verify();
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      bw_en = 1; bw_plane = 4'($urandom_range(MAG_W - 1, 0)); bw_row = 3'($urandom());
      bw_mask = COLS'($urandom()); bw_bits = COLS'($urandom());
      sw_en = 1; sw_row = 3'($urandom()); sw_mask = COLS'($urandom()); sw_bits = COLS'($urandom());
      for (int c = 0; c < int'(COLS); c++) begin
        if (bw_mask[c]) rm[bw_row][c][bw_plane] = bw_bits[c];
        if (sw_mask[c]) rn[sw_row][c] = sw_bits[c];
      end
    end
    @(negedge clk) begin bw_en = 0; sw_en = 0; end
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        cr_row = 3'(r); cr_col = 3'(c);
        #1;
        check(int'(cr_mag) == rm[r][c] && cr_neg == rn[r][c], "coef after masked writes");
      end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    foreach (rm[r, c]) begin rm[r][c] = 0; rn[r][c] = 0; end
    verify();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
