// tb_bpc_prob_lut - checks the probability table.
//
// Fills every (subband, bitplane, context) entry with a random probability,
// then reads random entries on all lanes at once and compares with a copy.
// Context numbers past the table read as 0.
module tb_bpc_prob_lut;
  import bpc_pkg::*;
  localparam int unsigned NRD = 8, NSUB = 4, NBP = 6, PHAT = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic             wr_en = 0;
  logic [1:0]       wr_sub = '0, rd_sub = '0;
  logic [2:0]       wr_plane = '0, rd_plane = '0;
  logic [CTX_W-1:0] wr_ctx = '0;
  logic [PHAT-1:0]  wr_prob = '0;
  logic [CTX_W-1:0] rd_ctx [NRD];
  logic [PHAT-1:0]  rd_prob [NRD];
  int unsigned ref_t [NSUB][NBP][NCTX];
  int checks = 0, failures = 0;

  bpc_prob_lut #(.NRD(NRD), .NSUB(NSUB), .NBP(NBP), .PHAT(PHAT)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int s = 0; s < int'(NSUB); s++)
      for (int j = 0; j < int'(NBP); j++)
        for (int k = 0; k < int'(NCTX); k++) begin
          @(negedge clk);
          wr_en = 1; wr_sub = 2'(s); wr_plane = 3'(j); wr_ctx = CTX_W'(k);
          wr_prob = PHAT'($urandom()); ref_t[s][j][k] = wr_prob;
        end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 500; i++) begin
      rd_sub = 2'($urandom_range(NSUB - 1, 0));
      rd_plane = 3'($urandom_range(NBP - 1, 0));
      for (int r = 0; r < int'(NRD); r++) rd_ctx[r] = CTX_W'($urandom_range(15, 0));
      #1;
      for (int r = 0; r < int'(NRD); r++)
        check(int'(rd_prob[r]) == (rd_ctx[r] < NCTX ? ref_t[rd_sub][rd_plane][rd_ctx[r]] : 0),
              $sformatf("read lane %0d", r));
      #1;
    end
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
