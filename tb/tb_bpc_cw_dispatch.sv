// tb_bpc_cw_dispatch - checks the codeword write arbiter.
//
// Random sets of finished codewords: the lowest valid lane must be
// acknowledged alone and its word written to its slot; a slot beyond the
// bitstream must be acknowledged without a write; nothing valid, nothing
// written.
module tb_bpc_cw_dispatch;
  localparam int unsigned T = 8, W = 16, BS_WORDS = 64, SLOT_W = $clog2(BS_WORDS) + 1;
  logic [T-1:0]      cw_valid;
  logic [W-1:0]      cw_data [T];
  logic [SLOT_W-1:0] cw_slot [T];
  logic [T-1:0]      cw_ack;
  logic              wr_en;
  logic [$clog2(BS_WORDS)-1:0] wr_addr;
  logic [W-1:0]      wr_data;
  int checks = 0, failures = 0, dropped = 0;

  bpc_cw_dispatch #(.T(T), .W(W), .BS_WORDS(BS_WORDS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int lo;
      cw_valid = ($urandom_range(7, 0) == 0) ? '0 : T'($urandom());
      for (int t = 0; t < int'(T); t++) begin
        cw_data[t] = W'($urandom());
        cw_slot[t] = SLOT_W'($urandom_range(BS_WORDS + 10, 0));
      end
      #1;
      lo = -1;
      for (int t = T - 1; t >= 0; t--) if (cw_valid[t]) lo = t;
      if (lo < 0) begin
        check(cw_ack == '0 && !wr_en, "idle");
      end else begin
        check(cw_ack == T'(1) << lo, "ack lowest lane");
        if (cw_slot[lo] < BS_WORDS) begin
          check(wr_en && wr_addr == cw_slot[lo][$clog2(BS_WORDS)-1:0] && wr_data == cw_data[lo],
                "write of lowest lane");
        end else begin
          check(!wr_en, "slot past the end dropped");
          dropped++;
        end
      end
      #1;
    end
    check(dropped > 0, "drop case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
