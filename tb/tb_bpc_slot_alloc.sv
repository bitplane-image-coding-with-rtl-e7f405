// tb_bpc_slot_alloc - checks left-first slot reservation and overflow.
//
// Random request vectors: each requesting lane must get the running length
// plus the number of requesting lanes to its left, and the length must grow by
// the number of requests on commit only. A small bitstream (40 slots) is
// filled past its end to check the saturating length and the sticky overflow
// flag, and clear restarts from slot 0.
module tb_bpc_slot_alloc;
  localparam int unsigned T = 8, BS_WORDS = 40, SLOT_W = $clog2(BS_WORDS) + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic              clear = 0, commit = 0;
  logic [T-1:0]      need = '0;
  logic [SLOT_W-1:0] slot [T];
  logic [SLOT_W-1:0] count;
  logic              overflow;
  int checks = 0, failures = 0, overflows = 0;

  bpc_slot_alloc #(.T(T), .BS_WORDS(BS_WORDS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned len = 0;
    bit ovf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      len = 0; ovf = 0;
      for (int i = 0; i < 30; i++) begin
        int unsigned k;
        need = T'($urandom());
        commit = $urandom_range(3, 0) != 0;
        #1;
        k = 0;
        for (int t = 0; t < int'(T); t++) begin
          if (need[t]) check(int'(slot[t]) == len + k, $sformatf("slot lane %0d", t));
          k += need[t];
        end
        @(negedge clk);
        if (commit && k > 0) begin
          if (len + k > BS_WORDS) begin len = BS_WORDS; ovf = 1; end
          else len += k;
        end
        commit = 0;
        check(int'(count) == len, $sformatf("count %0d vs %0d", count, len));
        check(overflow == ovf, "overflow flag");
      end
      if (ovf) overflows++;
    end
    check(overflows > 0, "overflow happened");
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
