// tb_bpc_ac_encoder - checks the fixed-length-codeword arithmetic coder.
//
// Feeds long random symbol sequences with random probabilities (including the
// extremes 0 and 2^PHAT-1) and keeps its own integer model of the interval.
// Checks that a slot is requested exactly when a new codeword opens, that a
// finished codeword appears with the right value and slot, that the
// acknowledge clears it, and that flush emits the open codeword. It also
// checks one hand-worked sequence.
module tb_bpc_ac_encoder;
  localparam int unsigned W = 16, PHAT = 7, SLOT_W = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              clear = 0, sym_valid = 0, sym = 0, flush = 0, cw_ack = 0;
  logic [PHAT-1:0]   prob = '0;
  logic [SLOT_W-1:0] slot_in = '0;
  logic              need_slot, cw_valid;
  logic [W-1:0]      cw_data;
  logic [SLOT_W-1:0] cw_slot;
  int checks = 0, failures = 0, finished = 0, flushed = 0;

  bpc_ac_encoder #(.W(W), .PHAT(PHAT), .SLOT_W(SLOT_W)) dut (.*);

  longint unsigned S = 0, L = 0;
  int unsigned slot = 0, next_slot = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic code(bit c, int unsigned p);
    longint unsigned lo;
    bit opens = (S == 0);
    @(negedge clk);
    sym_valid = 1; sym = c; prob = PHAT'(p); slot_in = SLOT_W'(next_slot);
    #1;
    check(need_slot == opens, "need_slot");
    if (opens) begin S = (1 << W) - 1; L = 0; slot = next_slot; next_slot++; end
    lo = (S * p) >> PHAT;
    if (!c) S = lo; else begin L += lo + 1; S -= lo + 1; end
    @(negedge clk) sym_valid = 0;
    if (S == 0) begin
      check(cw_valid, "codeword finished");
      check(cw_data == W'(L) && cw_slot == SLOT_W'(slot),
            $sformatf("codeword %h@%0d vs %h@%0d", cw_data, cw_slot, L, slot));
      finished++;
      cw_ack = 1;
      @(negedge clk) cw_ack = 0;
      check(!cw_valid, "ack clears");
    end else begin
      check(!cw_valid, "no codeword yet");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Hand-worked: p = 64 (one half). Symbol 1 from the full interval:
    // f = (65535*64 >> 7) + 1 = 32768, L = 32768, S = 32767.
    code(1, 64);
    check(dut.l_q == 16'd32768 && dut.s_q == 16'd32767, "hand-worked step");
    // p = 0 and symbol 0 collapse the interval: codeword L = 32768.
    code(0, 0);
    for (int i = 0; i < 20000; i++) begin
      int unsigned p;
      p = ($urandom_range(9, 0) == 0) ? (($urandom_range(1, 0) == 1) ? 127 : 0)
                                      : $urandom_range(127, 0);
      code($urandom_range(1, 0), p);
      if ($urandom_range(999, 0) == 0 && S != 0) begin
        @(negedge clk) flush = 1;
        @(negedge clk) flush = 0;
        check(cw_valid && cw_data == W'(L) && cw_slot == SLOT_W'(slot), "flush emits open codeword");
        S = 0;
        flushed++;
        cw_ack = 1;
        @(negedge clk) cw_ack = 0;
      end
    end
    check(finished > 100, "many codewords finished");
    check(flushed > 0, "flush exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
