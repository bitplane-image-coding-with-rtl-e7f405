// tb_bpc_ac_decoder - checks the arithmetic decoder against an encoder model.
//
// Random symbols with random probabilities are encoded here with an integer
// model of the fixed-length-codeword coder, producing the codeword sequence.
// The decoder is then driven with the same probabilities, loading the next
// codeword whenever need_word is high, and each decoded symbol must equal the
// original. It also checks that need_word rises exactly when a codeword is
// used up.
module tb_bpc_ac_decoder;
  localparam int unsigned W = 16, PHAT = 7, N = 20000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            clear = 0, load = 0, sym_valid = 0;
  logic [W-1:0]    cw_in = '0;
  logic [PHAT-1:0] prob = '0;
  logic            need_word, sym;
  int checks = 0, failures = 0, loads = 0;

  bpc_ac_decoder #(.W(W), .PHAT(PHAT)) dut (.*);

  bit          syms  [N];
  int unsigned probs [N];
  int unsigned cws[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    longint unsigned S = 0, L = 0, lo;
    int unsigned slot = 0, ptr = 0;
    for (int i = 0; i < N; i++) begin
      syms[i]  = $urandom_range(1, 0);
      probs[i] = ($urandom_range(9, 0) == 0) ? 0 : $urandom_range(127, 0);
      if (S == 0) begin slot = cws.size(); cws.push_back(0); S = (1 << W) - 1; L = 0; end
      lo = (S * probs[i]) >> PHAT;
      if (!syms[i]) S = lo; else begin L += lo + 1; S -= lo + 1; end
      if (S == 0) cws[slot] = L;
    end
    if (S != 0) cws[slot] = L;

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      if (need_word) begin
        load = 1; cw_in = W'(cws[ptr]); ptr++; loads++;
        @(negedge clk) load = 0;
      end
      check(!need_word, "codeword present");
      sym_valid = 1; prob = PHAT'(probs[i]);
      #1;
      check(sym == syms[i], $sformatf("symbol %0d: %0d vs %0d", i, sym, syms[i]));
      @(negedge clk) sym_valid = 0;
    end
    check(ptr == cws.size(), $sformatf("all codewords used %0d vs %0d", ptr, cws.size()));
    check(loads > 100, "many codewords loaded");
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
