// tb_bpc_bitstream_buf - checks the bitstream memory.
//
// Writes every slot in a random order with random words, keeping a copy, and
// reads them back through both read ports, then overwrites some slots (as the
// encoder fills reserved slots late) and reads again.
module tb_bpc_bitstream_buf;
  localparam int unsigned W = 16, BS_WORDS = 256, AW = $clog2(BS_WORDS);
  logic clk = 0;
  always #5 clk = ~clk;
  logic          wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd0_addr = '0, rd1_addr = '0;
  logic [W-1:0]  wr_data = '0, rd0_data, rd1_data;
  logic [W-1:0]  ref_mem [BS_WORDS];
  int checks = 0, failures = 0;

  bpc_bitstream_buf #(.W(W), .BS_WORDS(BS_WORDS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned order [BS_WORDS];
    for (int i = 0; i < int'(BS_WORDS); i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < int'(BS_WORDS); i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(order[i]); wr_data = W'($urandom());
      ref_mem[order[i]] = wr_data;
    end
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk) wr_en = 0;
      for (int i = 0; i < int'(BS_WORDS); i++) begin
        rd0_addr = AW'(i); rd1_addr = AW'(BS_WORDS - 1 - i);
        #1;
        check(rd0_data == ref_mem[i], $sformatf("port0 slot %0d", i));
        check(rd1_data == ref_mem[BS_WORDS - 1 - i], $sformatf("port1 slot %0d", i));
      end
      for (int i = 0; i < 50; i++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = AW'($urandom()); wr_data = W'($urandom());
        ref_mem[wr_addr] = wr_data;
      end
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
