// bpc_slot_alloc - reserves codeword slots at the end of the bitstream.
//
// Every lane that opens a new codeword in a step gets the next free W-bit
// slot. When several lanes open one in the same step, the leftmost stripe
// (lowest lane index) gets the lowest slot, which makes the bitstream order
// deterministic and identical to the order in which a decoder asks for
// codewords. slot[t] = count + (number of requesting lanes below t), and
// count grows by the number of requests when commit is high.
//
// count is the bitstream length in slots. It stops at BS_WORDS; a reservation
// past the end sets the sticky overflow flag and yields a slot number >=
// BS_WORDS, which the writer drops. Left-first priority follows the coding
// method; the overflow handling is this design's own.
module bpc_slot_alloc #(
  parameter int unsigned T        = 32,
  parameter int unsigned BS_WORDS = 8192,
  parameter int unsigned SLOT_W   = $clog2(BS_WORDS) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [T-1:0]      need,
  input  logic              commit,
  output logic [SLOT_W-1:0] slot [T],
  output logic [SLOT_W-1:0] count,
  output logic              overflow
);

  logic [SLOT_W-1:0] pre [T+1];

  always_comb begin
    pre[0] = count;
    for (int t = 0; t < T; t++) begin
      slot[t]  = pre[t];
      pre[t+1] = pre[t] + SLOT_W'(need[t]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (commit && need != '0) begin
      if (pre[T] > SLOT_W'(BS_WORDS)) begin
        count    <= SLOT_W'(BS_WORDS);
        overflow <= 1'b1;
      end else begin
        count    <= pre[T];
      end
    end
  end

endmodule
