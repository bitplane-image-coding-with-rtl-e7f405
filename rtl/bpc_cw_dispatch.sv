// bpc_cw_dispatch - writes finished codewords into their reserved slots.
//
// Lanes finish codewords independently, and several may finish in the same
// step. This arbiter writes one per cycle into the single-port bitstream
// memory, lowest lane first, and acknowledges that lane. A slot number at or
// beyond BS_WORDS (the bitstream overflowed) is acknowledged but not written.
// Combinational; the one-write-per-cycle serialisation is this design's own.
module bpc_cw_dispatch #(
  parameter int unsigned T        = 32,
  parameter int unsigned W        = 16,
  parameter int unsigned BS_WORDS = 8192,
  parameter int unsigned SLOT_W   = $clog2(BS_WORDS) + 1
) (
  input  logic [T-1:0]                cw_valid,
  input  logic [W-1:0]                cw_data [T],
  input  logic [SLOT_W-1:0]           cw_slot [T],
  output logic [T-1:0]                cw_ack,
  output logic                        wr_en,
  output logic [$clog2(BS_WORDS)-1:0] wr_addr,
  output logic [W-1:0]                wr_data
);

  always_comb begin
    cw_ack  = '0;
    wr_en   = 1'b0;
    wr_addr = '0;
    wr_data = '0;
    for (int t = T - 1; t >= 0; t--) begin
      if (cw_valid[t]) begin
        cw_ack  = '0;
        cw_ack[t] = 1'b1;
        wr_en   = (cw_slot[t] < SLOT_W'(BS_WORDS));
        wr_addr = cw_slot[t][$clog2(BS_WORDS)-1:0];
        wr_data = cw_data[t];
      end
    end
  end

endmodule
