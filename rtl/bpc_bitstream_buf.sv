// bpc_bitstream_buf - the codeblock bitstream, BS_WORDS slots of W bits.
//
// The encoder reserves slots in order and fills each one later, when the lane
// that reserved it finishes its codeword, so writes arrive out of order. Reads
// are sequential for the decoder and random for a host that takes the stream
// away. One synchronous write port, two combinational read ports. The depth
// is this design's own choice.
module bpc_bitstream_buf #(
  parameter int unsigned W        = 16,
  parameter int unsigned BS_WORDS = 8192,
  parameter int unsigned AW       = $clog2(BS_WORDS)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic [AW-1:0] rd0_addr,
  output logic [W-1:0]  rd0_data,
  input  logic [AW-1:0] rd1_addr,
  output logic [W-1:0]  rd1_data
);

  logic [W-1:0] mem [BS_WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd0_data = mem[rd0_addr];
  assign rd1_data = mem[rd1_addr];

endmodule
