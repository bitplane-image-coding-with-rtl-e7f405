// bpc_prob_lut - stationary probability model, P_u[j][ctx].
//
// One fixed probability per subband u, bitplane j and context, computed off
// line from training images and loaded here by the host before coding. Each
// entry is p = floor(P(lower symbol) * 2^PHAT), the probability of a 0 bit or
// a negative sign. There is no adaptation: the same table serves encoder and
// decoder. Contexts are numbered as in bpc_pkg (0..8 significance, 9..12
// sign, 13 refinement).
//
// Write port: one entry per cycle. Read: all NRD lanes share the subband and
// bitplane and each gives its own context; reads are combinational.
module bpc_prob_lut
  import bpc_pkg::*;
#(
  parameter int unsigned NRD   = 32,
  parameter int unsigned NSUB  = 16,
  parameter int unsigned NBP   = 20,
  parameter int unsigned PHAT  = 7,
  parameter int unsigned SUB_W = (NSUB > 1) ? $clog2(NSUB) : 1,
  parameter int unsigned BP_W  = (NBP > 1) ? $clog2(NBP) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [SUB_W-1:0] wr_sub,
  input  logic [BP_W-1:0]  wr_plane,
  input  logic [CTX_W-1:0] wr_ctx,
  input  logic [PHAT-1:0]  wr_prob,
  input  logic [SUB_W-1:0] rd_sub,
  input  logic [BP_W-1:0]  rd_plane,
  input  logic [CTX_W-1:0] rd_ctx [NRD],
  output logic [PHAT-1:0]  rd_prob [NRD]
);

  logic [PHAT-1:0] mem [NSUB][NBP][NCTX];

  always_ff @(posedge clk) begin
    if (wr_en && wr_ctx < CTX_W'(NCTX))
      mem[wr_sub][wr_plane][wr_ctx] <= wr_prob;
  end

  always_comb begin
    for (int r = 0; r < NRD; r++)
      rd_prob[r] = (rd_ctx[r] < CTX_W'(NCTX)) ? mem[rd_sub][rd_plane][rd_ctx[r]] : '0;
  end

endmodule
