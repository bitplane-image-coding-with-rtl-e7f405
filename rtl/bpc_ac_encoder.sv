// bpc_ac_encoder - arithmetic coder of one stripe, fixed-length codewords.
//
// The coder keeps an integer interval: L is its left boundary and S its size
// minus one, both W bits. S = 0 means the lane holds no open codeword. When a
// symbol arrives with S = 0, the lane asks for a new W-bit slot at the end of
// the bitstream (need_slot, answered combinationally by slot_in) and restarts
// with L = 0, S = 2^W-1. A symbol then splits the interval with the probability
// p of the lower part, p in [0, 2^PHAT-1]:
//   sym 0 (bit 0, or a negative sign):  S <- (S*p) >> PHAT
//   sym 1 (bit 1, or a positive sign):  f = ((S*p) >> PHAT) + 1,
//                                        L <- L + f,  S <- S - f
// When S reaches 0, L is the finished codeword: it is offered on cw_* with the
// slot it was reserved for, and held until cw_ack. flush ends the codeblock:
// an open codeword (S != 0) is offered with its current L. These rules follow
// the coding method; the handshake is this design's own.
//
// Timing: one symbol per cycle. A symbol must not arrive while cw_valid is
// high (the engine stalls instead).
module bpc_ac_encoder #(
  parameter int unsigned W      = 16,
  parameter int unsigned PHAT   = 7,
  parameter int unsigned SLOT_W = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,      // start of a codeblock: no open codeword
  input  logic              sym_valid,
  input  logic              sym,
  input  logic [PHAT-1:0]   prob,
  output logic              need_slot,  // this symbol opens a new codeword
  input  logic [SLOT_W-1:0] slot_in,    // slot granted to it
  input  logic              flush,      // end of codeblock
  output logic              cw_valid,
  output logic [W-1:0]      cw_data,
  output logic [SLOT_W-1:0] cw_slot,
  input  logic              cw_ack
);

  logic [W-1:0]      s_q, l_q;
  logic [SLOT_W-1:0] slot_q;

  logic [W-1:0]      s_eff, l_eff, lo, f, s_nx, l_nx;
  logic [SLOT_W-1:0] slot_eff;
  logic [W+PHAT-1:0] prod;

  assign need_slot = sym_valid && (s_q == '0);

  always_comb begin
    s_eff    = (s_q == '0) ? '1 : s_q;
    l_eff    = (s_q == '0) ? '0 : l_q;
    slot_eff = (s_q == '0) ? slot_in : slot_q;
    prod     = (W+PHAT)'(s_eff) * (W+PHAT)'(prob);
    lo       = W'(prod >> PHAT);
    f        = lo + W'(1);
    if (sym) begin
      l_nx = l_eff + f;
      s_nx = s_eff - f;
    end else begin
      l_nx = l_eff;
      s_nx = lo;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q      <= '0;
      l_q      <= '0;
      slot_q   <= '0;
      cw_valid <= 1'b0;
      cw_data  <= '0;
      cw_slot  <= '0;
    end else if (clear) begin
      s_q      <= '0;
      l_q      <= '0;
      cw_valid <= 1'b0;
    end else begin
      if (cw_ack) cw_valid <= 1'b0;
      if (sym_valid) begin
        s_q    <= s_nx;
        l_q    <= l_nx;
        slot_q <= slot_eff;
        if (s_nx == '0) begin
          cw_valid <= 1'b1;
          cw_data  <= l_nx;
          cw_slot  <= slot_eff;
        end
      end else if (flush && s_q != '0) begin
        s_q      <= '0;
        cw_valid <= 1'b1;
        cw_data  <= l_q;
        cw_slot  <= slot_q;
      end
    end
  end

  // A finished codeword must be written out before the lane codes again.
  a_no_symbol_while_pending: assert property (@(posedge clk) disable iff (!rst_n)
    sym_valid |-> !cw_valid);

endmodule
