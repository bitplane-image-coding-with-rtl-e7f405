// bpc_ac_decoder - arithmetic decoder of one stripe, fixed-length codewords.
//
// Mirror of bpc_ac_encoder. The lane holds the codeword I it is decoding and
// the same interval (L, S) as the encoder. need_word is high while S = 0: the
// next symbol of the lane needs a fresh codeword, which the engine loads with
// load/cw_in (I <- cw_in, L <- 0, S <- 2^W-1). A symbol is then decoded
// combinationally from the probability p of the lower part:
//   f = ((S*p) >> PHAT) + 1,  g = L + f
//   I >= g:  sym = 1 (bit 1 or positive sign),  L <- g,  S <- S - f
//   else:    sym = 0 (bit 0 or negative sign),  S <- f - 1
// and the registers advance when sym_valid is high. The rules follow the
// coding method; the load handshake is this design's own.
//
// Timing: one symbol per cycle once a codeword is loaded; a load takes one
// cycle.
module bpc_ac_decoder #(
  parameter int unsigned W    = 16,
  parameter int unsigned PHAT = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,      // start of a codeblock
  input  logic            load,       // take cw_in as the next codeword
  input  logic [W-1:0]    cw_in,
  output logic            need_word,  // S = 0: no codeword to decode from
  input  logic            sym_valid,  // consume the decoded symbol
  input  logic [PHAT-1:0] prob,
  output logic            sym
);

  logic [W-1:0]      s_q, l_q, i_q;
  logic [W-1:0]      f, g;
  logic [W+PHAT-1:0] prod;

  assign need_word = (s_q == '0);

  always_comb begin
    prod = (W+PHAT)'(s_q) * (W+PHAT)'(prob);
    f    = W'(prod >> PHAT) + W'(1);
    g    = l_q + f;
    sym  = (i_q >= g);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      l_q <= '0;
      i_q <= '0;
    end else if (clear) begin
      s_q <= '0;
      l_q <= '0;
    end else if (load) begin
      i_q <= cw_in;
      l_q <= '0;
      s_q <= '1;
    end else if (sym_valid) begin
      if (sym) begin
        l_q <= g;
        s_q <= s_q - f;
      end else begin
        s_q <= f - W'(1);
      end
    end
  end

  a_decode_needs_codeword: assert property (@(posedge clk) disable iff (!rst_n)
    sym_valid |-> !need_word && !load);

endmodule
