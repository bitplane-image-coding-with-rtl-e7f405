// bpc_ctx - context formation for one coefficient.
//
// Significance context: the number of significant neighbours among the eight
// adjacent ones (0..8). A neighbour counts as significant once its
// significance bit has been coded, in an earlier bitplane or earlier in the
// current scan; the caller supplies that state.
//
// Sign context: with chi = +1 for a significant positive neighbour, -1 for a
// significant negative one and 0 otherwise, chiV = chi(up)+chi(down) and
// chiH = chi(left)+chi(right):
//   0  both positive or both negative
//   1  chiV = 0 and chiH != 0
//   2  chiV != 0 and chiH = 0
//   3  otherwise
// Both rules follow the coding method. Purely combinational.
//
// Neighbour bit order of nsig: 0 up, 1 up-right, 2 right, 3 down-right,
// 4 down, 5 down-left, 6 left, 7 up-left.
module bpc_ctx
  import bpc_pkg::*;
(
  input  logic [7:0] nsig,      // significance of the eight neighbours
  input  logic       neg_up,    // sign of each vertical/horizontal neighbour,
  input  logic       neg_dn,    // 1 = negative (only used when significant)
  input  logic       neg_lf,
  input  logic       neg_rt,
  output logic [3:0] ctx_sig,   // 0..8
  output logic [1:0] ctx_sign   // 0..3
);

  function automatic logic signed [1:0] chi(input logic s, input logic n);
    if (!s)     return 2'sd0;
    else if (n) return -2'sd1;
    else        return 2'sd1;
  endfunction

  logic signed [2:0] chi_v, chi_h;

  always_comb begin
    ctx_sig = '0;
    for (int k = 0; k < 8; k++) ctx_sig = ctx_sig + {3'b0, nsig[k]};

    chi_v = 3'(chi(nsig[0], neg_up)) + 3'(chi(nsig[4], neg_dn));
    chi_h = 3'(chi(nsig[6], neg_lf)) + 3'(chi(nsig[2], neg_rt));

    if ((chi_v > 0 && chi_h > 0) || (chi_v < 0 && chi_h < 0)) ctx_sign = 2'd0;
    else if (chi_v == 0 && chi_h != 0)                        ctx_sign = 2'd1;
    else if (chi_v != 0 && chi_h == 0)                        ctx_sign = 2'd2;
    else                                                      ctx_sign = 2'd3;
  end

endmodule
