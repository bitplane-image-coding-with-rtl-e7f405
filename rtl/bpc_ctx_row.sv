// bpc_ctx_row - context formation for the T coefficients of one scan step.
//
// In a step every lane t visits column x = 2t + h of row y (h = 0 for the
// left column of each stripe, h = 1 for the right one). This module cuts the
// 3x3 neighbourhood of each visited coefficient out of the significance rows
// y-1, y, y+1 and the matching sign rows, treats columns outside the codeblock
// as not significant, and forms both contexts with one bpc_ctx per lane.
// Because the significance rows are updated after every step, the state seen
// here is exactly "significance bit already coded": earlier bitplanes, earlier
// passes, and the neighbours visited earlier in this pass (three above for a
// left column, five for a right column). Combinational.
module bpc_ctx_row #(
  parameter int unsigned T    = 32,
  parameter int unsigned COLS = 2 * T
) (
  input  logic            h,
  input  logic [COLS-1:0] sig_up,
  input  logic [COLS-1:0] sig_mid,
  input  logic [COLS-1:0] sig_dn,
  input  logic [COLS-1:0] neg_up,
  input  logic [COLS-1:0] neg_mid,
  input  logic [COLS-1:0] neg_dn,
  output logic [3:0]      ctx_sig  [T],
  output logic [1:0]      ctx_sign [T]
);

  // Rows padded with one insignificant column at each side: column c is at c+1.
  logic [COLS+1:0] su, sm, sd, nu, nm, nd;
  assign su = {1'b0, sig_up,  1'b0};
  assign sm = {1'b0, sig_mid, 1'b0};
  assign sd = {1'b0, sig_dn,  1'b0};
  assign nu = {1'b0, neg_up,  1'b0};
  assign nm = {1'b0, neg_mid, 1'b0};
  assign nd = {1'b0, neg_dn,  1'b0};

  for (genvar t = 0; t < T; t++) begin : g_lane
    logic [7:0] nsig;
    int unsigned x;   // padded index of the visited column
    assign x = 2 * t + 1 + int'(h);
    assign nsig = {su[x-1], sm[x-1], sd[x-1], sd[x], sd[x+1], sm[x+1], su[x+1], su[x]};

    bpc_ctx u_ctx (
      .nsig     (nsig),
      .neg_up   (nu[x]),
      .neg_dn   (nd[x]),
      .neg_lf   (nm[x-1]),
      .neg_rt   (nm[x+1]),
      .ctx_sig  (ctx_sig[t]),
      .ctx_sign (ctx_sign[t])
    );
  end

endmodule
