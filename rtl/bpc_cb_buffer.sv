// bpc_cb_buffer - codeblock store, organised by bitplane.
//
// Holds ROWS x COLS quantized coefficients (COLS = 2*T, two columns per
// stripe) as sign and magnitude. Magnitudes are kept bitplane by bitplane, one
// COLS-bit word per (bitplane, row), so that one read returns bit j of a whole
// row: exactly what the T lanes need in one step. Signs are one COLS-bit word
// per row; rows y-1, y and y+1 are read at once for sign contexts (zero
// outside the codeblock).
//
// Ports:
//   clear                     zero all coefficients
//   host write (cw_*)         one coefficient per cycle; also ORs its
//                             magnitude into mag_or, from which nbp, the
//                             number of bitplanes to code, is derived
//   host read (cr_*)          one coefficient, combinational
//   plane-row read (pr_*)     bit pr_plane of all columns of row pr_row
//   sign rows (sr_*)          signs of rows sr_row-1, sr_row, sr_row+1
//   bit write (bw_*)          masked write of one bitplane row (decoder)
//   sign write (sw_*)         masked write of one sign row (decoder)
// Writes take effect at the clock edge, reads are combinational. The
// organisation is this design's own; the coding method only needs the bits.
module bpc_cb_buffer #(
  parameter int unsigned T     = 32,
  parameter int unsigned ROWS  = 64,
  parameter int unsigned MAG_W = 20,
  parameter int unsigned COLS  = 2 * T,
  parameter int unsigned ROW_W = $clog2(ROWS),
  parameter int unsigned COL_W = $clog2(COLS),
  parameter int unsigned BP_W  = $clog2(MAG_W),
  parameter int unsigned NBP_W = $clog2(MAG_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             cw_en,
  input  logic [ROW_W-1:0] cw_row,
  input  logic [COL_W-1:0] cw_col,
  input  logic             cw_neg,
  input  logic [MAG_W-1:0] cw_mag,
  input  logic [ROW_W-1:0] cr_row,
  input  logic [COL_W-1:0] cr_col,
  output logic             cr_neg,
  output logic [MAG_W-1:0] cr_mag,
  output logic [NBP_W-1:0] nbp,
  input  logic [BP_W-1:0]  pr_plane,
  input  logic [ROW_W-1:0] pr_row,
  output logic [COLS-1:0]  pr_bits,
  input  logic [ROW_W-1:0] sr_row,
  output logic [COLS-1:0]  sr_up,
  output logic [COLS-1:0]  sr_mid,
  output logic [COLS-1:0]  sr_dn,
  input  logic             bw_en,
  input  logic [BP_W-1:0]  bw_plane,
  input  logic [ROW_W-1:0] bw_row,
  input  logic [COLS-1:0]  bw_mask,
  input  logic [COLS-1:0]  bw_bits,
  input  logic             sw_en,
  input  logic [ROW_W-1:0] sw_row,
  input  logic [COLS-1:0]  sw_mask,
  input  logic [COLS-1:0]  sw_bits
);

  logic [COLS-1:0]  mag [MAG_W][ROWS];
  logic [COLS-1:0]  sgn [ROWS];
  logic [MAG_W-1:0] mag_or;

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int b = 0; b < MAG_W; b++)
        for (int r = 0; r < ROWS; r++) mag[b][r] <= '0;
      for (int r = 0; r < ROWS; r++) sgn[r] <= '0;
    end else begin
      if (cw_en) begin
        for (int b = 0; b < MAG_W; b++) mag[b][cw_row][cw_col] <= cw_mag[b];
        sgn[cw_row][cw_col] <= cw_neg;
      end
      if (bw_en) mag[bw_plane][bw_row] <= (mag[bw_plane][bw_row] & ~bw_mask) | (bw_bits & bw_mask);
      if (sw_en) sgn[sw_row] <= (sgn[sw_row] & ~sw_mask) | (sw_bits & sw_mask);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mag_or <= '0;
    else if (clear) mag_or <= '0;
    else if (cw_en) mag_or <= mag_or | cw_mag;
  end

  always_comb begin
    nbp = '0;
    for (int b = 0; b < MAG_W; b++) if (mag_or[b]) nbp = NBP_W'(b + 1);
  end

  always_comb begin
    for (int b = 0; b < MAG_W; b++) cr_mag[b] = mag[b][cr_row][cr_col];
    cr_neg  = sgn[cr_row][cr_col];
    pr_bits = mag[pr_plane][pr_row];
    sr_mid  = sgn[sr_row];
    sr_up   = (sr_row == '0) ? '0 : sgn[sr_row - ROW_W'(1)];
    sr_dn   = (sr_row == ROW_W'(ROWS - 1)) ? '0 : sgn[sr_row + ROW_W'(1)];
  end

endmodule
