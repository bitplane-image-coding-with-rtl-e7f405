// bpc_paco_top - BPC-PaCo codeblock codec: parallel encoder and decoder
// sharing one bitstream memory.
//
// Encoder side: the host clears the input codeblock buffer, writes the
// quantized coefficients (sign and magnitude) one per cycle, and pulses
// enc_start with the subband. The encoder codes the nbp significant bitplanes
// (nbp is reported on enc_nbp, for the codeblock header) with T lanes, and
// leaves the bitstream in the shared memory: enc_words codeword slots of W
// bits, slot 0 first. enc_pass_done marks each coding pass with the length
// reached so far, the truncation points for rate control.
//
// Decoder side: dec_start with subband, number of bitplanes and the number of
// words available (dec_word_limit, to decode a truncated stream). The decoded
// codeblock is read back through out_rd_*. The host can also read the
// bitstream directly through bs_rd_*, and the input codeblock through
// cb_rd_*. dec_pass_done/type/plane mark each pass the decoder completes.
//
// Both sides use their own copy of the stationary probability table, loaded
// through one write port, as encoder and decoder of the coding method share
// the same fixed table. Blocks outside the codec (wavelet transform,
// rate-distortion optimisation, training of the table) are not included.
module bpc_paco_top
  import bpc_pkg::*;
#(
  parameter int unsigned T        = T_DEF,
  parameter int unsigned ROWS     = ROWS_DEF,
  parameter int unsigned W        = W_DEF,
  parameter int unsigned PHAT     = PHAT_DEF,
  parameter int unsigned MAG_W    = MAG_W_DEF,
  parameter int unsigned NSUB     = NSUB_DEF,
  parameter int unsigned BS_WORDS = BS_WORDS_DEF,
  parameter int unsigned COLS     = 2 * T,
  parameter int unsigned ROW_W    = $clog2(ROWS),
  parameter int unsigned COL_W    = $clog2(COLS),
  parameter int unsigned BP_W     = $clog2(MAG_W),
  parameter int unsigned NBP_W    = $clog2(MAG_W + 1),
  parameter int unsigned SUB_W    = (NSUB > 1) ? $clog2(NSUB) : 1,
  parameter int unsigned AW       = $clog2(BS_WORDS),
  parameter int unsigned SLOT_W   = AW + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // probability table load
  input  logic              lut_wr_en,
  input  logic [SUB_W-1:0]  lut_wr_sub,
  input  logic [BP_W-1:0]   lut_wr_plane,
  input  logic [CTX_W-1:0]  lut_wr_ctx,
  input  logic [PHAT-1:0]   lut_wr_prob,
  // codeblock in
  input  logic              cb_clear,
  input  logic              cb_wr_en,
  input  logic [ROW_W-1:0]  cb_wr_row,
  input  logic [COL_W-1:0]  cb_wr_col,
  input  logic              cb_wr_neg,
  input  logic [MAG_W-1:0]  cb_wr_mag,
  input  logic [ROW_W-1:0]  cb_rd_row,
  input  logic [COL_W-1:0]  cb_rd_col,
  output logic              cb_rd_neg,
  output logic [MAG_W-1:0]  cb_rd_mag,
  // encoder
  input  logic              enc_start,
  input  logic [SUB_W-1:0]  enc_subband,
  output logic              enc_busy,
  output logic              enc_done,
  output logic [NBP_W-1:0]  enc_nbp,
  output logic [SLOT_W-1:0] enc_words,
  output logic              enc_overflow,
  output logic              enc_stall,
  output logic              enc_pass_done,
  output pass_e             enc_pass_type,
  output logic [BP_W-1:0]   enc_pass_plane,
  // bitstream read
  input  logic [AW-1:0]     bs_rd_addr,
  output logic [W-1:0]      bs_rd_data,
  // decoder
  input  logic              dec_start,
  input  logic [SUB_W-1:0]  dec_subband,
  input  logic [NBP_W-1:0]  dec_nbp,
  input  logic [SLOT_W-1:0] dec_word_limit,
  output logic              dec_busy,
  output logic              dec_done,
  output logic              dec_truncated,
  output logic [SLOT_W-1:0] dec_words_read,
  output logic              dec_fetch,
  output logic              dec_pass_done,
  output pass_e             dec_pass_type,
  output logic [BP_W-1:0]   dec_pass_plane,
  // codeblock out
  input  logic [ROW_W-1:0]  out_rd_row,
  input  logic [COL_W-1:0]  out_rd_col,
  output logic              out_rd_neg,
  output logic [MAG_W-1:0]  out_rd_mag
);

  // ---------------- encoder side ----------------
  logic [BP_W-1:0]  e_pr_plane;
  logic [ROW_W-1:0] e_pr_row, e_sr_row;
  logic [COLS-1:0]  e_pr_bits, e_sr_up, e_sr_mid, e_sr_dn;
  logic [SUB_W-1:0] e_lut_sub;
  logic [BP_W-1:0]  e_lut_plane;
  logic [CTX_W-1:0] e_lut_ctx  [T];
  logic [PHAT-1:0]  e_lut_prob [T];
  logic             bs_wr_en;
  logic [AW-1:0]    bs_wr_addr;
  logic [W-1:0]     bs_wr_data;

  bpc_cb_buffer #(.T(T), .ROWS(ROWS), .MAG_W(MAG_W)) u_cb_in (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (cb_clear),
    .cw_en    (cb_wr_en),
    .cw_row   (cb_wr_row),
    .cw_col   (cb_wr_col),
    .cw_neg   (cb_wr_neg),
    .cw_mag   (cb_wr_mag),
    .cr_row   (cb_rd_row),
    .cr_col   (cb_rd_col),
    .cr_neg   (cb_rd_neg),
    .cr_mag   (cb_rd_mag),
    .nbp      (enc_nbp),
    .pr_plane (e_pr_plane),
    .pr_row   (e_pr_row),
    .pr_bits  (e_pr_bits),
    .sr_row   (e_sr_row),
    .sr_up    (e_sr_up),
    .sr_mid   (e_sr_mid),
    .sr_dn    (e_sr_dn),
    .bw_en    (1'b0),
    .bw_plane ('0),
    .bw_row   ('0),
    .bw_mask  ('0),
    .bw_bits  ('0),
    .sw_en    (1'b0),
    .sw_row   ('0),
    .sw_mask  ('0),
    .sw_bits  ('0)
  );

  bpc_prob_lut #(.NRD(T), .NSUB(NSUB), .NBP(MAG_W), .PHAT(PHAT)) u_lut_enc (
    .clk      (clk),
    .wr_en    (lut_wr_en),
    .wr_sub   (lut_wr_sub),
    .wr_plane (lut_wr_plane),
    .wr_ctx   (lut_wr_ctx),
    .wr_prob  (lut_wr_prob),
    .rd_sub   (e_lut_sub),
    .rd_plane (e_lut_plane),
    .rd_ctx   (e_lut_ctx),
    .rd_prob  (e_lut_prob)
  );

  bpc_encoder #(.T(T), .ROWS(ROWS), .W(W), .PHAT(PHAT), .MAG_W(MAG_W),
                .NSUB(NSUB), .BS_WORDS(BS_WORDS)) u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (enc_start),
    .subband    (enc_subband),
    .nbp        (enc_nbp),
    .busy       (enc_busy),
    .done       (enc_done),
    .pr_plane   (e_pr_plane),
    .pr_row     (e_pr_row),
    .pr_bits    (e_pr_bits),
    .sr_row     (e_sr_row),
    .sr_up      (e_sr_up),
    .sr_mid     (e_sr_mid),
    .sr_dn      (e_sr_dn),
    .lut_sub    (e_lut_sub),
    .lut_plane  (e_lut_plane),
    .lut_ctx    (e_lut_ctx),
    .lut_prob   (e_lut_prob),
    .bs_wr_en   (bs_wr_en),
    .bs_wr_addr (bs_wr_addr),
    .bs_wr_data (bs_wr_data),
    .words      (enc_words),
    .overflow   (enc_overflow),
    .pass_done  (enc_pass_done),
    .pass_type  (enc_pass_type),
    .pass_plane (enc_pass_plane),
    .stall      (enc_stall)
  );

  // ---------------- bitstream ----------------
  logic [AW-1:0] d_rd_addr;
  logic [W-1:0]  d_rd_data;

  bpc_bitstream_buf #(.W(W), .BS_WORDS(BS_WORDS)) u_bs (
    .clk      (clk),
    .wr_en    (bs_wr_en),
    .wr_addr  (bs_wr_addr),
    .wr_data  (bs_wr_data),
    .rd0_addr (d_rd_addr),
    .rd0_data (d_rd_data),
    .rd1_addr (bs_rd_addr),
    .rd1_data (bs_rd_data)
  );

  // ---------------- decoder side ----------------
  logic             d_buf_clear, d_bw_en, d_sw_en;
  logic [ROW_W-1:0] d_sr_row, d_bw_row, d_sw_row;
  logic [COLS-1:0]  d_sr_up, d_sr_mid, d_sr_dn, d_bw_mask, d_bw_bits, d_sw_mask, d_sw_bits;
  logic [COLS-1:0]  d_pr_unused;
  logic [BP_W-1:0]  d_bw_plane;
  logic [SUB_W-1:0] d_lut_sub;
  logic [BP_W-1:0]  d_lut_plane;
  logic [CTX_W-1:0] d_lut_ctx  [T];
  logic [PHAT-1:0]  d_lut_prob [T];
  logic [NBP_W-1:0] d_nbp_unused;

  bpc_decoder #(.T(T), .ROWS(ROWS), .W(W), .PHAT(PHAT), .MAG_W(MAG_W),
                .NSUB(NSUB), .BS_WORDS(BS_WORDS)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (dec_start),
    .subband    (dec_subband),
    .nbp        (dec_nbp),
    .word_limit (dec_word_limit),
    .busy       (dec_busy),
    .done       (dec_done),
    .truncated  (dec_truncated),
    .words_read (dec_words_read),
    .bs_rd_addr (d_rd_addr),
    .bs_rd_data (d_rd_data),
    .buf_clear  (d_buf_clear),
    .sr_row     (d_sr_row),
    .sr_up      (d_sr_up),
    .sr_mid     (d_sr_mid),
    .sr_dn      (d_sr_dn),
    .bw_en      (d_bw_en),
    .bw_plane   (d_bw_plane),
    .bw_row     (d_bw_row),
    .bw_mask    (d_bw_mask),
    .bw_bits    (d_bw_bits),
    .sw_en      (d_sw_en),
    .sw_row     (d_sw_row),
    .sw_mask    (d_sw_mask),
    .sw_bits    (d_sw_bits),
    .lut_sub    (d_lut_sub),
    .lut_plane  (d_lut_plane),
    .lut_ctx    (d_lut_ctx),
    .lut_prob   (d_lut_prob),
    .fetch      (dec_fetch),
    .pass_done  (dec_pass_done),
    .pass_type  (dec_pass_type),
    .pass_plane (dec_pass_plane)
  );

  bpc_prob_lut #(.NRD(T), .NSUB(NSUB), .NBP(MAG_W), .PHAT(PHAT)) u_lut_dec (
    .clk      (clk),
    .wr_en    (lut_wr_en),
    .wr_sub   (lut_wr_sub),
    .wr_plane (lut_wr_plane),
    .wr_ctx   (lut_wr_ctx),
    .wr_prob  (lut_wr_prob),
    .rd_sub   (d_lut_sub),
    .rd_plane (d_lut_plane),
    .rd_ctx   (d_lut_ctx),
    .rd_prob  (d_lut_prob)
  );

  bpc_cb_buffer #(.T(T), .ROWS(ROWS), .MAG_W(MAG_W)) u_cb_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (d_buf_clear),
    .cw_en    (1'b0),
    .cw_row   ('0),
    .cw_col   ('0),
    .cw_neg   (1'b0),
    .cw_mag   ('0),
    .cr_row   (out_rd_row),
    .cr_col   (out_rd_col),
    .cr_neg   (out_rd_neg),
    .cr_mag   (out_rd_mag),
    .nbp      (d_nbp_unused),
    .pr_plane ('0),
    .pr_row   ('0),
    .pr_bits  (d_pr_unused),
    .sr_row   (d_sr_row),
    .sr_up    (d_sr_up),
    .sr_mid   (d_sr_mid),
    .sr_dn    (d_sr_dn),
    .bw_en    (d_bw_en),
    .bw_plane (d_bw_plane),
    .bw_row   (d_bw_row),
    .bw_mask  (d_bw_mask),
    .bw_bits  (d_bw_bits),
    .sw_en    (d_sw_en),
    .sw_row   (d_sw_row),
    .sw_mask  (d_sw_mask),
    .sw_bits  (d_sw_bits)
  );

endmodule
