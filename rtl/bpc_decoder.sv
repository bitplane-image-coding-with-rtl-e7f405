// bpc_decoder - BPC-PaCo bitplane decoder for one codeblock, T lanes.
//
// Runs the same lockstep scan, passes and contexts as bpc_encoder; which lanes
// decode a symbol in a step depends only on state the decoder already has, so
// both sides agree step by step. Decoded bits are written into bitplane j of
// the output codeblock buffer, decoded signs into its sign rows.
//
// Codeword order: a lane whose interval is exhausted (need_word) and that has
// a symbol to decode takes the next W-bit word of the bitstream. When several
// lanes need one in the same step, the lowest lane goes first, one word per
// cycle; this is the order in which the encoder reserved the slots, so each
// lane finds its own codeword. When the next word lies at or beyond
// word_limit (a truncated bitstream) decoding stops there and truncated is
// set; the coefficients keep the bits decoded so far. Scan, codeword order and
// stop on exhaustion follow the coding method; the one-word-per-cycle fetch
// is this design's own.
//
// Timing: start is sampled in IDLE together with subband, nbp (the number of
// bitplanes from the codeblock header) and word_limit. One cycle per step of
// symbols plus one per fetched codeword. done pulses at the end.
module bpc_decoder
  import bpc_pkg::*;
#(
  parameter int unsigned T        = 32,
  parameter int unsigned ROWS     = 64,
  parameter int unsigned W        = 16,
  parameter int unsigned PHAT     = 7,
  parameter int unsigned MAG_W    = 20,
  parameter int unsigned NSUB     = 16,
  parameter int unsigned BS_WORDS = 8192,
  parameter int unsigned COLS     = 2 * T,
  parameter int unsigned ROW_W    = $clog2(ROWS),
  parameter int unsigned BP_W     = $clog2(MAG_W),
  parameter int unsigned NBP_W    = $clog2(MAG_W + 1),
  parameter int unsigned SUB_W    = (NSUB > 1) ? $clog2(NSUB) : 1,
  parameter int unsigned AW       = $clog2(BS_WORDS),
  parameter int unsigned SLOT_W   = AW + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [SUB_W-1:0]  subband,
  input  logic [NBP_W-1:0]  nbp,
  input  logic [SLOT_W-1:0] word_limit,
  output logic              busy,
  output logic              done,
  output logic              truncated,
  output logic [SLOT_W-1:0] words_read,
  // bitstream
  output logic [AW-1:0]     bs_rd_addr,
  input  logic [W-1:0]      bs_rd_data,
  // output codeblock buffer
  output logic              buf_clear,
  output logic [ROW_W-1:0]  sr_row,
  input  logic [COLS-1:0]   sr_up,
  input  logic [COLS-1:0]   sr_mid,
  input  logic [COLS-1:0]   sr_dn,
  output logic              bw_en,
  output logic [BP_W-1:0]   bw_plane,
  output logic [ROW_W-1:0]  bw_row,
  output logic [COLS-1:0]   bw_mask,
  output logic [COLS-1:0]   bw_bits,
  output logic              sw_en,
  output logic [ROW_W-1:0]  sw_row,
  output logic [COLS-1:0]   sw_mask,
  output logic [COLS-1:0]   sw_bits,
  // probability table
  output logic [SUB_W-1:0]  lut_sub,
  output logic [BP_W-1:0]   lut_plane,
  output logic [CTX_W-1:0]  lut_ctx  [T],
  input  logic [PHAT-1:0]   lut_prob [T],
  // status
  output logic              fetch,
  output logic              pass_done,
  output pass_e             pass_type,
  output logic [BP_W-1:0]   pass_plane
);

  typedef enum logic [2:0] {
    S_IDLE, S_PLANE, S_STEP_A, S_STEP_B, S_PASS_END, S_DONE
  } state_e;

  state_e            state;
  pass_e             pass;
  logic [BP_W-1:0]   plane;
  logic [ROW_W-1:0]  row;
  logic              h;
  logic [SUB_W-1:0]  sub_q;
  logic [SLOT_W-1:0] limit_q, rd_ptr;

  logic [COLS-1:0] sig_q [ROWS];
  logic [COLS-1:0] new_q [ROWS];
  logic [COLS-1:0] vis_q [ROWS];

  logic [COLS-1:0] sig_up, sig_mid, sig_dn;
  logic [3:0]      ctx_sig  [T];
  logic [1:0]      ctx_sign [T];
  logic [COLS-1:0] code_row, sig_row;   // coded / newly significant, as row masks

  logic [T-1:0] code_a, own_sig, own_new, own_vis, sign_need, sign_need_q;
  logic [1:0]   sign_ctx_q [T];
  logic [T-1:0] want, need_word, ac_sym, ac_valid, ac_load, sel;
  logic         any_want, out_of_data, decode_a, decode_b, ac_clear, end_of_pass;

  assign busy       = (state != S_IDLE);
  assign lut_sub    = sub_q;
  assign lut_plane  = plane;
  assign sr_row     = row;
  assign bs_rd_addr = rd_ptr[AW-1:0];
  assign words_read = rd_ptr;
  assign ac_clear   = (state == S_IDLE) && start;
  assign buf_clear  = ac_clear;
  assign end_of_pass = h && (row == ROW_W'(ROWS - 1));

  always_comb begin
    sig_up  = (row == '0) ? '0 : sig_q[row - ROW_W'(1)];
    sig_mid = sig_q[row];
    sig_dn  = (row == ROW_W'(ROWS - 1)) ? '0 : sig_q[row + ROW_W'(1)];
  end

  bpc_ctx_row #(.T(T)) u_ctx_row (
    .h        (h),
    .sig_up   (sig_up),
    .sig_mid  (sig_mid),
    .sig_dn   (sig_dn),
    .neg_up   (sr_up),
    .neg_mid  (sr_mid),
    .neg_dn   (sr_dn),
    .ctx_sig  (ctx_sig),
    .ctx_sign (ctx_sign)
  );

  always_comb begin
    for (int t = 0; t < T; t++) begin
      own_sig[t] = sig_mid[2*t + int'(h)];
      own_new[t] = new_q[row][2*t + int'(h)];
      own_vis[t] = vis_q[row][2*t + int'(h)];
      unique case (pass)
        PASS_SPP: code_a[t] = !own_sig[t] && (ctx_sig[t] != 4'd0);
        PASS_MRP: code_a[t] = own_sig[t] && !own_new[t];
        default:  code_a[t] = !own_sig[t] && !own_vis[t];
      endcase
      if (state == S_STEP_B)
        lut_ctx[t] = CTX_W'(CTX_SIGN0) + CTX_W'(sign_ctx_q[t]);
      else if (pass == PASS_MRP)
        lut_ctx[t] = CTX_W'(CTX_REF);
      else
        lut_ctx[t] = ctx_sig[t];
    end
  end

  // Lanes that have a symbol in this step but no codeword: fetch, lowest first.
  always_comb begin
    want = '0;
    if (state == S_STEP_A) want = code_a & need_word;
    if (state == S_STEP_B) want = sign_need_q & need_word;
    any_want    = (want != '0);
    out_of_data = (rd_ptr >= limit_q);
    sel = want & (~want + T'(1));          // lowest set bit
    ac_load  = (any_want && !out_of_data) ? sel : '0;
    fetch    = (ac_load != '0);
    decode_a = (state == S_STEP_A) && !any_want;
    decode_b = (state == S_STEP_B) && !any_want;
    for (int t = 0; t < T; t++)
      ac_valid[t] = (decode_a && code_a[t]) || (decode_b && sign_need_q[t]);
    sign_need = (pass != PASS_MRP) ? (code_a & ac_sym) : '0;
  end

  always_comb begin
    code_row = '0;
    sig_row  = '0;
    for (int t = 0; t < T; t++) begin
      code_row[2*t + int'(h)] = code_a[t];
      sig_row[2*t + int'(h)]  = sign_need[t];
    end
  end

  for (genvar t = 0; t < T; t++) begin : g_lane
    bpc_ac_decoder #(.W(W), .PHAT(PHAT)) u_ac (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (ac_clear),
      .load      (ac_load[t]),
      .cw_in     (bs_rd_data),
      .need_word (need_word[t]),
      .sym_valid (ac_valid[t]),
      .prob      (lut_prob[t]),
      .sym       (ac_sym[t])
    );
  end

  // Writes into the output buffer: bit j of the coded coefficients, signs of
  // the ones that became significant.
  always_comb begin
    bw_mask = '0;
    bw_bits = '0;
    sw_mask = '0;
    sw_bits = '0;
    for (int t = 0; t < T; t++) begin
      bw_mask[2*t + int'(h)] = code_a[t];
      bw_bits[2*t + int'(h)] = ac_sym[t];
      sw_mask[2*t + int'(h)] = sign_need_q[t];
      sw_bits[2*t + int'(h)] = !ac_sym[t];
    end
    bw_en    = decode_a;
    bw_plane = plane;
    bw_row   = row;
    sw_en    = decode_b;
    sw_row   = row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pass        <= PASS_CP;
      plane       <= '0;
      row         <= '0;
      h           <= 1'b0;
      sub_q       <= '0;
      limit_q     <= '0;
      rd_ptr      <= '0;
      done        <= 1'b0;
      truncated   <= 1'b0;
      pass_done   <= 1'b0;
      pass_type   <= PASS_CP;
      pass_plane  <= '0;
      sign_need_q <= '0;
      for (int t = 0; t < T; t++) sign_ctx_q[t] <= '0;
      for (int r = 0; r < ROWS; r++) begin
        sig_q[r] <= '0;
        new_q[r] <= '0;
        vis_q[r] <= '0;
      end
    end else begin
      done      <= 1'b0;
      pass_done <= 1'b0;
      if (fetch) rd_ptr <= rd_ptr + SLOT_W'(1);
      unique case (state)
        S_IDLE: if (start) begin
          sub_q     <= subband;
          limit_q   <= word_limit;
          rd_ptr    <= '0;
          truncated <= 1'b0;
          for (int r = 0; r < ROWS; r++) sig_q[r] <= '0;
          if (nbp == '0) begin
            state <= S_DONE;
          end else begin
            plane <= BP_W'(nbp - NBP_W'(1));
            pass  <= PASS_CP;
            state <= S_PLANE;
          end
        end

        S_PLANE: begin
          for (int r = 0; r < ROWS; r++) begin
            new_q[r] <= '0;
            vis_q[r] <= '0;
          end
          row   <= '0;
          h     <= 1'b0;
          state <= S_STEP_A;
        end

        S_STEP_A: begin
          if (any_want && out_of_data) begin
            truncated <= 1'b1;
            state     <= S_DONE;
          end else if (decode_a) begin
            if (pass == PASS_SPP) vis_q[row] <= vis_q[row] | code_row;
            sig_q[row] <= sig_q[row] | sig_row;
            new_q[row] <= new_q[row] | sig_row;
            for (int t = 0; t < T; t++) sign_ctx_q[t] <= ctx_sign[t];
            sign_need_q <= sign_need;
            if (sign_need != '0) begin
              state <= S_STEP_B;
            end else if (end_of_pass) begin
              state <= S_PASS_END;
            end else begin
              h <= !h;
              if (h) row <= row + ROW_W'(1);
            end
          end
        end

        S_STEP_B: begin
          if (any_want && out_of_data) begin
            truncated <= 1'b1;
            state     <= S_DONE;
          end else if (decode_b) begin
            if (end_of_pass) begin
              state <= S_PASS_END;
            end else begin
              h     <= !h;
              if (h) row <= row + ROW_W'(1);
              state <= S_STEP_A;
            end
          end
        end

        S_PASS_END: begin
          pass_done  <= 1'b1;
          pass_type  <= pass;
          pass_plane <= plane;
          row        <= '0;
          h          <= 1'b0;
          unique case (pass)
            PASS_SPP: begin pass <= PASS_MRP; state <= S_STEP_A; end
            PASS_MRP: begin pass <= PASS_CP;  state <= S_STEP_A; end
            default: begin
              if (plane == '0) begin
                state <= S_DONE;
              end else begin
                plane <= plane - BP_W'(1);
                pass  <= PASS_SPP;
                state <= S_PLANE;
              end
            end
          endcase
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
