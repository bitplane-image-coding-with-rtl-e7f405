// bpc_encoder - BPC-PaCo bitplane encoder for one codeblock, T lanes.
//
// The codeblock is split into T vertical stripes of two columns; lane t codes
// stripe t with its own arithmetic coder. All lanes move in lockstep through
// the same scan: rows top to bottom, and in each row first the left column of
// every stripe (h = 0), then the right column (h = 1). Bitplanes are coded from
// nbp-1 down to 0; the top bitplane gets only the cleanup pass, every other one
// the significance propagation (SPP), magnitude refinement (MRP) and cleanup
// (CP) passes, in that order. In a pass a lane codes the visited coefficient if
//   SPP: not yet significant and at least one significant neighbour
//   MRP: significant in an earlier bitplane (single refinement context)
//   CP : not yet significant and not coded by the SPP of this bitplane
// A coefficient that becomes significant has its sign coded right after.
// Scan order, pass rules, contexts and coder follow the coding method.
//
// Per step (one coefficient position in every stripe):
//   STEP_A  the significance or refinement bit of every lane that codes one
//   STEP_B  the sign of every lane whose coefficient just became significant;
//           skipped when no lane has one
// A lane opening a new codeword reserves the next bitstream slot (left stripes
// first, bpc_slot_alloc); finished codewords are written one per cycle by
// bpc_cw_dispatch, and a step waits (stall = 1) while any is still pending.
// At the end every open codeword is flushed to its slot. pass_done marks the
// end of each pass with the bitstream length at that point, a truncation
// point for rate control. The stall-and-drain scheme and the status outputs
// are this design's own.
//
// Timing: start is sampled in IDLE; nbp and the codeblock buffer must hold the
// codeblock until done. About 2*ROWS cycles per pass plus sign steps and
// stalls.
module bpc_encoder
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
  output logic              busy,
  output logic              done,
  // codeblock buffer
  output logic [BP_W-1:0]   pr_plane,
  output logic [ROW_W-1:0]  pr_row,
  input  logic [COLS-1:0]   pr_bits,
  output logic [ROW_W-1:0]  sr_row,
  input  logic [COLS-1:0]   sr_up,
  input  logic [COLS-1:0]   sr_mid,
  input  logic [COLS-1:0]   sr_dn,
  // probability table
  output logic [SUB_W-1:0]  lut_sub,
  output logic [BP_W-1:0]   lut_plane,
  output logic [CTX_W-1:0]  lut_ctx  [T],
  input  logic [PHAT-1:0]   lut_prob [T],
  // bitstream
  output logic              bs_wr_en,
  output logic [AW-1:0]     bs_wr_addr,
  output logic [W-1:0]      bs_wr_data,
  output logic [SLOT_W-1:0] words,
  output logic              overflow,
  // status
  output logic              pass_done,
  output pass_e             pass_type,
  output logic [BP_W-1:0]   pass_plane,
  output logic              stall
);

  typedef enum logic [2:0] {
    S_IDLE, S_PLANE, S_STEP_A, S_STEP_B, S_PASS_END, S_FLUSH, S_FLUSH_WAIT, S_DONE
  } state_e;

  state_e           state;
  pass_e            pass;
  logic [BP_W-1:0]  plane;
  logic [ROW_W-1:0] row;
  logic             h;
  logic [SUB_W-1:0] sub_q;

  // Coding state: significant, became significant in this bitplane, coded
  // by the SPP of this bitplane.
  logic [COLS-1:0] sig_q [ROWS];
  logic [COLS-1:0] new_q [ROWS];
  logic [COLS-1:0] vis_q [ROWS];

  logic [COLS-1:0] sig_up, sig_mid, sig_dn;
  logic [3:0]      ctx_sig  [T];
  logic [1:0]      ctx_sign [T];
  logic [COLS-1:0] code_row, sig_row;   // coded / newly significant, as row masks

  logic [T-1:0]    code_a, bit_a, own_sig, own_new, own_vis, own_neg;
  logic [T-1:0]    sign_need, sign_need_q, sign_sym_q;
  logic [1:0]      sign_ctx_q [T];

  // Lanes
  logic [T-1:0]      ac_valid, ac_sym, need_slot, cw_valid, cw_ack;
  logic [W-1:0]      cw_data [T];
  logic [SLOT_W-1:0] cw_slot [T];
  logic [SLOT_W-1:0] slot    [T];
  logic              ac_clear, ac_flush, alloc_commit;

  logic pending, step_a_go, step_b_go, last_pass;

  assign pending   = |cw_valid;
  assign step_a_go = (state == S_STEP_A) && !pending;
  assign step_b_go = (state == S_STEP_B) && !pending;
  assign stall     = (state == S_STEP_A || state == S_STEP_B) && pending;
  assign busy      = (state != S_IDLE);
  assign last_pass = (pass == PASS_CP) && (plane == '0);

  assign pr_plane  = plane;
  assign pr_row    = row;
  assign sr_row    = row;
  assign lut_sub   = sub_q;
  assign lut_plane = plane;

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

  // Which lanes code a symbol in this step, and with which context.
  always_comb begin
    for (int t = 0; t < T; t++) begin
      own_sig[t] = sig_mid[2*t + int'(h)];
      own_new[t] = new_q[row][2*t + int'(h)];
      own_vis[t] = vis_q[row][2*t + int'(h)];
      own_neg[t] = sr_mid[2*t + int'(h)];
      bit_a[t]   = pr_bits[2*t + int'(h)];
      unique case (pass)
        PASS_SPP: code_a[t] = !own_sig[t] && (ctx_sig[t] != 4'd0);
        PASS_MRP: code_a[t] = own_sig[t] && !own_new[t];
        default:  code_a[t] = !own_sig[t] && !own_vis[t];
      endcase
      sign_need[t] = (pass != PASS_MRP) && code_a[t] && bit_a[t];
      if (state == S_STEP_B)
        lut_ctx[t] = CTX_W'(CTX_SIGN0) + CTX_W'(sign_ctx_q[t]);
      else if (pass == PASS_MRP)
        lut_ctx[t] = CTX_W'(CTX_REF);
      else
        lut_ctx[t] = ctx_sig[t];
      ac_valid[t] = (step_a_go && code_a[t]) || (step_b_go && sign_need_q[t]);
      ac_sym[t]   = (state == S_STEP_B) ? sign_sym_q[t] : bit_a[t];
    end
  end

  assign alloc_commit = step_a_go || step_b_go;

  always_comb begin
    code_row = '0;
    sig_row  = '0;
    for (int t = 0; t < T; t++) begin
      code_row[2*t + int'(h)] = code_a[t];
      sig_row[2*t + int'(h)]  = sign_need[t];
    end
  end

  for (genvar t = 0; t < T; t++) begin : g_lane
    bpc_ac_encoder #(.W(W), .PHAT(PHAT), .SLOT_W(SLOT_W)) u_ac (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (ac_clear),
      .sym_valid (ac_valid[t]),
      .sym       (ac_sym[t]),
      .prob      (lut_prob[t]),
      .need_slot (need_slot[t]),
      .slot_in   (slot[t]),
      .flush     (ac_flush),
      .cw_valid  (cw_valid[t]),
      .cw_data   (cw_data[t]),
      .cw_slot   (cw_slot[t]),
      .cw_ack    (cw_ack[t])
    );
  end

  bpc_slot_alloc #(.T(T), .BS_WORDS(BS_WORDS), .SLOT_W(SLOT_W)) u_alloc (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (ac_clear),
    .need     (need_slot),
    .commit   (alloc_commit),
    .slot     (slot),
    .count    (words),
    .overflow (overflow)
  );

  bpc_cw_dispatch #(.T(T), .W(W), .BS_WORDS(BS_WORDS), .SLOT_W(SLOT_W)) u_dispatch (
    .cw_valid (cw_valid),
    .cw_data  (cw_data),
    .cw_slot  (cw_slot),
    .cw_ack   (cw_ack),
    .wr_en    (bs_wr_en),
    .wr_addr  (bs_wr_addr),
    .wr_data  (bs_wr_data)
  );

  assign ac_clear = (state == S_IDLE) && start;
  assign ac_flush = (state == S_FLUSH) && !pending;

  // Scan position after the current step.
  logic end_of_pass;
  assign end_of_pass = h && (row == ROW_W'(ROWS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pass        <= PASS_CP;
      plane       <= '0;
      row         <= '0;
      h           <= 1'b0;
      sub_q       <= '0;
      done        <= 1'b0;
      pass_done   <= 1'b0;
      pass_type   <= PASS_CP;
      pass_plane  <= '0;
      sign_need_q <= '0;
      sign_sym_q  <= '0;
      for (int t = 0; t < T; t++) sign_ctx_q[t] <= '0;
      for (int r = 0; r < ROWS; r++) begin
        sig_q[r] <= '0;
        new_q[r] <= '0;
        vis_q[r] <= '0;
      end
    end else begin
      done      <= 1'b0;
      pass_done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          sub_q <= subband;
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

        S_STEP_A: if (step_a_go) begin
          if (pass == PASS_SPP) vis_q[row] <= vis_q[row] | code_row;
          sig_q[row] <= sig_q[row] | sig_row;
          new_q[row] <= new_q[row] | sig_row;
          for (int t = 0; t < T; t++) begin
            sign_ctx_q[t] <= ctx_sign[t];
            sign_sym_q[t] <= !own_neg[t];
          end
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

        S_STEP_B: if (step_b_go) begin
          if (end_of_pass) begin
            state <= S_PASS_END;
          end else begin
            h     <= !h;
            if (h) row <= row + ROW_W'(1);
            state <= S_STEP_A;
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
              if (last_pass) begin
                state <= S_FLUSH;
              end else begin
                plane <= plane - BP_W'(1);
                pass  <= PASS_SPP;
                state <= S_PLANE;
              end
            end
          endcase
        end

        S_FLUSH:      if (!pending) state <= S_FLUSH_WAIT;
        S_FLUSH_WAIT: if (!pending) state <= S_DONE;

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
