// bpc_ref_pkg - behavioural reference model of BPC-PaCo coding, for the
// testbenches.
//
// A plain procedural rendering of the coding method, written independently of
// the RTL: loops over bitplanes, passes, rows, column halves and stripes, with
// the arithmetic coder of each stripe applied in stripe order within a step
// (which is what fixes the slot order of the bitstream). It produces the
// expected bitstream, the expected length after every pass and the expected
// decoded codeblock for any truncation of the stream.
package bpc_ref_pkg;

  class bpc_ref #(
    int unsigned T     = 4,
    int unsigned ROWS  = 8,
    int unsigned W     = 16,
    int unsigned PHAT  = 7,
    int unsigned MAG_W = 8,
    int unsigned NSUB  = 16
  );
    localparam int unsigned COLS = 2 * T;

    int unsigned mag  [ROWS][COLS];
    bit          neg  [ROWS][COLS];
    int unsigned prob [NSUB][MAG_W][14];

    // results of encode()
    int unsigned bs[$];
    int unsigned pass_len[$];
    int unsigned n_symbols, n_sign_steps, n_multi_finish_steps;

    // coder and coding state
    int unsigned S[T], L[T], I[T], slot[T];
    bit sig[ROWS][COLS], nw[ROWS][COLS], vis[ROWS][COLS];
    int unsigned finished_in_step;

    // decoder results
    int unsigned dmag [ROWS][COLS];
    bit          dneg [ROWS][COLS];
    int unsigned rd_ptr, limit;
    bit          stopped;

    function int unsigned nbp();
      int unsigned o = 0;
      foreach (mag[r, c]) o |= mag[r][c];
      nbp = 0;
      for (int b = 0; b < 32; b++) if (o[b]) nbp = b + 1;
    endfunction

    function bit s_at(int y, int x);
      if (y < 0 || y >= ROWS || x < 0 || x >= COLS) return 0;
      return sig[y][x];
    endfunction

    function int chi(int y, int x, bit dec);
      if (!s_at(y, x)) return 0;
      if (dec) return dneg[y][x] ? -1 : 1;
      return neg[y][x] ? -1 : 1;
    endfunction

    function int unsigned ctx_sig(int y, int x);
      ctx_sig = 0;
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++)
          if (dy != 0 || dx != 0) ctx_sig += s_at(y + dy, x + dx);
    endfunction

    function int unsigned ctx_sign(int y, int x, bit dec);
      int v = chi(y - 1, x, dec) + chi(y + 1, x, dec);
      int hh = chi(y, x - 1, dec) + chi(y, x + 1, dec);
      if ((v > 0 && hh > 0) || (v < 0 && hh < 0)) return 0;
      if (v == 0 && hh != 0) return 1;
      if (v != 0 && hh == 0) return 2;
      return 3;
    endfunction

    function void enc_sym(int t, bit c, int unsigned p);
      longint unsigned lo;
      if (S[t] == 0) begin
        slot[t] = bs.size();
        bs.push_back(0);
        L[t] = 0;
        S[t] = (1 << W) - 1;
      end
      lo = (longint'(S[t]) * p) >> PHAT;
      if (!c) S[t] = lo;
      else begin
        L[t] = L[t] + lo + 1;
        S[t] = S[t] - lo - 1;
      end
      n_symbols++;
      if (S[t] == 0) begin
        bs[slot[t]] = L[t];
        finished_in_step++;
      end
    endfunction

    // Returns 0 when the stream is exhausted.
    function bit dec_sym(int t, int unsigned p, output bit c);
      longint unsigned f;
      if (S[t] == 0) begin
        if (rd_ptr >= limit) return 0;
        I[t] = bs[rd_ptr];
        rd_ptr++;
        L[t] = 0;
        S[t] = (1 << W) - 1;
      end
      f = ((longint'(S[t]) * p) >> PHAT) + 1;
      if (I[t] >= L[t] + f) begin
        c = 1;
        L[t] = L[t] + f;
        S[t] = S[t] - f;
      end else begin
        c = 0;
        S[t] = f - 1;
      end
      return 1;
    endfunction

    // One coding run. dec = 0 encodes mag/neg into bs; dec = 1 decodes bs
    // (first lim words) into dmag/dneg.
    function void run(int unsigned sub, bit dec, int unsigned nb, int unsigned lim);
      bit code[T], bitv[T], sneed[T], sval[T];
      int unsigned sctx[T];
      bit c;
      foreach (sig[r, x]) begin
        sig[r][x] = 0; dmag[r][x] = 0; dneg[r][x] = 0;
      end
      foreach (S[t]) S[t] = 0;
      if (!dec) begin
        bs.delete();
        pass_len.delete();
        n_symbols = 0; n_sign_steps = 0; n_multi_finish_steps = 0;
      end
      rd_ptr = 0; limit = lim; stopped = 0;
      for (int j = int'(nb) - 1; j >= 0; j--) begin
        foreach (nw[r, x]) begin nw[r][x] = 0; vis[r][x] = 0; end
        for (int ps = (j == int'(nb) - 1) ? 2 : 0; ps <= 2; ps++) begin
          for (int y = 0; y < int'(ROWS); y++) begin
            for (int h = 0; h < 2; h++) begin
              bit any_sign = 0;
              for (int t = 0; t < int'(T); t++) begin
                int x = 2 * t + h;
                case (ps)
                  0: code[t] = !sig[y][x] && ctx_sig(y, x) != 0;
                  1: code[t] = sig[y][x] && !nw[y][x];
                  default: code[t] = !sig[y][x] && !vis[y][x];
                endcase
                bitv[t] = mag[y][x][j];
                sctx[t] = ctx_sign(y, x, dec);
              end
              finished_in_step = 0;
              for (int t = 0; t < int'(T); t++) begin
                int x = 2 * t + h;
                if (!code[t]) continue;
                if (dec) begin
                  if (!dec_sym(t, prob[sub][j][ps == 1 ? 13 : ctx_sig(y, x)], c)) begin
                    stopped = 1; return;
                  end
                  bitv[t] = c;
                end else begin
                  enc_sym(t, bitv[t], prob[sub][j][ps == 1 ? 13 : ctx_sig(y, x)]);
                end
              end
              if (finished_in_step > 1) n_multi_finish_steps++;
              for (int t = 0; t < int'(T); t++) begin
                int x = 2 * t + h;
                if (ps == 0 && code[t]) vis[y][x] = 1;
                if (code[t] && dec) dmag[y][x][j] = bitv[t];
                sneed[t] = (ps != 1) && code[t] && bitv[t];
                if (sneed[t]) begin sig[y][x] = 1; nw[y][x] = 1; any_sign = 1; end
              end
              if (any_sign) n_sign_steps++;
              finished_in_step = 0;
              for (int t = 0; t < int'(T); t++) begin
                if (!sneed[t]) continue;
                if (dec) begin
                  if (!dec_sym(t, prob[sub][j][9 + sctx[t]], c)) begin
                    stopped = 1; return;
                  end
                  sval[t] = !c;
                end else begin
                  enc_sym(t, !neg[y][2 * t + h], prob[sub][j][9 + sctx[t]]);
                end
              end
              if (finished_in_step > 1) n_multi_finish_steps++;
              if (dec)
                for (int t = 0; t < int'(T); t++)
                  if (sneed[t]) dneg[y][2 * t + h] = sval[t];
            end
          end
          if (!dec) pass_len.push_back(bs.size());
        end
      end
      if (!dec)
        for (int t = 0; t < int'(T); t++)
          if (S[t] != 0) bs[slot[t]] = L[t];
    endfunction

    function void encode(int unsigned sub);
      run(sub, 0, nbp(), 0);
    endfunction

    function void decode(int unsigned sub, int unsigned nb, int unsigned lim);
      run(sub, 1, nb, lim);
    endfunction

    // Random codeblock: magnitudes with a geometric-like spread of sizes, so
    // that bitplanes differ in density as in wavelet data.
    function void random_block(int unsigned max_bits, int unsigned zero_pct);
      foreach (mag[r, c]) begin
        int unsigned nbits = $urandom_range(max_bits, 0);
        mag[r][c] = ($urandom_range(99, 0) < zero_pct) ? 0 :
                    ($urandom() & ((1 << nbits) - 1));
        neg[r][c] = $urandom_range(1, 0);
      end
    endfunction

    function void random_lut(int unsigned lo, int unsigned hi);
      foreach (prob[s, j, k]) prob[s][j][k] = $urandom_range(hi, lo);
    endfunction
  endclass

endpackage
