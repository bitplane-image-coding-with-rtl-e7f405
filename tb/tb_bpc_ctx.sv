// tb_bpc_ctx - checks significance and sign context formation.
//
// Drives every one of the 256 significance patterns with random neighbour
// signs (several times each) and compares both contexts with values worked
// out here from the definitions: the count of significant neighbours, and
// the four-way sign rule on chiV and chiH.
module tb_bpc_ctx;
  logic [7:0] nsig;
  logic       nu, nd, nl, nr;
  logic [3:0] ctx_sig;
  logic [1:0] ctx_sign;
  int checks = 0, failures = 0;
  int seen_sign[4];

  bpc_ctx dut (.nsig(nsig), .neg_up(nu), .neg_dn(nd), .neg_lf(nl), .neg_rt(nr),
               .ctx_sig(ctx_sig), .ctx_sign(ctx_sign));

  function automatic int chi(bit s, bit n);
    return !s ? 0 : (n ? -1 : 1);
  endfunction

  initial begin
    for (int rep = 0; rep < 8; rep++)
      for (int p = 0; p < 256; p++) begin
        int cnt, v, hz, exp_sign;
        cnt = 0;
        nsig = 8'(p);
        {nu, nd, nl, nr} = 4'($urandom_range(15, 0));
        #1;
        for (int k = 0; k < 8; k++) cnt += p[k];
        v  = chi(nsig[0], nu) + chi(nsig[4], nd);
        hz = chi(nsig[6], nl) + chi(nsig[2], nr);
        if ((v > 0 && hz > 0) || (v < 0 && hz < 0)) exp_sign = 0;
        else if (v == 0 && hz != 0) exp_sign = 1;
        else if (v != 0 && hz == 0) exp_sign = 2;
        else exp_sign = 3;
        checks += 2;
        if (int'(ctx_sig) != cnt) begin
          failures++;
          $display("FAIL sig p=%b got %0d exp %0d", nsig, ctx_sig, cnt);
        end
        if (int'(ctx_sign) != exp_sign) begin
          failures++;
          $display("FAIL sign p=%b s=%b got %0d exp %0d", nsig, {nu, nd, nl, nr}, ctx_sign, exp_sign);
        end
        seen_sign[exp_sign]++;
      end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen_sign[k] == 0) begin failures++; $display("FAIL sign context %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
