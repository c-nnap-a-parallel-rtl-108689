// adam_ref_pkg: reference model of ADAM recall as the SAT performs it, for
// the testbenches.
//
// The model works on its own copies of the SAT-side buffer and weights
// areas (word arrays), reads a control block in the layout of sat_pkg and
// computes, without any of the RTL, what the SAT must leave in buffer
// memory: stage one summed values, the class bit address list (L-max by
// repeated "highest value below the last threshold" passes, ties included),
// the stage two thresholded words (Willshaw: count equals the number of
// class bits) and, if asked, the stage two summed values. It also gives the
// cycle counts the RTL's state machines are specified to take, and helpers
// to train an ADAM memory and to tuple an image into pointers.
package adam_ref_pkg;

  class adam_model;
    bit [15:0] b [65536];
    bit [15:0] w [65536];
    int unsigned tau, iters;
    int unsigned cyc_s1, cyc_th, cyc_s2;
    int unsigned thr_matches;   // class bits found (ties counted)
    int unsigned thr_tail;      // iterations ended because no value was left

    function automatic int unsigned rd(int unsigned a);
      return int'(b[a[15:0]]);
    endfunction

    // Run one recall from the control block at `ca`; returns nothing,
    // results are in b[] and the fields above.
    function automatic void run(int unsigned ca);
      int unsigned flags, nt, len1, off1, nc1, cs, l, tp, sv1, cba;
      int unsigned off2, len2, nc2, outa, sv2, stop;
      int unsigned cnt [16];
      int unsigned thr, best, found;
      bit first;
      flags = rd(ca);      nt   = rd(ca+1);  len1 = rd(ca+2);  off1 = rd(ca+3);
      nc1   = rd(ca+4);    cs   = rd(ca+5);  l    = rd(ca+6);  tp   = rd(ca+7);
      sv1   = rd(ca+8);    cba  = rd(ca+9);  off2 = rd(ca+10); len2 = rd(ca+11);
      nc2   = rd(ca+12);   outa = rd(ca+13); sv2  = rd(ca+14);
      stop  = (flags >> 1) & 3;
      tau = 0; iters = 0; thr_tail = 0;
      cyc_s1 = 0; cyc_th = 0; cyc_s2 = 0;
      // stage one summing
      for (int unsigned c = 0; c < nc1; c++) begin
        foreach (cnt[i]) cnt[i] = 0;
        for (int unsigned t = 0; t < nt; t++) begin
          bit [15:0] wd;
          wd = w[16'(off1 + c*len1 + rd(tp + t))];
          for (int i = 0; i < 16; i++) if (wd[i]) cnt[i]++;
        end
        for (int i = 0; i < 16; i++) b[16'(sv1 + c*16 + i)] = 16'(cnt[i]);
      end
      cyc_s1 = 2 + nc1 * (3*nt + 17);
      if (stop == 0) return;
      // stage one L-max thresholding
      found = 0; first = 1; thr = 0;
      cyc_th = 1;
      if (l != 0) begin
        forever begin
          best = 0;
          for (int unsigned j = 0; j < cs; j++)
            if ((first || rd(sv1+j) < thr) && rd(sv1+j) > best) best = rd(sv1+j);
          cyc_th += cs + 4;
          if (best == 0) begin thr_tail++; break; end
          thr = best; iters++;
          for (int unsigned j = 0; j < cs; j++)
            if (rd(sv1+j) == thr) begin b[16'(cba + found)] = 16'(j); found++; end
          cyc_th += 2*cs + 2;
          first = 0;
          if (found >= l) break;
        end
      end
      tau = found;
      if (stop == 1) return;
      // stage two summing and Willshaw thresholding
      for (int unsigned c = 0; c < nc2; c++) begin
        bit [15:0] o;
        foreach (cnt[i]) cnt[i] = 0;
        for (int unsigned k = 0; k < tau; k++) begin
          bit [15:0] wd;
          wd = w[16'(off2 + c*len2 + rd(cba + k))];
          for (int i = 0; i < 16; i++) if (wd[i]) cnt[i]++;
        end
        for (int i = 0; i < 16; i++) o[i] = (cnt[i] == tau);
        b[16'(outa + c)] = o;
        if (flags[0]) for (int i = 0; i < 16; i++) b[16'(sv2 + c*16 + i)] = 16'(cnt[i]);
      end
      cyc_s2 = (nc2 == 0) ? 2 : 1 + nc2 * (3*tau + 2 + (flags[0] ? 16 : 0)) + 1;
    endfunction

    // --- workload construction -------------------------------------------
    // Buffer layout used by the testbenches (SAT word addresses).
    localparam int unsigned CA = 16'h0000, TP = 16'h0100, SV1 = 16'h4000,
                            CBA = 16'h6000, OUTA = 16'h7000, SV2 = 16'h8000;
    int unsigned exp_out [];   // trained output pattern of the recalled pair, per stage two column
    int unsigned nc2_q;

    // Train an ADAM memory with `npairs` random (input, class, output)
    // triples and set up the recall of pair 0. Input image: beta bits tupled
    // by delta; class: alpha bits with l set; output: rho bits tupled by
    // sigma. The matrices are stored column by column from offset off1 and
    // directly after stage one.
    function automatic void build(int unsigned beta, int unsigned delta,
                                  int unsigned alpha, int unsigned l,
                                  int unsigned rho, int unsigned sigma,
                                  int unsigned npairs, int unsigned off1,
                                  bit store_s2, int unsigned stop);
      int unsigned t1, m1, nc1, t2, nl2, nc2, off2;
      int unsigned v1 [], v2 [];
      bit cls [];
      t1 = beta / delta;  m1 = t1 << delta;  nc1 = (alpha + 15) / 16;
      t2 = rho / sigma;   nl2 = t2 << sigma; nc2 = (nl2 + 15) / 16;
      off2 = off1 + nc1 * m1;
      nc2_q = nc2;
      foreach (w[i]) w[i] = '0;
      foreach (b[i]) b[i] = '0;
      v1 = new[t1]; v2 = new[t2]; cls = new[alpha];
      exp_out = new[nc2];
      for (int unsigned p = 0; p < npairs; p++) begin
        int unsigned set;
        foreach (v1[t]) v1[t] = $urandom % (1 << delta);
        foreach (v2[t]) v2[t] = $urandom % (1 << sigma);
        foreach (cls[k]) cls[k] = 0;
        set = 0;
        while (set < l && set < alpha) begin
          int unsigned k = $urandom % alpha;
          if (!cls[k]) begin cls[k] = 1; set++; end
        end
        for (int unsigned k = 0; k < alpha; k++) if (cls[k]) begin
          foreach (v1[t]) begin
            int unsigned a = off1 + (k / 16) * m1 + (t << delta) + v1[t];
            w[16'(a)][k % 16] = 1'b1;
          end
          foreach (v2[t]) begin
            int unsigned o = (t << sigma) + v2[t];
            int unsigned a = off2 + (o / 16) * alpha + k;
            w[16'(a)][o % 16] = 1'b1;
          end
        end
        if (p == 0) begin
          foreach (v1[t]) b[16'(TP + t)] = 16'((t << delta) + v1[t]);
          foreach (exp_out[c]) exp_out[c] = 0;
          foreach (v2[t]) begin
            int unsigned o = (t << sigma) + v2[t];
            exp_out[o / 16] |= 1 << (o % 16);
          end
        end
      end
      b[CA + 0]  = 16'({stop[1:0], store_s2});
      b[CA + 1]  = 16'(t1);
      b[CA + 2]  = 16'(m1);
      b[CA + 3]  = 16'(off1);
      b[CA + 4]  = 16'(nc1);
      b[CA + 5]  = 16'(alpha);
      b[CA + 6]  = 16'(l);
      b[CA + 7]  = 16'(TP);
      b[CA + 8]  = 16'(SV1);
      b[CA + 9]  = 16'(CBA);
      b[CA + 10] = 16'(off2);
      b[CA + 11] = 16'(alpha);
      b[CA + 12] = 16'(nc2);
      b[CA + 13] = 16'(OUTA);
      b[CA + 14] = 16'(SV2);
    endfunction
  endclass

endpackage
