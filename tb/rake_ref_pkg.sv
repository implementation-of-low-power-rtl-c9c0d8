// rake_ref_pkg: reference model of one user's RAKE receiver, for testbenches.
//
// The model works on plain integers and follows the receiver's definition
// rather than its structure: it keeps the last MAXD received samples, adds
// code * r[n - delay[k]] into one accumulator per finger for every chip n, and
// at the end of a symbol forms sum_k alpha_k* x corr_k with the direct
// four-multiplier complex product. Each expected result is queued together
// with the cycle in which its last chip was presented, so a testbench can
// check both the value and the latency of the design's output.
package rake_ref_pkg;

  class rake_user_model;
    int     nf;                       // fingers
    int     maxd;                     // history length in chips
    int     delay[];                  // tap of each finger
    longint a_re[], a_im[];           // alpha_k* of each finger
    longint h_re[$], h_im[$];         // received samples, newest first
    longint acc_re[], acc_im[];       // per-finger correlations
    longint exp_re[$], exp_im[$];     // expected combined outputs
    int     exp_cyc[$];               // cycle of the symbol's last chip
    int     nsym;                     // symbols completed

    function new(int nf, int maxd);
      this.nf   = nf;
      this.maxd = maxd;
      delay  = new[nf];
      a_re   = new[nf];
      a_im   = new[nf];
      acc_re = new[nf];
      acc_im = new[nf];
      foreach (acc_re[k]) begin
        delay[k] = 0; a_re[k] = 0; a_im[k] = 0; acc_re[k] = 0; acc_im[k] = 0;
      end
      for (int i = 0; i < maxd; i++) begin
        h_re.push_back(0);
        h_im.push_back(0);
      end
      nsym = 0;
    endfunction

    // The receiver stores one new sample per chip.
    function void push_sample(longint rr, longint ri);
      h_re.push_front(rr);
      h_im.push_front(ri);
      void'(h_re.pop_back());
      void'(h_im.pop_back());
    endfunction

    // One chip for this user: the newest sample must already be pushed.
    function void chip(bit code, bit last, int cyc);
      longint sr, si;
      for (int k = 0; k < nf; k++) begin
        acc_re[k] += code ? -h_re[delay[k]] : h_re[delay[k]];
        acc_im[k] += code ? -h_im[delay[k]] : h_im[delay[k]];
      end
      if (last) begin
        sr = 0;
        si = 0;
        for (int k = 0; k < nf; k++) begin
          sr += a_re[k] * acc_re[k] - a_im[k] * acc_im[k];
          si += a_re[k] * acc_im[k] + a_im[k] * acc_re[k];
          acc_re[k] = 0;
          acc_im[k] = 0;
        end
        exp_re.push_back(sr);
        exp_im.push_back(si);
        exp_cyc.push_back(cyc);
        nsym++;
      end
    endfunction

  endclass

endpackage
