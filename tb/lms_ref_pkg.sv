// lms_ref_pkg: cycle-free reference model of the LMS filter, for testbenches.
//
// LmsRef keeps its own delay line and weights as plain integers and applies,
// per sample, e = d - sum(w_i * x(n-i)) (summed as a pairwise tree) and w_i += (e * x(n-i)) >> (DW-1+MU),
// with every addition that the hardware makes approximately done through the
// bit-level reference adder of approx_ref_pkg. It also keeps the exact sum of
// products so a testbench can count how often the approximation changed it.
package lms_ref_pkg;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  class LmsRef;
    int taps, dw, cw, mu, acc_y, upd_y, acc_w;
    fa_mode_e mode;
    longint x [$];   // x[0] newest
    longint w [$];
    longint y, e, y_exact;

    function new(int taps, int dw, int cw, int mu, int acc_y, int upd_y, fa_mode_e mode);
      this.taps = taps; this.dw = dw; this.cw = cw; this.mu = mu;
      this.acc_y = acc_y; this.upd_y = upd_y; this.mode = mode;
      this.acc_w = dw + cw + $clog2(taps);
      for (int i = 0; i < taps; i++) begin x.push_back(0); w.push_back(0); end
    endfunction

    // Interpret the low n bits of v as a signed number.
    static function longint sx(longint v, int n);
      longint m;
      m = longint'(1) << n;
      v = v & (m - 1);
      if (v >= (m >> 1)) v = v - m;
      return v;
    endfunction

    static function longint sat(longint v, int n);
      longint hi, lo;
      hi = (longint'(1) << (n - 1)) - 1;
      lo = -(longint'(1) << (n - 1));
      return (v > hi) ? hi : (v < lo) ? lo : v;
    endfunction

    function longint add(int n, int yb, longint a, longint b);
      logic [64:0] r;
      r = approx_add_ref(n, yb, mode, 64'(a), 64'(b), 1'b0);
      return sx(longint'(r[63:0]), n);
    endfunction

    // One sample; returns 1 when any accumulation step was not exact.
    function bit step(longint xin, longint din);
      longint acc, accx, p, st;
      longint lvl [$];
      longint nxt [$];
      bit diff;
      x.push_front(xin);
      void'(x.pop_back());
      lvl.delete();
      accx = 0;
      for (int i = 0; i < taps; i++) begin
        p = sx(w[i] * x[i], acc_w);
        lvl.push_back(p);
        accx = sx(accx + p, acc_w);
      end
      // pairwise adder tree, odd last entry passed up
      while (lvl.size() > 1) begin
        nxt.delete();
        for (int j = 0; j < lvl.size(); j += 2)
          nxt.push_back((j + 1 < lvl.size()) ? add(acc_w, acc_y, lvl[j], lvl[j+1]) : lvl[j]);
        lvl = nxt;
      end
      acc = lvl[0];
      diff = (acc != accx);
      y = sat(acc >>> (cw - 1), dw);
      y_exact = sat(accx >>> (cw - 1), dw);
      e = sat(din - y, dw);
      for (int i = 0; i < taps; i++) begin
        st   = sx((e * x[i]) >>> (dw - 1 + mu), cw);
        w[i] = add(cw, upd_y, w[i], st);
      end
      return diff;
    endfunction
  endclass
endpackage
