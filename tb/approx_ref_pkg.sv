// approx_ref_pkg: reference models of the approximate adder cells, for the
// testbenches only.
//
// The cells are written here as Boolean expressions taken row by row from
// their truth tables (not as the 8-bit lookup constants the RTL uses), so a
// mistake in either shows up as a mismatch. approx_add_ref models an N-bit
// ripple-carry adder with approximate cells in its Y low-order positions.
package approx_ref_pkg;
  import approx_pkg::*;

  // Returns {cout, sum}.
  function automatic logic [1:0] fa_ref(fa_mode_e m, logic a, logic b, logic c);
    logic s, co;
    case (m)
      FA_ACCURATE: begin s = a ^ b ^ c;            co = (a & b) | (c & (a ^ b)); end
      // approx 1: sum is 1 only for 001 and 111; cout 1 for 010,011,101,110,111
      FA_APPROX1:  begin s = (!a & !b & c) | (a & b & c);
                         co = (b & !c & !a) | (a & c) | (b & c) | (a & b); end
      // approx 2: exact carry, sum = not carry
      FA_APPROX2:  begin co = (a & b) | (c & (a ^ b)); s = !co; end
      // approx 3: approx-1 carry, sum = not carry
      FA_APPROX3:  begin co = (b & !c & !a) | (a & c) | (b & c) | (a & b); s = !co; end
      // approx 4: cout = a; sum 1 for 001, 011, 111
      FA_APPROX4:  begin co = a; s = (!a & c) | (a & b & c); end
      default:     begin co = a; s = b; end
    endcase
    return {co, s};
  endfunction

  function automatic logic [64:0] approx_add_ref(int n, int y, fa_mode_e m,
                                                 logic [63:0] a, logic [63:0] b,
                                                 logic cin);
    logic [64:0] r;
    logic c;
    logic [1:0] o;
    r = '0;
    c = cin;
    for (int i = 0; i < n; i++) begin
      o = fa_ref((i < y) ? m : FA_ACCURATE, a[i], b[i], c);
      r[i] = o[0];
      c = o[1];
    end
    r[n] = c;
    return r;
  endfunction
endpackage
