// imac_ref_pkg: reference model of the iterative MAC for the testbenches.
//
// ref_mul works out, with plain integer arithmetic, what one operation of
// the iterative MAC must produce: the operands are split into bytes (the
// top byte signed, the others unsigned), the byte pairs are visited by
// falling significance and, inside a level, falling A index, and the
// stopping rule of the mode and policy is applied after each partial
// product. It returns the scaled sum of the partial products used and
// how many there were.
package imac_ref_pkg;

  function automatic longint byte_val(longint raw, int idx, int top);
    longint bv;
    bv = (raw >> (8 * idx)) & 64'hff;
    if (idx == top && bv >= 128) bv -= 256;
    return bv;
  endfunction

  // Signed value of the low nbytes bytes of raw.
  function automatic longint sval(longint raw, int nbytes);
    longint v;
    v = 0;
    for (int i = 0; i < nbytes; i++) v += byte_val(raw, i, nbytes - 1) <<< (8 * i);
    return v;
  endfunction

  // mode: 0 single, 1 threshold, 2 full. policy: 0 each, 1 first only.
  function automatic void ref_mul(input longint a, input longint b,
                                  input int na, input int nb,
                                  input int mode, input int policy,
                                  input longint thr,
                                  output longint prod, output int iters);
    longint pp, mag;
    prod  = 0;
    iters = 0;
    for (int lvl = na + nb - 2; lvl >= 0; lvl--) begin
      for (int ia = na - 1; ia >= 0; ia--) begin
        int ib;
        ib = lvl - ia;
        if (ib >= 0 && ib < nb) begin
          pp    = byte_val(a, ia, na - 1) * byte_val(b, ib, nb - 1);
          prod += pp <<< (8 * lvl);
          iters++;
          mag = (pp < 0) ? -pp : pp;
          if (mode == 0) return;
          if (mode == 1 && mag >= thr && (policy == 0 || iters == 1)) return;
        end
      end
    end
  endfunction

endpackage
