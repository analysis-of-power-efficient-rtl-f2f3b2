// Reference arithmetic for the adder testbenches, written from the number
// definitions rather than from the gate equations of the design.
//  * dim1_add: diminished-1 modulo 2^n+1 addition. A value X in [0, 2^n] is
//    (x_z, X*) with x_z = (X == 0) and X* = X - 1 (0 when X == 0).
//  * mod2nm1_add: modulo 2^n-1 addition as an end-around-carry adder gives
//    it: A + B if that is below 2^n, else A + B + 1 - 2^n (so 2^n-1 may
//    appear as a second form of zero).
//  * ieac_carry: carry out of bit k of A + B + cin with the inverted
//    end-around carry cin = (A + B < 2^n).
package modadd_ref_pkg;

  function automatic longint unsigned mask(int n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 1);
  endfunction

  function automatic void dim1_add(input int n, input bit az, input longint unsigned a,
                                   input bit bz, input longint unsigned b,
                                   output bit sz, output longint unsigned s);
    longint unsigned va, vb, vs;
    va = az ? 0 : a + 1;
    vb = bz ? 0 : b + 1;
    vs = (va + vb) % ((64'd1 << n) + 1);
    sz = (vs == 0);
    s  = sz ? 0 : vs - 1;
  endfunction

  function automatic longint unsigned mod2nm1_add(int n, longint unsigned a, longint unsigned b);
    longint unsigned t;
    t = a + b;
    if (t >= (64'd1 << n)) t = t + 1 - (64'd1 << n);
    return t;
  endfunction

  function automatic bit ieac_carry(int n, int k, longint unsigned a, longint unsigned b);
    longint unsigned cin, lo;
    cin = ((a + b) < (64'd1 << n)) ? 1 : 0;
    lo  = (a & mask(k+1)) + (b & mask(k+1)) + cin;
    return lo[k+1];
  endfunction

endpackage
