// Reference arithmetic for the Curve448 testbenches.
//
// Plain, non-hardware models built on SystemVerilog wide arithmetic and the
// % operator: field operations modulo p = 2^448 - 2^224 - 1, Fermat
// inversion, and the X448 Montgomery ladder with conditional swaps
// (affine u-coordinate in, affine u-coordinate out). Also a helper that
// draws random field elements from $urandom.
package c448_ref_pkg;
  localparam logic [447:0] P = (448'd1 << 448) - (448'd1 << 224) - 448'd1;

  function automatic logic [447:0] fadd(input logic [447:0] a, input logic [447:0] b);
    logic [448:0] s;
    s = {1'b0, a} + {1'b0, b};
    return 448'(s % {1'b0, P});
  endfunction

  function automatic logic [447:0] fsub(input logic [447:0] a, input logic [447:0] b);
    logic [448:0] s;
    s = {1'b0, a} + {1'b0, P} - {1'b0, b};
    return 448'(s % {1'b0, P});
  endfunction

  function automatic logic [447:0] fmul(input logic [447:0] a, input logic [447:0] b);
    logic [895:0] t;
    t = 896'(a) * 896'(b);
    return 448'(t % 896'(P));
  endfunction

  function automatic logic [447:0] finv(input logic [447:0] z);
    logic [447:0] r, e;
    r = 448'd1;
    e = P - 448'd2;
    for (int i = 447; i >= 0; i--) begin
      r = fmul(r, r);
      if (e[i]) r = fmul(r, z);
    end
    return r;
  endfunction

  // X448 ladder over the lowest nbits bits of k, most significant first
  function automatic logic [447:0] x448(input logic [447:0] k, input logic [447:0] u,
                                        input int nbits);
    logic [447:0] x2, z2, x3, z3, a, aa, b, bb, e, c, d, da, cb, t;
    logic swap, kt;
    x2 = 448'd1; z2 = '0; x3 = u; z3 = 448'd1; swap = 1'b0;
    for (int i = nbits - 1; i >= 0; i--) begin
      kt = k[i];
      swap ^= kt;
      if (swap) begin t = x2; x2 = x3; x3 = t; t = z2; z2 = z3; z3 = t; end
      swap = kt;
      a  = fadd(x2, z2); aa = fmul(a, a);
      b  = fsub(x2, z2); bb = fmul(b, b);
      e  = fsub(aa, bb);
      c  = fadd(x3, z3); d  = fsub(x3, z3);
      da = fmul(d, a);   cb = fmul(c, b);
      x3 = fmul(fadd(da, cb), fadd(da, cb));
      z3 = fmul(u, fmul(fsub(da, cb), fsub(da, cb)));
      x2 = fmul(aa, bb);
      z2 = fmul(e, fadd(aa, fmul(448'd39081, e)));
    end
    if (swap) begin t = x2; x2 = x3; x3 = t; t = z2; z2 = z3; z3 = t; end
    return fmul(x2, finv(z2));
  endfunction

  function automatic logic [447:0] rand448();
    logic [447:0] v;
    for (int i = 0; i < 14; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [447:0] randfe();
    logic [447:0] v;
    v = rand448();
    if (v >= P) v = v - P;
    return v;
  endfunction
endpackage
