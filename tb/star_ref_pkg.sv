// star_ref_pkg: reference arithmetic for the STAR-MAC testbenches.
//
// Computes expected results straight from the arithmetic definitions of
// the operations (plain 64-bit integer products of sign- or zero-extended
// sub-words), without the sub-adder layout or routing of the design, so the
// testbenches check the design against an independent model.
package star_ref_pkg;

  // Sub-word of width w at index k of a 32-bit register, as a signed value.
  function automatic longint sw(input logic [31:0] x, input int w, input int k);
    logic [31:0] f;
    f = (x >> (w * k)) & ((32'd1 << w) - 32'd1);
    if (f[w-1]) return longint'(f) - (longint'(1) << w);
    return longint'(f);
  endfunction

  // Dot product of the sub-words of a 16-bit half (w = 16, 8, 4), the
  // sub-words of b taken in reverse order for the sum-together modes.
  function automatic longint st_dot(input logic [15:0] a, input logic [15:0] b, input int w);
    longint acc = 0;
    int n = 16 / w;
    for (int k = 0; k < n; k++) acc += sw({16'd0, a}, w, k) * sw({16'd0, b}, w, n - 1 - k);
    return acc;
  endfunction

  // RV32M multiply: op 0 MUL, 1 MULH, 2 MULHSU, 3 MULHU.
  function automatic logic [31:0] rv_mul(input int op, input logic [31:0] a, input logic [31:0] b);
    logic signed [65:0] x, y, p;
    x = (op == 1 || op == 2) ? 66'(signed'(a)) : 66'({34'd0, a});
    y = (op == 1)            ? 66'(signed'(b)) : 66'({34'd0, b});
    p = x * y;
    return (op == 0) ? p[31:0] : p[63:32];
  endfunction

  // Sign-extend the low w bits of v to 32 bits.
  function automatic logic [31:0] sext(input longint v, input int w);
    longint m;
    m = v & ((longint'(1) <<< w) - 1);
    if ((m >>> (w - 1)) & 1) m = m - (longint'(1) <<< w);
    return m[31:0];
  endfunction

endpackage
