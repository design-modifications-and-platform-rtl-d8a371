// g729_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL: saturation is done by clamping wide integer
// results, and the G.729 frame unpacking and parity check are computed
// directly from bit arrays.
package g729_ref_pkg;

  typedef struct {
    longint val;
    bit     ovf;
  } ref_t;

  function automatic ref_t clamp(longint x, int bits);
    ref_t r;
    longint hi, lo;
    hi = (longint'(1) <<< (bits - 1)) - 1;
    lo = -(longint'(1) <<< (bits - 1));
    r.ovf = (x > hi) || (x < lo);
    r.val = (x > hi) ? hi : (x < lo) ? lo : x;
    return r;
  endfunction

  function automatic longint s16(logic [15:0] v); return longint'(signed'(v)); endfunction
  function automatic longint s32(logic [31:0] v); return longint'(signed'(v)); endfunction

  function automatic ref_t r_shl(longint v, longint n);
    ref_t r;
    if (n < 0) begin
      r.ovf = 0;
      r.val = (-n >= 15) ? ((v < 0) ? -1 : 0) : (v >>> -n);
      return r;
    end
    if (n > 20) n = 20;
    return clamp(v * (longint'(1) <<< n), 16);
  endfunction

  function automatic ref_t r_shr(longint v, longint n);
    if (n < 0) return r_shl(v, -n);
    return r_shl(v, -n);
  endfunction

  function automatic ref_t r_l_shl(longint v, longint n);
    ref_t r;
    if (n <= 0) begin
      r.ovf = 0;
      r.val = (-n >= 31) ? ((v < 0) ? -1 : 0) : (v >>> -n);
      return r;
    end
    if (n > 32) n = 32;
    return clamp(v * (longint'(1) <<< n), 32);
  endfunction

  function automatic ref_t r_l_shr(longint v, longint n);
    if (n < 0) return r_l_shl(v, -n);
    return r_l_shl(v, -n);
  endfunction

  function automatic longint r_norm(longint v, int bits);
    longint n, lim;
    if (v == 0) return 0;
    if (v == -1) return bits - 1;
    if (v < 0) v = -v - 1;
    lim = longint'(1) <<< (bits - 2);
    n = 0;
    while (v < lim) begin v = v * 2; n++; end
    return n;
  endfunction

  function automatic longint r_mult(longint a, longint b);
    ref_t r;
    r = clamp((a * b) >>> 15, 16);
    return r.val;
  endfunction

  function automatic longint r_lmult(longint a, longint b);
    ref_t r;
    r = clamp(2 * a * b, 32);
    return r.val;
  endfunction

  function automatic longint r_lmac(longint acc, longint a, longint b);
    ref_t r;
    r = clamp(acc + r_lmult(a, b), 32);
    return r.val;
  endfunction

  // Field widths of the 11 frame parameters (80 bits).
  function automatic int field_bits(int i);
    int w[11] = '{8, 10, 8, 1, 13, 4, 7, 5, 13, 4, 7};
    return w[i];
  endfunction

  // Parameter i of a frame given as 80 bits, first received bit = MSB.
  function automatic int field_value(bit b[80], int i);
    int pos, v;
    pos = 0;
    for (int k = 0; k < i; k++) pos += field_bits(k);
    v = 0;
    for (int k = 0; k < field_bits(i); k++) v = v * 2 + b[pos + k];
    return v;
  endfunction

  // Parity check flag: 1 when the parity of index bits 7..2 plus the
  // transmitted parity bit is even, i.e. the check failed.
  function automatic int parity_flag(int pitch_index, int parity);
    int ones;
    ones = 0;
    for (int k = 2; k <= 7; k++) ones += (pitch_index >> k) & 1;
    return (1 + ones + parity) & 1;
  endfunction

  // The serial word of one bit, sign-extended to 32 bits.
  function automatic logic [31:0] bit_word(bit b);
    return b ? 32'h0000_0081 : 32'h0000_007F;
  endfunction

endpackage
