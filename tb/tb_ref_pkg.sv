// tb_ref_pkg: reference arithmetic for the testbenches, written with plain
// 64-bit integers and independent of the RTL. Formats: feature <16,16> (32 bits),
// kernel <3,16> (19 bits), BN constant <6,16> (22 bits); products are shifted right
// by 16 (floor) and saturated to 32 bits.
package tb_ref_pkg;

  function automatic longint sat32(input longint v);
    if (v > 64'sd2147483647)  return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  // floor division by 2^16 of a signed value
  function automatic longint shr16(input longint v);
    return v >>> 16;
  endfunction

  function automatic longint ref_bn(input longint m, input longint b1, input longint b2);
    return sat32(shr16(b1 * m) + b2);
  endfunction

  function automatic longint ref_lrelu(input longint z);
    if (z < 0) return sat32(shr16(z * 655));
    return z;
  endfunction

  // random signed value in [-mag, mag]
  function automatic longint rnd_signed(input longint mag);
    longint u;
    u = longint'($urandom) % (2 * mag + 1);
    return u - mag;
  endfunction

endpackage
