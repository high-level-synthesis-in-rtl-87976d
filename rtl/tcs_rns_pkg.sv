// tcs_rns_pkg: constants and constant functions shared by the two's
// complement to residue (TCS/RNS) converter.
//
// The converter splits a W-bit two's complement word X into its sign bit s
// and W-1 value bits, and cuts the value bits into segments of SEG_BITS bits
// starting at the least significant end; the most significant segment is
// shorter when W-1 is not a multiple of SEG_BITS. Each segment, together with
// the sign bit, addresses a small ROM (a "modulo generator") that returns the
// residue modulo m of that segment's share of X. The ROM contents are given
// by rom_entry() below:
//
//   s = 0:  |v * 2^(SEG_BITS*k)|_m
//   s = 1:  |m - |(~v) * 2^(SEG_BITS*k) + [k == 0]|_m|_m
//
// where v is the segment value, k its index (0 = least significant) and ~v
// its complement within the segment width. For s = 1 this works because
// -X = ~X + 1 over the value bits, so the magnitude of a negative word splits
// into the complemented segments plus a single 1 that belongs to segment 0;
// every ROM then adds its part of |M - |X||_m. The segment width of 5 bits
// plus the sign (a 6-bit ROM address) and the 5-bit residues follow the
// document; the split of the +1 into segment 0 is this design's reading of
// its negative-number formula.
package tcs_rns_pkg;

  // Value bits per segment; the ROM address is SEG_BITS + 1 bits wide.
  localparam int unsigned SEG_BITS = 5;
  // Residue width: moduli up to 2^RES_BITS.
  localparam int unsigned RES_BITS = 5;

  // Number of segments that the W-1 value bits of a W-bit word occupy.
  function automatic int unsigned num_segments(input int unsigned w);
    return (w - 1 + SEG_BITS - 1) / SEG_BITS;
  endfunction

  // Width of segment k of a W-bit word (the top one may be shorter).
  function automatic int unsigned segment_width(input int unsigned w,
                                                input int unsigned k);
    int unsigned rest;
    rest = (w - 1) - k * SEG_BITS;
    return (rest < SEG_BITS) ? rest : SEG_BITS;
  endfunction

  // |2^e|_m, computed by repeated doubling so it never overflows.
  function automatic int unsigned pow2_mod(input int unsigned e,
                                           input int unsigned m);
    int unsigned p;
    p = 1 % m;
    for (int unsigned i = 0; i < e; i++) p = (2 * p) % m;
    return p;
  endfunction

  // ROM word for segment k (width sw) of modulus m at address {s, v}.
  function automatic int unsigned rom_entry(input int unsigned m,
                                            input int unsigned k,
                                            input int unsigned sw,
                                            input bit          s,
                                            input int unsigned v);
    int unsigned mask, vv, w2, t;
    mask = (1 << sw) - 1;
    vv   = v & mask;
    w2   = pow2_mod(k * SEG_BITS, m);
    if (!s) begin
      return (vv * w2) % m;
    end
    t = (((mask - vv) * w2) + ((k == 0) ? 1 : 0)) % m;
    return (m - t) % m;
  endfunction

endpackage
