// bp3d_edc_pkg -- layout rules shared by the write path, the read path and the
// parity logic of the 3D bit-partitioned SRAM with 2D bit-interleaving.
//
// The rows of all K dies, concatenated from die 0 (bottom) to die K-1 (top),
// form one "long line" that is laid out exactly like a conventional N-way
// interleaved row:
//   * bit b of word w (w = 0..N-1) sits at line position b*N + w,
//   * after the L = N*W data positions follow the parity bits, parity set s of
//     word w at position L + s*N + w.
// The long line is cut into K equal slices of (L + S*N)/K bits; slice d is the
// row of die d. With one parity set (S = 1) every parity bit ends up in the top
// die, as the layout of the proposed scheme requires.
//
// With S > 1 parity sets (the "enhanced" option), set s covers the bits of a
// word that are stored in dies d with d mod S == s. Placing those extra parity
// bits at the end of the line is a choice of this design.
package bp3d_edc_pkg;

  // Line position of bit `b` of interleaved word `w` for N-way interleaving.
  function automatic int unsigned data_pos(int unsigned b, int unsigned w, int unsigned n);
    return b * n + w;
  endfunction

  // Line position of parity bit of set `s` for word `w`.
  function automatic int unsigned parity_pos(int unsigned s, int unsigned w,
                                             int unsigned l, int unsigned n);
    return l + s * n + w;
  endfunction

  // Die that holds line position `p` when each die stores `die_bits` cells.
  function automatic int unsigned die_of(int unsigned p, int unsigned die_bits);
    return p / die_bits;
  endfunction

  // True when bit `b` of word `w` is covered by parity set `s`.
  function automatic bit in_set(int unsigned b, int unsigned w, int unsigned s,
                                int unsigned n, int unsigned die_bits, int unsigned sets);
    return ((data_pos(b, w, n) / die_bits) % sets) == s;
  endfunction

endpackage
