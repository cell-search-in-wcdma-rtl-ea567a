// Testbench helpers: stand-in code tables and a received-signal generator.
//
// The CFRS code-word table and the scrambling codes of the real air interface are
// not part of the engine (the table is loaded, the codes come from an external
// generator). The testbenches use pseudo-random stand-ins produced by an integer hash:
// cw_sym(g, n) is symbol n of code word g, scr_neg_i/q(code, idx) are the sign bits
// of chip idx of scrambling code `code`. cell_chip() builds one received chip of a
// cell (PSC + SSC + CPICH, each multiplied by 1+j as on the air) with its frame
// boundary at chip `off`, optionally rotated by a frequency offset.
package cse_tb_pkg;
  import cse_pkg::*;

  function automatic int unsigned mix(input int unsigned a, input int unsigned b);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ (b + 32'h7F4A7C15) * 32'h85EBCA77;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12; h *= 32'h297A2D39; h ^= h >> 15;
    return h;
  endfunction

  function automatic logic [3:0] cw_sym(input int g, input int n);
    return 4'(mix(32'(g) + 1000, 32'(n)) >> 7);
  endfunction

  function automatic logic scr_neg_i(input int code, input int idx);
    return mix(32'(code) + 5000, 32'(idx))[9];
  endfunction
  function automatic logic scr_neg_q(input int code, input int idx);
    return mix(32'(code) + 9000, 32'(idx))[13];
  endfunction

  function automatic real sgn(input logic neg);
    return neg ? -1.0 : 1.0;
  endfunction

  // One chip of the cell's downlink (complex, unquantised).
  // c: chip index; off: frame boundary; slot_len: chips per slot; g, k: group and
  // code in group; a_sch, a_cp: amplitudes of the sync channels and the CPICH;
  // cyc_per_chip: frequency offset in cycles per chip.
  function automatic void cell_chip(input longint c, input int off, input int slot_len,
                                    input int g, input int k, input real a_sch, input real a_cp,
                                    input real cyc_per_chip, output real re, output real im);
    int frame_len, p, n, u, code;
    real ci, cq, r0, i0, ph;
    frame_len = slot_len * FRAME_SLOTS;
    p = int'((c - longint'(off)) % longint'(frame_len));
    if (p < 0) p += frame_len;
    n = p / slot_len;
    u = p % slot_len;
    r0 = 0.0;
    if (u < PSC_LEN) r0 = a_sch * (sgn(psc_neg(u)) + sgn(ssc_neg(int'(cw_sym(g, n)), u)));
    i0 = r0;
    code = g * N_CODES + k;
    ci = sgn(scr_neg_i(code, p));
    cq = sgn(scr_neg_q(code, p));
    r0 += a_cp * (ci - cq);
    i0 += a_cp * (ci + cq);
    ph = 2.0 * 3.14159265358979 * cyc_per_chip * real'(c);
    re = r0 * $cos(ph) - i0 * $sin(ph);
    im = r0 * $sin(ph) + i0 * $cos(ph);
  endfunction

  function automatic sample_t quant(input real v);
    int q;
    q = $rtoi(v + (v >= 0.0 ? 0.5 : -0.5));
    if (q > 7) q = 7;
    if (q < -8) q = -8;
    return sample_t'(q);
  endfunction
endpackage
