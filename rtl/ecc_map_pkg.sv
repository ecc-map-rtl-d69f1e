// ecc_map_pkg: constants and elaboration-time functions shared by the
// ECC-Map wear-levelling blocks.
//
// prim_poly() returns a primitive polynomial of degree m (the x^m term is
// implied, bit j of the result is the coefficient of x^j). The same
// polynomial serves twice: as the generator of the binary cyclic code whose
// encoder implements the mapping functions (a primitive BCH code with
// redundancy r = m, i.e. a cyclic Hamming code of length 2^m-1), and as the
// feedback polynomial of the maximal-length m-bit index-randomisation LFSR.
// The choice of these particular polynomials is this design's own; any
// primitive polynomial of degree m would do.
//
// phi_opt() computes the remapping trigger threshold phi = alpha*w_max with
//   alpha = 1 - N/(S*w_max)   when N/w_max < S/3
//   alpha = 2/3               otherwise
// optionally capped at cap_pct percent of w_max (100 = no cap; the
// evaluation also studies a cap of 80 %). Integer arithmetic rounds down.
package ecc_map_pkg;

  function automatic int unsigned prim_poly(input int unsigned m);
    case (m)
      3:       return 'h3;     // x^3+x+1
      4:       return 'h3;     // x^4+x+1
      5:       return 'h5;     // x^5+x^2+1
      6:       return 'h3;     // x^6+x+1
      7:       return 'h3;     // x^7+x+1
      8:       return 'h1D;    // x^8+x^4+x^3+x^2+1
      9:       return 'h11;    // x^9+x^4+1
      10:      return 'h9;     // x^10+x^3+1
      11:      return 'h5;     // x^11+x^2+1
      12:      return 'h53;    // x^12+x^6+x^4+x+1
      13:      return 'h1B;    // x^13+x^4+x^3+x+1
      14:      return 'h443;   // x^14+x^10+x^6+x+1
      15:      return 'h3;     // x^15+x+1
      16:      return 'h100B;  // x^16+x^12+x^3+x+1
      default: return 'h3;
    endcase
  endfunction

  // Threshold phi (in physical writes) from N, S and w_max, see header.
  function automatic int unsigned phi_opt(input int unsigned n_pla,
                                          input int unsigned s_win,
                                          input int unsigned w_max,
                                          input int unsigned cap_pct);
    longint unsigned phi, cap;
    if (3 * longint'(n_pla) < longint'(s_win) * longint'(w_max))
      phi = longint'(w_max) - (longint'(n_pla) + longint'(s_win) - 1) / longint'(s_win);
    else
      phi = (2 * longint'(w_max)) / 3;
    cap = (longint'(w_max) * longint'(cap_pct)) / 100;
    if (phi > cap) phi = cap;
    return int'(phi);
  endfunction

endpackage
