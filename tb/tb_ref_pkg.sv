// tb_ref_pkg: reference values for the testbenches, written independently
// of the RTL: the 6-bit S-box as a lookup table, the two representative
// coordinate functions in their algebraic normal form, and the linearity
// and differential uniformity of a 6-bit permutation computed by brute
// force. Bit x_i of a 6-bit value v is bit (5 - i) of v.
package tb_ref_pkg;

  localparam int unsigned SBOX_TABLE [64] = '{
    'h00, 'h01, 'h02, 'h03, 'h04, 'h06, 'h3e, 'h3c, 'h08, 'h11, 'h0e, 'h17, 'h2b, 'h33, 'h35, 'h2d,
    'h19, 'h1c, 'h09, 'h0c, 'h15, 'h13, 'h3d, 'h3b, 'h31, 'h2c, 'h25, 'h38, 'h3a, 'h26, 'h36, 'h2a,
    'h34, 'h1d, 'h37, 'h1e, 'h30, 'h1a, 'h0b, 'h21, 'h2e, 'h1f, 'h29, 'h18, 'h0f, 'h3f, 'h10, 'h20,
    'h28, 'h05, 'h39, 'h14, 'h24, 'h0a, 'h0d, 'h23, 'h12, 'h27, 'h07, 'h32, 'h1b, 'h2f, 'h16, 'h22
  };

  function automatic bit xb(input int unsigned v, input int unsigned i);
    return bit'((v >> (5 - i)) & 1);
  endfunction

  // f0 = x0x4 + x1x5 + x2x5 + x3x4 + x0 + x1 (over GF(2))
  function automatic bit f0_ref(input int unsigned v);
    return (xb(v,0) & xb(v,4)) ^ (xb(v,1) & xb(v,5)) ^ (xb(v,2) & xb(v,5)) ^
           (xb(v,3) & xb(v,4)) ^ xb(v,0) ^ xb(v,1);
  endfunction

  // f1 = x0x1x4 + x0x1x5 + x0x1 + x0x5 + x1x4 + x2x3 (over GF(2))
  function automatic bit f1_ref(input int unsigned v);
    return (xb(v,0) & xb(v,1) & xb(v,4)) ^ (xb(v,0) & xb(v,1) & xb(v,5)) ^
           (xb(v,0) & xb(v,1)) ^ (xb(v,0) & xb(v,5)) ^ (xb(v,1) & xb(v,4)) ^
           (xb(v,2) & xb(v,3));
  endfunction

  function automatic int unsigned parity6(input int unsigned v);
    return $countones(v & 'h3f) & 1;
  endfunction

  // max over a, b != 0 of |#{<a,x> = <b,S(x)>} - #{<a,x> != <b,S(x)>}|
  function automatic int linearity(input int unsigned s [64]);
    int best = 0;
    for (int unsigned a = 0; a < 64; a++) begin
      for (int unsigned b = 1; b < 64; b++) begin
        int c = 0;
        for (int unsigned x = 0; x < 64; x++)
          c += (parity6(a & x) == parity6(b & s[x])) ? 1 : -1;
        if (c < 0) c = -c;
        if (c > int'(best)) best = c;
      end
    end
    return best;
  endfunction

  // max over a != 0, b of #{x : S(x) ^ S(x ^ a) = b}
  function automatic int unsigned uniformity(input int unsigned s [64]);
    int unsigned best = 0;
    for (int unsigned a = 1; a < 64; a++) begin
      int unsigned cnt [64];
      foreach (cnt[k]) cnt[k] = 0;
      for (int unsigned x = 0; x < 64; x++) cnt[s[x] ^ s[x ^ a]]++;
      foreach (cnt[k]) if (cnt[k] > best) best = cnt[k];
    end
    return best;
  endfunction

endpackage
