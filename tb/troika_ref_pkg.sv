// troika_ref_pkg: behavioural reference model of the Troika permutation used
// by the testbenches. It works on plain integers 0..2, one per trit, with
// the state indexed s*27 + r*9 + c, and implements every step literally
// from its definition (S-box built from F, pi and rho; ShiftRows, ShiftLanes,
// AddColumnParity, AddRoundConstant as whole-state maps). It shares no
// code with the RTL; its constants (ShiftRows amounts, ShiftLanes table,
// round-constant LFSR) are restated here on purpose.
package troika_ref_pkg;

  typedef int unsigned trits_t [729];
  typedef int unsigned tryte_t [3];

  localparam int unsigned REF_SR [3] = '{0, 1, 2};
  localparam int unsigned REF_SL [27] = '{
    19, 13, 21, 10, 24, 15, 2, 9, 3,
    14, 0, 6, 5, 1, 25, 22, 23, 20,
    7, 17, 26, 12, 8, 18, 16, 11, 4 };

  function automatic tryte_t f_fn(tryte_t x);
    tryte_t y;
    y[0] = x[0]; y[1] = x[1]; y[2] = (x[0] * x[1] + x[2]) % 3;
    return y;
  endfunction
  function automatic tryte_t pi_fn(tryte_t x);
    tryte_t y;
    y[0] = x[1]; y[1] = x[2]; y[2] = x[0];
    return y;
  endfunction
  function automatic tryte_t rho_fn(tryte_t x);
    tryte_t y;
    y[0] = x[2]; y[1] = x[1]; y[2] = x[0];
    return y;
  endfunction

  function automatic tryte_t ref_sbox(tryte_t x);
    tryte_t t;
    t = x;
    t[0] = (t[0] + 2) % 3;
    return rho_fn(f_fn(pi_fn(f_fn(pi_fn(f_fn(t))))));
  endfunction

  // round-constant trits: 11-stage LFSR, all ones at the start,
  // s[10]' = s[2] - s[0], constant = s[0]; one step per column.
  function automatic void ref_rc(ref int unsigned rc [24*243]);
    int unsigned s [11];
    int unsigned nw;
    foreach (s[i]) s[i] = 1;
    for (int n = 0; n < 24*243; n++) begin
      rc[n] = s[0];
      nw = (s[2] + 3 - s[0]) % 3;
      for (int i = 0; i < 10; i++) s[i] = s[i+1];
      s[10] = nw;
    end
  endfunction

  function automatic void ref_round(ref trits_t st, input int round,
                                    ref int unsigned rc [24*243]);
    trits_t t;
    int unsigned par [243];
    tryte_t x, y;
    // SubTrytes
    for (int k = 0; k < 243; k++) begin
      x[0] = st[3*k]; x[1] = st[3*k+1]; x[2] = st[3*k+2];
      y = ref_sbox(x);
      st[3*k] = y[0]; st[3*k+1] = y[1]; st[3*k+2] = y[2];
    end
    // ShiftRows
    for (int s = 0; s < 27; s++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 9; c++)
          t[s*27 + r*9 + (c + 3*REF_SR[r]) % 9] = st[s*27 + r*9 + c];
    st = t;
    // ShiftLanes
    for (int s = 0; s < 27; s++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 9; c++)
          t[((s + REF_SL[r*9 + c]) % 27)*27 + r*9 + c] = st[s*27 + r*9 + c];
    st = t;
    // AddColumnParity
    for (int s = 0; s < 27; s++)
      for (int c = 0; c < 9; c++)
        par[s*9 + c] = (st[s*27 + c] + st[s*27 + 9 + c] + st[s*27 + 18 + c]) % 3;
    for (int s = 0; s < 27; s++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 9; c++)
          t[s*27 + r*9 + c] = (st[s*27 + r*9 + c] + par[s*9 + (c + 8) % 9]
                               + par[((s + 1) % 27)*9 + (c + 1) % 9]) % 3;
    st = t;
    // AddRoundConstant (row 0 of every slice)
    for (int s = 0; s < 27; s++)
      for (int c = 0; c < 9; c++)
        st[s*27 + c] = (st[s*27 + c] + rc[round*243 + s*9 + c]) % 3;
  endfunction

  function automatic void ref_permute(ref trits_t st, input int rounds);
    int unsigned rc [24*243];
    ref_rc(rc);
    for (int r = 0; r < rounds; r++) ref_round(st, r, rc);
  endfunction

endpackage
