// dmc_ref_pkg: behavioural reference model of the 32-bit Decimal Matrix Code,
// used by the testbenches to work out expected values independently of the RTL.
//
// The model builds the 2 x 4 symbol matrix explicitly (sym[row][col], symbol
// s = data[4s+3:4s] at row s/4, column s%4), forms each horizontal check value as
// an integer sum of the symbols in columns k and k+2 of a row, each vertical value
// as the bitwise difference of the two symbols of a column, and decodes by the
// rule: a symbol is in error when its horizontal sum and its column parity both
// disagree, and is then corrected by flipping the bits its column parity
// reports.
package dmc_ref_pkg;

  typedef int unsigned mat_t [2][4];

  function automatic mat_t to_mat(logic [31:0] d);
    mat_t m;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = (d >> (16 * r + 4 * c)) & 32'hF;
    return m;
  endfunction

  function automatic logic [19:0] ref_hcb(logic [31:0] d);
    mat_t m = to_mat(d);
    logic [19:0] h = '0;
    for (int r = 0; r < 2; r++)
      for (int k = 0; k < 2; k++) begin
        int unsigned sum = m[r][k] + m[r][k + 2];
        h = h | (20'(sum) << (5 * (2 * r + k)));
      end
    return h;
  endfunction

  function automatic logic [15:0] ref_vcb(logic [31:0] d);
    mat_t m = to_mat(d);
    logic [15:0] v = '0;
    for (int c = 0; c < 4; c++)
      for (int b = 0; b < 4; b++)
        v[4 * c + b] = (((m[0][c] >> b) & 1) != ((m[1][c] >> b) & 1));
    return v;
  endfunction

  // Error-location bits from the two syndromes.
  function automatic logic [7:0] ref_loc(logic [19:0] hsyn, logic [15:0] vsyn);
    logic [7:0] loc;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++) begin
        int unsigned g = 2 * r + (c % 2);
        bit h_bad = ((hsyn >> (5 * g)) & 20'h1F) != 0;
        bit v_bad = ((vsyn >> (4 * c)) & 16'hF) != 0;
        loc[4 * r + c] = h_bad && v_bad;
      end
    return loc;
  endfunction

  // Corrected data for a word read as {d, h, v}; loc returns the marked symbols.
  function automatic logic [31:0] ref_decode(logic [31:0] d, logic [19:0] h,
                                             logic [15:0] v, output logic [7:0] loc);
    logic [19:0] hs = ref_hcb(d) ^ h;
    logic [15:0] vs = ref_vcb(d) ^ v;
    logic [31:0] o = d;
    loc = ref_loc(hs, vs);
    for (int s = 0; s < 8; s++)
      if (loc[s])
        for (int b = 0; b < 4; b++)
          o[4 * s + b] = d[4 * s + b] ^ vs[4 * (s % 4) + b];
    return o;
  endfunction

endpackage
