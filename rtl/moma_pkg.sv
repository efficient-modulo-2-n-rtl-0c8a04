// moma_pkg: elaboration-time arithmetic shared by the modulo 2^n+1 multi-operand
// adder (MOMA) blocks.
//
// A weighted MOMA(k, 2^n+1) pairs its k operands into ceil(k/2) translators, reduces
// the 2*ceil(k/2) translated vectors plus one constant correction vector COR in an
// inverted end-around-carry (EAC) carry-save Dadda tree, and finishes in a
// diminished-1 adder. The functions below give the sizes of that structure:
//   * num_pairs(k)        ceil(k/2), the number of translators (odd k: last operand
//                         is paired with zero, as the architecture prescribes);
//   * cor_value(k, n)     COR = |-ceil(k/2)|_{2^n+1} as an n-bit vector;
//   * dadda_height(j)     the Dadda height sequence 2, 3, 4, 6, 9, 13, ...;
//   * tree_stages(h)      number of carry-save levels needed to take h rows to 2;
//   * stage_rows(h, s)    number of rows entering level s of that tree.
// Because the inverted EAC makes every bit column of the tree equally tall, the
// Dadda reduction works on whole n-bit rows: a level going from h rows to the
// next smaller Dadda height d uses h-d carry-save adders.
package moma_pkg;

  function automatic int num_pairs(input int k);
    return (k + 1) / 2;
  endfunction

  // d_0 = 2, d_{j+1} = floor(3*d_j/2)
  function automatic int dadda_height(input int j);
    int d;
    d = 2;
    for (int i = 0; i < j; i++) d = (3 * d) / 2;
    return d;
  endfunction

  // Largest Dadda height strictly below h (h >= 3).
  function automatic int dadda_below(input int h);
    int j;
    j = 0;
    while (dadda_height(j + 1) < h) j++;
    return dadda_height(j);
  endfunction

  function automatic int tree_stages(input int h);
    int s, r;
    s = 0;
    r = h;
    while (r > 2) begin
      r = dadda_below(r);
      s++;
    end
    return s;
  endfunction

  // Rows entering level s (s = 0 is the tree input, s = tree_stages(h) is the output).
  function automatic int stage_rows(input int h, input int s);
    int r;
    r = h;
    for (int i = 0; i < s; i++) if (r > 2) r = dadda_below(r);
    return r;
  endfunction

  // COR = |-ceil(k/2)|_{2^n+1}; valid as an n-bit vector unless ceil(k/2) = 1 mod 2^n+1.
  function automatic longint unsigned cor_value(input int k, input int n);
    longint unsigned m, r;
    m = (longint'(1) << n) + 1;
    r = longint'(num_pairs(k)) % m;
    return (r == 0) ? 0 : m - r;
  endfunction

endpackage
