// spell_model_pkg: reference model for the testbenches.
//
// Holds a cost configuration (substitution and deletion costs per reference
// character and column, insertion costs per column, boundary deletion cost,
// transposition cost) and evaluates the band-limited edit-distance
// recurrence the array computes, independently of the RTL: a plain
// dynamic-programming loop over rows i and columns j with |i-j| <= BAND,
// saturating at 255. Also generates costs and words with $urandom.
package spell_model_pkg;
  import spell_pkg::*;

  localparam int NM  = N_DEF;
  localparam int B   = BAND_DEF;
  localparam int INF = 255;
  localparam int NCH = 64;

  // configuration
  int sub_tab [NCH][1:NM];   // sub(x, y_j)
  int del_tab [NCH];         // del(x)
  int ins_tab [1:NM];        // ins(y_j)
  int del0;                  // deletion cost used on the boundary D(i,0)
  int trans_c;
  int yw [1:NM];             // erroneous word, 0 beyond its length
  int n_len;

  typedef int mat_t [0:NM][0:NM];

  function automatic int sat(int a, int b);
    return (a + b > INF) ? INF : a + b;
  endfunction

  function automatic int imin(int a, int b);
    return a < b ? a : b;
  endfunction

  // Row of the processor that delivers the result for a word of length n.
  function automatic int res_row(int n);
    return imin(n + B, NM);
  endfunction

  // Boundary values the host loads into the row-1 / column-1 processors.
  function automatic int bnd_top(int j);   // D(0,j)
    int v = 0;
    for (int l = 1; l <= j; l++) v = sat(v, ins_tab[l]);
    return v;
  endfunction
  function automatic int bnd_left(int i);  // D(i,0)
    return i * del0;
  endfunction

  // Full band matrix for reference x (x[i] for i=1..NM, 0 = padding).
  function automatic void band_matrix(input int x [1:NM], input bit tr, output mat_t d);
    for (int i = 0; i <= NM; i++)
      for (int j = 0; j <= NM; j++) d[i][j] = INF;
    for (int j = 0; j <= B + 1; j++) d[0][j] = bnd_top(j);
    for (int i = 0; i <= B + 1; i++) d[i][0] = bnd_left(i);
    for (int i = 1; i <= NM; i++) begin
      for (int j = 1; j <= NM; j++) begin
        int up, left, v;
        bit hu, hl;
        if (i - j > B || j - i > B) continue;
        hu   = (i > 1) && (j - (i - 1) <= B);
        hl   = (j > 1) && (i - (j - 1) <= B);
        up   = (i == 1) ? d[0][j] : (hu ? d[i-1][j] : INF);
        left = (j == 1) ? d[i][0] : (hl ? d[i][j-1] : INF);
        v = sat(d[i-1][j-1], sub_tab[x[i]][j]);
        v = imin(v, sat(up, del_tab[x[i]]));
        v = imin(v, sat(left, ins_tab[j]));
        if (tr && hu && hl && sub_tab[x[i]][j-1] == 0 && sub_tab[x[i-1]][j] == 0)
          v = imin(v, sat(d[i-2][j-2], trans_c));
        d[i][j] = v;
      end
    end
  endfunction

  function automatic int band_dist(input int x [1:NM], input bit tr);
    mat_t d;
    band_matrix(x, tr, d);
    return d[res_row(n_len)][n_len];
  endfunction

  // Unrestricted (Damerau-)Levenshtein distance of the unpadded strings,
  // used to show that padding and the band give the true distance.
  function automatic int full_dist(input int x [1:NM], int m, input bit tr);
    int d [0:NM][0:NM];
    d[0][0] = 0;
    for (int j = 1; j <= n_len; j++) d[0][j] = d[0][j-1] + ins_tab[j];
    for (int i = 1; i <= m; i++) d[i][0] = d[i-1][0] + del_tab[x[i]];
    for (int i = 1; i <= m; i++)
      for (int j = 1; j <= n_len; j++) begin
        int v;
        v = d[i-1][j-1] + sub_tab[x[i]][j];
        v = imin(v, d[i-1][j] + del_tab[x[i]]);
        v = imin(v, d[i][j-1] + ins_tab[j]);
        if (tr && i > 1 && j > 1 && sub_tab[x[i]][j-1] == 0 && sub_tab[x[i-1]][j] == 0)
          v = imin(v, d[i-2][j-2] + trans_c);
        d[i][j] = v;
      end
    return d[m][n_len];
  endfunction

  // Random costs for erroneous word w of length n over letters 1..26.
  function automatic void make_config(int n, bit unit_costs);
    n_len = n;
    for (int j = 1; j <= NM; j++) yw[j] = (j <= n) ? 1 + int'($urandom_range(25)) : 0;
    del0 = unit_costs ? 1 : 2;
    trans_c = 1;
    for (int j = 1; j <= NM; j++) ins_tab[j] = unit_costs ? 1 : 1 + int'($urandom_range(2));
    for (int x = 0; x < NCH; x++) begin
      del_tab[x] = (x == 0) ? 0 : del0;
      for (int j = 1; j <= NM; j++) begin
        if (x == 0)                  sub_tab[x][j] = 15;   // padding never matches
        else if (yw[j] == 0)         sub_tab[x][j] = 15;   // column beyond the word
        else if (x == yw[j])         sub_tab[x][j] = 0;
        else                         sub_tab[x][j] = unit_costs ? 1 : 1 + int'($urandom_range(3));
      end
    end
  endfunction

  // A reference derived from the erroneous word by one or two random edits;
  // kind 0..4 = copy, substitution, deletion, insertion, transposition.
  function automatic void make_ref(output int x [1:NM], output int m, input int kind);
    int w [0:NM+3];
    int len = n_len;
    for (int k = 0; k <= NM + 3; k++) w[k] = 0;
    for (int k = 1; k <= n_len; k++) w[k] = yw[k];
    case (kind)
      1: w[1 + int'($urandom_range(len - 1))] = 1 + int'($urandom_range(25));
      2: if (len > 1) begin
           int p = 1 + int'($urandom_range(len - 1));
           for (int k = p; k < len; k++) w[k] = w[k+1];
           w[len] = 0; len--;
         end
      3: if (len < NM) begin
           int p = 1 + int'($urandom_range(len));
           for (int k = len + 1; k > p; k--) w[k] = w[k-1];
           w[p] = 1 + int'($urandom_range(25)); len++;
         end
      4: if (len > 1) begin
           int p = 1 + int'($urandom_range(len - 2));
           int t = w[p]; w[p] = w[p+1]; w[p+1] = t;
         end
      default: ;
    endcase
    m = len;
    for (int k = 1; k <= NM; k++) x[k] = (k <= m) ? w[k] : 0;
  endfunction
endpackage
