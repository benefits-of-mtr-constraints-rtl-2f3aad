// tb_ldpc_pkg: reference model of the triple-system LDPC code for the
// testbenches. build(n) lists the n(6n+1) columns of H from Skolem's
// construction with plain nested loops, brings H to reduced row-echelon form
// over GF(2), and codeword() then draws a random codeword: the non-pivot
// bits are random and each pivot bit is solved from its row. This also serves
// as the behavioural LDPC encoder of the system testbench.
package tb_ldpc_pkg;
  localparam int NMAX = 4732;
  localparam int MMAX = 169;
  typedef bit [NMAX-1:0] row_t;

  int   n_bits, n_chk, rank;
  int   col_chk [NMAX][3];
  row_t h     [MMAX];
  int   piv   [MMAX];

  function automatic void build(int n);
    int m2 = 2 * n, j = 0;
    n_chk  = 6 * n + 1;
    n_bits = n * n_chk;
    for (int x = 0; x < n; x++) begin
      col_chk[j] = '{x, m2 + x, 2 * m2 + x}; j++;
    end
    for (int x = 0; x < n; x++)
      for (int i = 0; i < 3; i++) begin
        col_chk[j] = '{6 * n, i * m2 + x + n, ((i + 1) % 3) * m2 + x}; j++;
      end
    for (int x = 0; x < m2; x++)
      for (int y = x + 1; y < m2; y++)
        for (int i = 0; i < 3; i++) begin
          int s = (x + y) % m2;
          int o = (s % 2 == 0) ? s / 2 : (s - 1) / 2 + n;
          col_chk[j] = '{i * m2 + x, i * m2 + y, ((i + 1) % 3) * m2 + o}; j++;
        end
    for (int r = 0; r < MMAX; r++) h[r] = '0;
    for (int c = 0; c < n_bits; c++)
      for (int e = 0; e < 3; e++) h[col_chk[c][e]][c] = 1'b1;
    // reduced row-echelon form
    rank = 0;
    for (int c = 0; c < n_bits && rank < n_chk; c++) begin
      int r = -1;
      for (int k = rank; k < n_chk; k++) if (h[k][c]) begin r = k; break; end
      if (r >= 0) begin
        row_t t = h[r]; h[r] = h[rank]; h[rank] = t;
        for (int k = 0; k < n_chk; k++) if (k != rank && h[k][c]) h[k] ^= h[rank];
        piv[rank] = c;
        rank++;
      end
    end
  endfunction

  function automatic row_t codeword();
    row_t c = '0;
    bit   is_piv [NMAX];
    for (int r = 0; r < rank; r++) is_piv[piv[r]] = 1'b1;
    for (int k = 0; k < n_bits; k++) if (!is_piv[k]) c[k] = 1'($urandom);
    for (int r = 0; r < rank; r++) c[piv[r]] = ^(h[r] & c);
    return c;
  endfunction

  function automatic bit is_codeword(row_t c);
    for (int r = 0; r < n_chk; r++) if (^(h[r] & c)) return 1'b0;
    return 1'b1;
  endfunction
endpackage
