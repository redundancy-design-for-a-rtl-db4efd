// hex_model_pkg: reference model and input schedule for the TMR hexagonal
// band matrix-matrix array, used by its testbenches.
//
// A testbench calls setup(), fills A, B, C0 (n x n, A banded with ROWS
// diagonals i-k in [-OX, ROWS-1-OX], B banded with COLS diagonals j-k in
// [-OY, COLS-1-OY]) and then asks, clock by clock, what each boundary input
// carries (a_val, b_val, cbot_val, cright_val) and when and where each result
// c_ij leaves the array (exit_of). The expected results come from golden(),
// a plain triple loop that does not use the schedule.
//
// Schedule: the original computation (i,j,k) runs in PE(x,y), x = i-k+OX,
// y = j-k+OY, at clock edge tau = i+j+k+T0 with T0 = OX+OY (mod 3); copy r
// (r = 1, 2) runs at the same edge in PE(x,y+r). Values outside the matrices
// are zero.
package hex_model_pkg;
  import ft_pkg::*;

  localparam int MAXN = 32;

  int rows, cols, n, ox, oy, t0;
  data_t A [MAXN][MAXN];
  data_t B [MAXN][MAXN];
  acc_t  C0[MAXN][MAXN];

  function automatic int mod3(int v);
    return ((v % 3) + 3) % 3;
  endfunction

  function automatic void setup(int r, int c, int nn);
    rows = r; cols = c; n = nn;
    ox = r / 2; oy = c / 2;
    t0 = ox + oy + 3 * (r + c + 2);
    for (int i = 0; i < MAXN; i++)
      for (int j = 0; j < MAXN; j++) begin
        A[i][j] = '0; B[i][j] = '0; C0[i][j] = '0;
      end
  endfunction

  function automatic bit in_a_band(int i, int k);
    return (i - k + ox >= 0) && (i - k + ox < rows);
  endfunction
  function automatic bit in_b_band(int k, int j);
    return (j - k + oy >= 0) && (j - k + oy < cols);
  endfunction
  function automatic bit in_mat(int i, int j);
    return i >= 0 && i < n && j >= 0 && j < n;
  endfunction

  // Fill A, B, C0 with random banded values.
  function automatic void randomise(int unsigned maxv);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        A[i][j]  = in_a_band(i, j) ? data_t'($urandom_range(maxv)) : '0;
        B[i][j]  = in_b_band(i, j) ? data_t'($urandom_range(maxv)) : '0;
        C0[i][j] = acc_t'($urandom_range(maxv));
      end
  endfunction

  function automatic acc_t golden(int i, int j);
    acc_t s = C0[i][j];
    for (int k = 0; k < n; k++) s += acc_t'(A[i][k]) * acc_t'(B[k][j]);
    return s;
  endfunction

  // a entering row x at edge tau: copy r = (x - tau) mod 3 of virtual column -r.
  function automatic data_t a_val(int x, int tau);
    int r = mod3(x - tau);
    int num = tau - t0 - (x - ox) - (-r - oy);
    int k = num / 3;
    int i = k + x - ox;
    return in_mat(i, k) ? A[i][k] : '0;
  endfunction

  // b entering column z (top row) at edge tau.
  function automatic data_t b_val(int z, int tau);
    int r = mod3(z - tau);
    int y = z - r;
    int num = tau - t0 + ox - (y - oy);
    int k = num / 3;
    int j = k + y - oy;
    if (y < 0 || y >= cols) return '0;
    return in_mat(k, j) ? B[k][j] : '0;
  endfunction

  // Initial c of the computation done in original PE(x,y) at edge tau.
  function automatic acc_t c_node(int x, int y, int tau);
    int num = tau - t0 - (x - ox) - (y - oy);
    int k = num / 3;
    int i = k + x - ox;
    int j = k + y - oy;
    if (mod3(num) != 0 || y < 0 || y >= cols) return '0;
    return in_mat(i, j) ? C0[i][j] : '0;
  endfunction

  function automatic acc_t cbot_val(int z, int tau);
    int x = rows - 1;
    return c_node(x, z - mod3(x + z - tau), tau);
  endfunction

  function automatic acc_t cright_val(int x, int tau);
    return c_node(x, cols - 1, tau);
  endfunction

  // Where c_ij leaves: returns 0 if its path misses the array. top = 1 means
  // c_top_out[pos], else c_left_out[pos]; the value is on the output during
  // the clock cycle that precedes edge tau.
  function automatic bit exit_of(int i, int j, output bit top, output int pos,
                                 output int tau);
    int kl = (i + ox < j + oy) ? i + ox : j + oy;
    int xl = i - kl + ox;
    int yl = j - kl + oy;
    top = 0; pos = 0; tau = 0;
    if (xl >= rows || yl >= cols) return 0;
    tau = i + j + kl + t0 + 1;
    if (xl == 0) begin top = 1; pos = yl; end
    else         begin top = 0; pos = xl; end
    return 1;
  endfunction

  function automatic int last_edge();
    return t0 + 3 * n + 3 * (rows + cols) + 6;
  endfunction
endpackage
