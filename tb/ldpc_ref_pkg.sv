// ldpc_ref_pkg: reference model for the LDPC decoder testbenches.
//
// ldpc_ref#(P, ITER, SHIFT) builds the full parity-check matrix of the
// (3,5) quasi-cyclic code, finds random codewords by Gaussian elimination
// over GF(2), and runs a flat, edge-by-edge model of the fixed-point
// sum-product decoder. Its phi() table is computed here from
// -ln(tanh(x/2)) with real arithmetic, not taken from the design.
package ldpc_ref_pkg;

  // phi(x) = -ln(tanh(x/2)) on a 0.25-LSB magnitude, rounded, clipped to 15.
  function automatic int phi_ref(int m);
    real x, f;
    int  q;
    if (m == 0) return 15;
    x = m * 0.25;
    f = -$ln((1.0 - $exp(-x)) / (1.0 + $exp(-x)));
    q = int'(f / 0.25);   // rounds to nearest
    return (q > 15) ? 15 : q;
  endfunction

  class ldpc_ref #(int P = 14, int ITER = 10);
    localparam int M = 3 * P;
    localparam int N = 5 * P;

    int   shift [3][5];
    bit   h     [M][N];
    bit   rref  [M][N];
    int   pivot_col [M];
    int   rank;
    int   phi_tab [16];

    function new(logic [2:0][4:0][7:0] sh);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 5; j++) shift[i][j] = int'(sh[i][j]) % P;
      for (int r = 0; r < M; r++)
        for (int c = 0; c < N; c++) h[r][c] = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 5; j++)
          for (int rr = 0; rr < P; rr++) h[i*P + rr][j*P + (rr + shift[i][j]) % P] = 1;
      for (int m = 0; m < 16; m++) phi_tab[m] = phi_ref(m);
      eliminate();
    endfunction

    // Reduced row echelon form of H.
    function void eliminate();
      int r;
      rref = h;
      r = 0;
      for (int c = 0; c < N && r < M; c++) begin
        int p;
        p = -1;
        for (int k = r; k < M; k++) if (rref[k][c] && p < 0) p = k;
        if (p >= 0) begin
          for (int x = 0; x < N; x++) begin
            bit t;
            t = rref[r][x]; rref[r][x] = rref[p][x]; rref[p][x] = t;
          end
          for (int k = 0; k < M; k++)
            if (k != r && rref[k][c])
              for (int x = 0; x < N; x++) rref[k][x] ^= rref[r][x];
          pivot_col[r] = c;
          r++;
        end
      end
      rank = r;
    endfunction

    // A random codeword: random free bits, pivot bits solved from RREF.
    function void random_codeword(output bit cw [N]);
      bit is_piv [N];
      for (int c = 0; c < N; c++) is_piv[c] = 0;
      for (int r = 0; r < rank; r++) is_piv[pivot_col[r]] = 1;
      for (int c = 0; c < N; c++) cw[c] = is_piv[c] ? 1'b0 : 1'($urandom);
      for (int r = 0; r < rank; r++) begin
        bit s;
        s = 0;
        for (int c = 0; c < N; c++) if (!is_piv[c] && rref[r][c]) s ^= cw[c];
        cw[pivot_col[r]] = s;
      end
    endfunction

    // Systematic encoding: message bits, in order, at the non-pivot
    // positions of the reduced H; pivot bits solved from their rows.
    function int k_bits();
      return N - rank;
    endfunction

    function void encode(bit msg [$], output bit cw [N]);
      bit is_piv [N];
      int n;
      for (int c = 0; c < N; c++) is_piv[c] = 0;
      for (int r = 0; r < rank; r++) is_piv[pivot_col[r]] = 1;
      n = 0;
      for (int c = 0; c < N; c++) begin
        cw[c] = 0;
        if (!is_piv[c]) begin
          cw[c] = msg[n];
          n++;
        end
      end
      for (int r = 0; r < rank; r++) begin
        bit s;
        s = 0;
        for (int c = 0; c < N; c++) if (!is_piv[c] && rref[r][c]) s ^= cw[c];
        cw[pivot_col[r]] = s;
      end
    endfunction

    function bit check(bit cw [N]);
      for (int r = 0; r < M; r++) begin
        bit s;
        s = 0;
        for (int c = 0; c < N; c++) if (h[r][c]) s ^= cw[c];
        if (s) return 0;
      end
      return 1;
    endfunction

    static function int clip(int v, int lo, int hi);
      return (v < lo) ? lo : (v > hi) ? hi : v;
    endfunction

    // Fixed-point decoder model. z: intrinsic values (-16..15).
    function void decode(int z [N], output bit hard [N]);
      int qs [M][5], qm [M][5];   // variable-to-check: sign, magnitude
      int rs [M][5], rm [M][5];   // check-to-variable: sign, phi-domain mag
      for (int r = 0; r < M; r++)
        for (int j = 0; j < 5; j++) begin
          rs[r][j] = 0;
          rm[r][j] = 15;   // zero message
        end
      for (int it = 0; it <= ITER; it++) begin
        if (it > 0) begin
          // check nodes
          for (int r = 0; r < M; r++) begin
            int tot, par;
            tot = 0; par = 0;
            for (int j = 0; j < 5; j++) begin
              tot += phi_tab[qm[r][j]];
              par ^= qs[r][j];
            end
            for (int j = 0; j < 5; j++) begin
              rs[r][j] = par ^ qs[r][j];
              rm[r][j] = clip(tot - phi_tab[qm[r][j]], 0, 15);
            end
          end
        end
        // variable nodes
        for (int j = 0; j < 5; j++)
          for (int k = 0; k < P; k++) begin
            int c, tot, rows [3], t [3];
            c   = j * P + k;
            tot = z[c];
            for (int i = 0; i < 3; i++) begin
              rows[i] = i * P + ((k - shift[i][j]) % P + P) % P;
              t[i]    = (rs[rows[i]][j] != 0) ? -phi_tab[rm[rows[i]][j]] : phi_tab[rm[rows[i]][j]];
              tot    += t[i];
            end
            hard[c] = (tot < 0);
            for (int i = 0; i < 3; i++) begin
              int e;
              e = clip(tot - t[i], -32, 31);
              qs[rows[i]][j] = int'(e < 0);
              qm[rows[i]][j] = clip((e < 0) ? -e : e, 0, 15);
            end
          end
      end
    endfunction
  endclass

endpackage
