// ldpc_code.svh: elaboration-time tables of the (3,5) quasi-cyclic code,
// included inside a module that has the parameters P and SHIFT and imports
// ldpc_pkg.
//
// H is the NRB x NCB array of P x P shifted identities. code_rref() brings
// it to reduced row echelon form over GF(2). Its pivot columns are the
// parity positions of the systematic encoder, the other CK columns carry
// the message in order: message bit i sits at code position FREE_POS[i],
// and row r of the reduced matrix gives parity bit PIV_POS[r] as the XOR of
// the message positions it marks.

localparam int CM = NRB * P;
localparam int CN = NCB * P;
localparam int CNW = $clog2(CN);

typedef logic [CN-1:0]              code_row_t;
typedef code_row_t [CM-1:0]         code_mat_t;
typedef logic [CN-1:0][CNW-1:0]     code_pos_t;

function automatic code_mat_t code_rref();
  code_mat_t h;
  int        r;
  h = '0;
  for (int i = 0; i < NRB; i++)
    for (int j = 0; j < NCB; j++)
      for (int rr = 0; rr < P; rr++)
        h[i * P + rr][j * P + (rr + int'(SHIFT[i][j]) % P) % P] = 1'b1;
  r = 0;
  for (int c = 0; c < CN; c++) begin
    int p;
    p = -1;
    for (int k = 0; k < CM; k++)
      if (k >= r && p < 0 && h[k][c]) p = k;
    if (p >= 0) begin
      code_row_t t;
      t    = h[r];
      h[r] = h[p];
      h[p] = t;
      for (int k = 0; k < CM; k++)
        if (k != r && h[k][c]) h[k] = h[k] ^ h[r];
      r++;
    end
  end
  return h;
endfunction

// Pivot column of each nonzero row; CN marks a zero row.
function automatic code_pos_t code_pivots(input code_mat_t h);
  code_pos_t pos;
  pos = '0;
  for (int r = 0; r < CM; r++) begin
    int c0;
    c0 = -1;
    for (int c = 0; c < CN; c++)
      if (c0 < 0 && h[r][c]) c0 = c;
    pos[r] = CNW'((c0 < 0) ? 0 : c0);
  end
  return pos;
endfunction

function automatic int code_rank(input code_mat_t h);
  int n;
  n = 0;
  for (int r = 0; r < CM; r++)
    if (h[r] != '0) n++;
  return n;
endfunction

// Code positions of the message bits, in message order.
function automatic code_pos_t code_free(input code_mat_t h);
  code_pos_t pos;
  code_row_t piv;
  int        n;
  piv = '0;
  for (int r = 0; r < CM; r++) begin
    for (int c = 0; c < CN; c++)
      if (h[r] != '0 && h[r][c] && (h[r] & ((code_row_t'(1) << c) - code_row_t'(1))) == '0)
        piv[c] = 1'b1;
  end
  pos = '0;
  n   = 0;
  for (int c = 0; c < CN; c++)
    if (!piv[c]) begin
      pos[n] = CNW'(c);
      n++;
    end
  return pos;
endfunction

localparam code_mat_t RREF     = code_rref();
localparam int        CRANK    = code_rank(RREF);
localparam int        CK       = CN - CRANK;
localparam code_pos_t PIV_POS  = code_pivots(RREF);
localparam code_pos_t FREE_POS = code_free(RREF);
