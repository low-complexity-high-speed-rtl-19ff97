// ldpc_pkg: types, constants and helper functions shared by the
// quasi-cyclic LDPC decoder and the QAM front end.
//
// The decoder works on a (3,5)-regular quasi-cyclic code: the parity-check
// matrix is a 3 x 5 array of P x P circulant permutation matrices, so every
// check row has 5 ones and every code bit 3. Block (i,j) is the identity
// matrix cyclically shifted by SHIFT_DEFAULT[i][j]: row r of the block has
// its one in column (r + s) mod P.
//
// Number formats (all values in units of 0.25 LLR):
//   msg_t  : 5-bit sign-magnitude message kept in the message banks.
//            Variable-to-check messages hold a magnitude clipped to 15;
//            check-to-variable messages hold the magnitude in the
//            "phi domain" (sum of phi() values), which the variable
//            node converts back with a second phi() look-up.
//   llr_t  : 5-bit two's complement intrinsic value (positive = bit 0).
//   ext_t  : 6-bit two's complement extrinsic value from a variable node.
// The phi() table, phi(x) = -ln(tanh(x/2)), is rounded at the same 0.25
// step; phi(0) is clipped to 15. Word widths 5 and 6 follow the decoder's
// node unit diagrams; the 0.25 step and the table are this design's choice.
package ldpc_pkg;

  localparam int NRB      = 3;   // block rows    (column weight)
  localparam int NCB      = 5;   // block columns (row weight)
  localparam int P_DEF    = 14;  // circulant size (bank depth)
  localparam int ITER_DEF = 10;  // decoding iterations
  localparam int PAR_DEF  = 2;   // rows/columns per cycle (enhanced parallelism)

  localparam int MW = 5;  // message width (sign + 4-bit magnitude)
  localparam int ZW = 5;  // intrinsic width
  localparam int LW = 6;  // variable-node output width

  typedef struct packed {
    logic       sign;
    logic [3:0] mag;
  } msg_t;

  typedef logic signed [ZW-1:0] llr_t;
  typedef logic signed [LW-1:0] ext_t;

  // Circulant shifts, packed so that they can be a module parameter:
  // entry [i][j] is the shift of block (i,j). The default code has no
  // 4-cycles for P = 14.
  typedef logic [NRB-1:0][NCB-1:0][7:0] shift_tab_t;

  function automatic shift_tab_t default_shifts();
    shift_tab_t t;
    t[0] = {8'd0, 8'd0,  8'd0, 8'd0,  8'd0};   // written [4] .. [0]
    t[1] = {8'd12, 8'd11, 8'd8, 8'd5, 8'd0};
    t[2] = {8'd7,  8'd1,  8'd5, 8'd11, 8'd0};
    return t;
  endfunction

  localparam shift_tab_t SHIFT_DEFAULT = default_shifts();

  // phi(x) = -ln(tanh(x/2)) on a 4-bit magnitude, 0.25 LSB in and out.
  function automatic logic [3:0] phi(input logic [3:0] m);
    case (m)
      4'd0:  phi = 4'd15;
      4'd1:  phi = 4'd8;
      4'd2:  phi = 4'd6;
      4'd3:  phi = 4'd4;
      4'd4:  phi = 4'd3;
      4'd5:  phi = 4'd2;
      4'd6:  phi = 4'd2;
      4'd7:  phi = 4'd1;
      4'd8:  phi = 4'd1;
      4'd9:  phi = 4'd1;
      4'd10: phi = 4'd1;
      4'd11: phi = 4'd1;
      default: phi = 4'd0;
    endcase
  endfunction

  // Two's complement extrinsic value to the 5-bit sign-magnitude message
  // format, magnitude clipped to 15.
  function automatic msg_t ext_to_msg(input ext_t v);
    logic [LW-1:0] a;
    msg_t          m;
    a      = v[LW-1] ? LW'(-v) : LW'(v);
    m.sign = v[LW-1];
    m.mag  = (a > 15) ? 4'd15 : a[3:0];
    return m;
  endfunction

  // The zero-LLR check message: phi-domain magnitude 15, phi(15) = 0.
  localparam msg_t MSG_ZERO = '{sign: 1'b0, mag: 4'd15};

endpackage
