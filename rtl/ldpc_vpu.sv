// ldpc_vpu: variable node processing unit of the partially parallel decoder.
//
// Combinational. For one code bit it takes the DV check-to-variable
// messages (sign plus phi-domain magnitude) and the intrinsic value Zv:
//   - each message goes through the second phi() look-up (LUT-B) and gets
//     its sign back, giving a two's complement LLR term;
//   - Lv = Zv + sum of all terms is the a-posteriori value; its sign is the
//     hard decision (1 when Lv < 0, since a positive value means bit 0);
//   - each output Liv = Lv - (own term), the extrinsic value, saturated to
//     LW = 6 bits, the output width of the variable unit diagram.
// DV = 3 is the column weight of the (3,5) code. The look-up contents and
// the saturation are this design's choice.
// Timing: no registers; the decoder gives it one clock cycle per column.
module ldpc_vpu
  import ldpc_pkg::*;
#(
  parameter int DV = NRB
) (
  input  msg_t rv [DV],  // check-to-variable messages
  input  llr_t zv,       // intrinsic value of this bit
  output ext_t lv [DV],  // variable-to-check messages (extrinsic)
  output logic hard      // sign(Lv): decoded bit
);

  localparam int SW = $clog2((DV + 1) * 16) + 2;  // signed sum width

  logic signed [SW-1:0] term [DV];
  logic signed [SW-1:0] total;

  localparam logic signed [SW-1:0] EMAX = SW'((1 << (LW - 1)) - 1);
  localparam logic signed [SW-1:0] EMIN = -SW'(1 << (LW - 1));

  always_comb begin
    total = SW'(zv);
    for (int k = 0; k < DV; k++) begin
      logic signed [SW-1:0] mag;
      mag     = SW'($signed({1'b0, phi(rv[k].mag)}));
      term[k] = rv[k].sign ? -mag : mag;
      total   = total + term[k];
    end
    hard = total[SW-1];
  end

  always_comb begin
    for (int k = 0; k < DV; k++) begin
      logic signed [SW-1:0] e;
      e = total - term[k];
      if (e > EMAX)      lv[k] = ext_t'(EMAX);
      else if (e < EMIN) lv[k] = ext_t'(EMIN);
      else               lv[k] = ext_t'(e);
    end
  end

endmodule
