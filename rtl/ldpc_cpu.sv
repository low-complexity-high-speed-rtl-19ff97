// ldpc_cpu: check node processing unit of the partially parallel decoder.
//
// Combinational. It takes the DC variable-to-check messages of one parity
// check row (sign-magnitude, msg_t) and returns the DC check-to-variable
// messages in one pass, the sum-product rule in the log domain:
//   magnitude: every input magnitude goes through a phi() look-up (LUT-A),
//              the DC results are summed, and each output gets the total
//              minus its own term (the extrinsic sum). The result stays in
//              the phi domain; the variable node applies the second phi().
//   sign:      the parity of all DC signs, combined with the input's own
//              sign, so each output carries the product of the other signs.
// The output magnitude is clipped to 15 (phi(15) = 0, so no information is
// lost by the clip). The structure (look-up per input, one shared sum,
// per-output subtraction, shared sign parity) follows the decoder's check
// unit diagram; DC = 5 is its row weight. Widths of the internal sums are
// sized here so that nothing overflows.
// Timing: no registers; the decoder gives it one clock cycle per row.
module ldpc_cpu
  import ldpc_pkg::*;
#(
  parameter int DC = NCB
) (
  input  msg_t lc [DC],   // variable-to-check messages of one row
  output msg_t rc [DC]    // check-to-variable messages (phi-domain magnitude)
);

  localparam int SW = $clog2(DC * 15 + 1);

  logic [3:0]    f   [DC];
  logic [SW-1:0] total;
  logic          parity;

  always_comb begin
    total  = '0;
    parity = 1'b0;
    for (int k = 0; k < DC; k++) begin
      f[k]   = phi(lc[k].mag);
      total  = total + SW'(f[k]);
      parity = parity ^ lc[k].sign;
    end
  end

  always_comb begin
    for (int k = 0; k < DC; k++) begin
      logic [SW-1:0] ext;
      ext          = total - SW'(f[k]);
      rc[k].sign   = parity ^ lc[k].sign;
      rc[k].mag    = (ext > SW'(15)) ? 4'd15 : ext[3:0];
    end
  end

endmodule
