// qam_demapper: M-ary soft demodulator that produces the decoder's
// intrinsic values.
//
// A received point (sym_i, sym_q) is accepted when sym_ready is high. The
// demapper then hands out 2 (QPSK) or 4 (16-QAM) intrinsic values, one per
// cycle on llr/llr_valid, in the bit order of qam_mapper; llr_ready from
// the decoder stalls it. sym_ready is high only when no value is pending.
// 'clear' drops pending values (used at the start of a codeword so that
// the spare values of a last, partly used 16-QAM point do not leak).
//
// The values are formed without any estimate of the channel noise power:
// the max-log bit metrics are used directly, only scaled by 2^-SHIFT and
// saturated to the 5-bit intrinsic format (positive means bit 0):
//   QPSK   : b0: -I            b1: -Q
//   16-QAM : b0: -I            b1: |I| - 2*UNIT
//            b2: -Q            b3: |Q| - 2*UNIT
// Skipping the noise estimate follows the system description; the metrics,
// the scaling and the handshake are this design's choices.
module qam_demapper
  import ldpc_pkg::*;
#(
  parameter int SW    = 8,
  parameter int UNIT  = 16,
  parameter int SHIFT = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 qam16,
  input  logic                 sym_valid,
  input  logic signed [SW-1:0] sym_i,
  input  logic signed [SW-1:0] sym_q,
  output logic                 sym_ready,
  output logic                 llr_valid,
  output llr_t                 llr,
  input  logic                 llr_ready
);

  localparam int XW = SW + 2;

  llr_t       pend [4];
  logic [2:0] left;      // values still to hand out
  logic [1:0] idx;

  function automatic llr_t scale_sat(input logic signed [XW-1:0] v);
    logic signed [XW-1:0] s;
    s = v >>> SHIFT;
    if (s > XW'(15))       return llr_t'(15);
    else if (s < XW'(-16)) return llr_t'(-16);
    else                   return llr_t'(s);
  endfunction

  function automatic logic signed [XW-1:0] absx(input logic signed [SW-1:0] v);
    logic signed [XW-1:0] e;
    e = XW'(v);
    return (e < 0) ? -e : e;
  endfunction

  assign sym_ready = (left == 3'd0);
  assign llr_valid = (left != 3'd0);
  assign llr       = pend[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0;
      idx  <= '0;
      for (int k = 0; k < 4; k++) pend[k] <= '0;
    end else if (clear) begin
      left <= '0;
      idx  <= '0;
    end else if (sym_ready && sym_valid) begin
      idx <= '0;
      if (qam16) begin
        left    <= 3'd4;
        pend[0] <= scale_sat(-XW'(sym_i));
        pend[1] <= scale_sat(absx(sym_i) - XW'(2 * UNIT));
        pend[2] <= scale_sat(-XW'(sym_q));
        pend[3] <= scale_sat(absx(sym_q) - XW'(2 * UNIT));
      end else begin
        left    <= 3'd2;
        pend[0] <= scale_sat(-XW'(sym_i));
        pend[1] <= scale_sat(-XW'(sym_q));
      end
    end else if (llr_valid && llr_ready) begin
      left <= left - 3'd1;
      idx  <= idx + 2'd1;
    end
  end

endmodule
