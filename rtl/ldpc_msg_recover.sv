// ldpc_msg_recover: recovers the message from a decoded codeword, s = t.R.
//
// The decoder delivers its hard decisions NCB bits per cycle (bit j*P + k on
// dec_bits[j] in the k-th dec_valid cycle). This block gathers the P cycles
// into an N-bit codeword register and then sends the CK message bits, one
// per cycle on msg_bit with a valid/ready handshake. For the systematic
// encoder (ldpc_encoder) a right inverse R of the generator (G.R = I) just
// selects the non-pivot code positions, so the product t.R is a selection
// by the elaboration-time table FREE_POS.
// Timing: P input cycles, then CK output cycles with no stalls. A new
// codeword must not start before the last message bit has been taken.
// Recovering the message by a right inverse of G follows the system
// description; the selection form of R follows from this design's
// systematic encoder.
module ldpc_msg_recover
  import ldpc_pkg::*;
#(
  parameter int         P     = P_DEF,
  parameter shift_tab_t SHIFT = SHIFT_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           dec_valid,
  input  logic [NCB-1:0] dec_bits,
  output logic           msg_valid,
  output logic           msg_bit,
  input  logic           msg_ready
);

  `include "ldpc_code.svh"

  localparam int KW = $clog2(P);

  logic [CN-1:0]  cw;
  logic [KW-1:0]  k;
  logic [CNW-1:0] cnt;
  logic           sending;

  assign msg_valid = sending;
  assign msg_bit   = cw[FREE_POS[cnt]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k       <= '0;
      cnt     <= '0;
      sending <= 1'b0;
    end else if (!sending) begin
      if (dec_valid) begin
        k <= (k == KW'(P - 1)) ? '0 : k + KW'(1);
        if (k == KW'(P - 1)) sending <= 1'b1;
      end
    end else if (msg_ready) begin
      cnt <= (cnt == CNW'(CK - 1)) ? '0 : cnt + CNW'(1);
      if (cnt == CNW'(CK - 1)) sending <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!sending && dec_valid)
      for (int j = 0; j < NCB; j++) cw[j * P + int'(k)] <= dec_bits[j];
  end

  // The decoder must not deliver a new codeword while this one is sent.
  assert property (@(posedge clk) sending |-> !dec_valid)
    else $error("ldpc_msg_recover: codeword arrived while sending");

endmodule
