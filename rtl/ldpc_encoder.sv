// ldpc_encoder: systematic encoder of the (3,5) quasi-cyclic LDPC code.
//
// Computes the codeword t = s.G of a CK-bit message s. The generator is not
// stored: the parity-check matrix is reduced to row echelon form at
// elaboration (ldpc_code.svh); message bits go to the non-pivot positions
// and each pivot (parity) bit is the XOR of the message positions marked in
// its reduced row, so H.t = 0 holds by construction.
// Operation:
//   COLLECT: CK message bits are taken one per cycle on msg_bit while
//            msg_ready is high and placed in an N-bit codeword register.
//   PARITY : one cycle fills in all parity bits at once.
//   SEND   : the codeword register shifts out one bit per cycle, code bit 0
//            first, on cw_bit with a valid/ready handshake.
// Timing: CK + 1 + N cycles per codeword with no stalls (30 + 1 + 70 for
// the default code). Only the encoder's function (s.G = t) and that the
// code is quasi-cyclic come from the system description; the systematic
// form and the serial interfaces are this design's choices.
module ldpc_encoder
  import ldpc_pkg::*;
#(
  parameter int         P     = P_DEF,
  parameter shift_tab_t SHIFT = SHIFT_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic msg_valid,
  input  logic msg_bit,
  output logic msg_ready,
  output logic cw_valid,
  output logic cw_bit,
  input  logic cw_ready
);

  `include "ldpc_code.svh"

  typedef enum logic [1:0] {S_COLLECT, S_PARITY, S_SEND} state_e;

  state_e         state;
  logic [CN-1:0]  cw;
  logic [CNW-1:0] cnt;

  assign msg_ready = (state == S_COLLECT);
  assign cw_valid  = (state == S_SEND);
  assign cw_bit    = cw[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_COLLECT;
      cw    <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_COLLECT: if (msg_valid) begin
          cw[FREE_POS[cnt]] <= msg_bit;
          if (cnt == CNW'(CK - 1)) begin
            cnt   <= '0;
            state <= S_PARITY;
          end else begin
            cnt <= cnt + CNW'(1);
          end
        end
        S_PARITY: begin
          for (int r = 0; r < CRANK; r++) cw[PIV_POS[r]] <= ^(RREF[r] & cw);
          state <= S_SEND;
        end
        S_SEND: if (cw_ready) begin
          cw <= cw >> 1;
          if (cnt == CNW'(CN - 1)) begin
            cnt   <= '0;
            cw    <= '0;
            state <= S_COLLECT;
          end else begin
            cnt <= cnt + CNW'(1);
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
