// qam_mapper: M-ary modulator of the transmitter, QPSK or 16-QAM.
//
// Bits arrive one per cycle on bit_i/bit_valid. The mapper gathers 2
// (QPSK, qam16 = 0) or 4 (16-QAM, qam16 = 1) of them and then emits one
// constellation point on sym_i/sym_q with sym_valid high for one cycle,
// in the cycle after the last bit of the group. The mode is sampled with
// the first bit of each group. 'clear' drops a partly gathered group.
// Mapping (Gray, first bit b0 first): QPSK puts b0 on I and b1 on Q, 0 -> -1
// and 1 -> +1. 16-QAM puts b0 b1 on I and b2 b3 on Q with
// 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3. Levels are multiplied by UNIT
// and left unnormalised.
// The two modulations follow the system description; the Gray tables are
// those of IEEE 802.11a, and the level scaling and the bit-serial interface
// are this design's choices.
module qam_mapper #(
  parameter int SW   = 8,    // sample width
  parameter int UNIT = 16    // amplitude of level 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 qam16,
  input  logic                 bit_valid,
  input  logic                 bit_i,
  output logic                 sym_valid,
  output logic signed [SW-1:0] sym_i,
  output logic signed [SW-1:0] sym_q
);

  logic [3:0] bits;      // b0 in bits[0]
  logic [1:0] nbits;
  logic       mode;

  // Gray level of a bit pair (msb first) for 16-QAM, in units of UNIT.
  function automatic logic signed [SW-1:0] lvl16(input logic b_hi, input logic b_lo);
    unique case ({b_hi, b_lo})
      2'b00: return SW'(-3 * UNIT);
      2'b01: return SW'(-1 * UNIT);
      2'b11: return SW'( 1 * UNIT);
      default: return SW'(3 * UNIT);
    endcase
  endfunction

  // The group including the bit now offered, and its mode.
  logic       m_n;
  logic [3:0] b_n;
  logic       full;

  always_comb begin
    m_n        = (nbits == 2'd0) ? qam16 : mode;
    b_n        = bits;
    b_n[nbits] = bit_i;
    full       = m_n ? (nbits == 2'd3) : (nbits == 2'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbits     <= '0;
      mode      <= 1'b0;
      bits      <= '0;
      sym_valid <= 1'b0;
      sym_i     <= '0;
      sym_q     <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (clear) begin
        nbits <= '0;
      end else if (bit_valid) begin
        bits  <= b_n;
        mode  <= m_n;
        nbits <= full ? 2'd0 : nbits + 2'd1;
        if (full) begin
          sym_valid <= 1'b1;
          if (m_n) begin
            sym_i <= lvl16(b_n[0], b_n[1]);
            sym_q <= lvl16(b_n[2], b_n[3]);
          end else begin
            sym_i <= b_n[0] ? SW'(UNIT) : SW'(-UNIT);
            sym_q <= b_n[1] ? SW'(UNIT) : SW'(-UNIT);
          end
        end
      end
    end
  end

endmodule
