// ldpc_ofdm_top: LDPC-coded OFDM baseband, transmitter and receiver paths.
//
// Transmit path: message bits enter one per cycle on tx_msg_bit
// (valid/ready) and are encoded by the systematic (3,5) quasi-cyclic LDPC
// encoder (ldpc_encoder). Its code bits, followed by zero padding bits
// requested on tx_pad_valid to fill the last OFDM symbol, are mapped to
// QPSK or 16-QAM points (qam_mapper), gathered into N-subcarrier OFDM
// symbols and sent as N + CP time samples (ofdm_ifft_cp) on tx_re/tx_im with
// a valid/ready handshake, towards the channel. Code bits have priority;
// a padding bit is taken only when the encoder has none to send.
// Receive path: time samples from the channel enter on rx_re/rx_im
// (ofdm_fft_rmcp drops the prefix and transforms), each subcarrier point
// is turned into 2 or 4 intrinsic values without any noise estimate
// (qam_demapper), and the (3,5) quasi-cyclic LDPC decoder (ldpc_decoder)
// takes the first 5*P of them after start_i, decodes for ITER iterations
// (PAR rows or columns of the parity-check matrix per cycle)
// and returns the hard decisions on dec_o, NCB bits per valid_o cycle;
// ldpc_msg_recover then sends the message bits on rx_msg_bit (valid/ready).
// Values that reach the decoder while it is not loading (the padding of
// the last OFDM symbol of a codeword) are dropped; start_i also clears the
// demapper. qam16 selects the modulation of both paths.
// The chain (LDPC encoder, M-ary modulator, IFFT & CP, channel, remove CP &
// FFT, M-ary demodulator, LDPC decoder in place of the Viterbi decoder)
// follows the system block diagram; the channel is not part of this RTL,
// and the handshakes, padding and drop rule are this design's.
module ldpc_ofdm_top
  import ldpc_pkg::*;
#(
  parameter int         P     = P_DEF,
  parameter int         ITER  = ITER_DEF,
  parameter int         PAR   = PAR_DEF,
  parameter shift_tab_t SHIFT = SHIFT_DEFAULT,
  parameter int         N     = 64,
  parameter int         CP    = 16,
  parameter int         SW    = 8,
  parameter int         DW    = 16,
  parameter int         UNIT  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 qam16,
  // transmit
  input  logic                 tx_msg_valid,
  input  logic                 tx_msg_bit,
  output logic                 tx_msg_ready,
  input  logic                 tx_pad_valid,  // ask for one zero padding bit
  output logic                 tx_pad_ready,
  output logic                 tx_valid,
  output logic signed [DW-1:0] tx_re,
  output logic signed [DW-1:0] tx_im,
  input  logic                 tx_ready,
  // receive
  input  logic                 rx_valid,
  input  logic signed [DW-1:0] rx_re,
  input  logic signed [DW-1:0] rx_im,
  output logic                 rx_ready,
  input  logic                 start_i,
  output logic                 valid_o,
  output logic [NCB-1:0]       dec_o,
  output logic                 busy,
  output logic                 rx_dropped,  // an intrinsic value arrived while not loading
  output logic                 rx_msg_valid,
  output logic                 rx_msg_bit,
  input  logic                 rx_msg_ready
);

  // ---------------------------------------------------------------- transmit
  logic                 map_valid, ifft_ready;
  logic signed [SW-1:0] map_i, map_q;
  logic                 cw_valid, cw_bit, bit_valid, bit_val;

  ldpc_encoder #(.P(P), .SHIFT(SHIFT)) u_enc (
    .clk, .rst_n,
    .msg_valid(tx_msg_valid), .msg_bit(tx_msg_bit), .msg_ready(tx_msg_ready),
    .cw_valid, .cw_bit, .cw_ready(ifft_ready)
  );

  assign tx_pad_ready = ifft_ready && !cw_valid;
  assign bit_valid    = ifft_ready && (cw_valid || tx_pad_valid);
  assign bit_val      = cw_valid && cw_bit;

  qam_mapper #(.SW(SW), .UNIT(UNIT)) u_map (
    .clk, .rst_n, .clear(1'b0), .qam16,
    .bit_valid, .bit_i(bit_val),
    .sym_valid(map_valid), .sym_i(map_i), .sym_q(map_q)
  );

  ofdm_ifft_cp #(.SW(SW), .DW(DW), .N(N), .CP(CP)) u_ifft (
    .clk, .rst_n,
    .in_valid(map_valid), .in_re(map_i), .in_im(map_q), .in_ready(ifft_ready),
    .out_valid(tx_valid), .out_re(tx_re), .out_im(tx_im), .out_ready(tx_ready)
  );

  // A mapped point is never offered while the IFFT is busy.
  assert property (@(posedge clk) map_valid |-> ifft_ready)
    else $error("ldpc_ofdm_top: constellation point lost");

  // ----------------------------------------------------------------- receive
  logic                 fft_valid, dm_ready, llr_valid, dec_ready;
  logic signed [SW-1:0] fft_i, fft_q;
  llr_t                 llr;

  ofdm_fft_rmcp #(.SW(SW), .DW(DW), .N(N), .CP(CP)) u_fft (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_re(rx_re), .in_im(rx_im), .in_ready(rx_ready),
    .out_valid(fft_valid), .out_re(fft_i), .out_im(fft_q), .out_ready(dm_ready)
  );

  qam_demapper #(.SW(SW), .UNIT(UNIT)) u_demap (
    .clk, .rst_n, .clear(start_i), .qam16,
    .sym_valid(fft_valid), .sym_i(fft_i), .sym_q(fft_q), .sym_ready(dm_ready),
    .llr_valid, .llr, .llr_ready(1'b1)
  );

  ldpc_decoder #(.P(P), .ITER(ITER), .PAR(PAR), .SHIFT(SHIFT)) u_dec (
    .clk, .rst_n, .start_i,
    .in_valid(llr_valid), .in_llr(llr), .in_ready(dec_ready),
    .valid_o, .dec_o, .busy
  );

  assign rx_dropped = llr_valid && !dec_ready;

  ldpc_msg_recover #(.P(P), .SHIFT(SHIFT)) u_rec (
    .clk, .rst_n,
    .dec_valid(valid_o), .dec_bits(dec_o),
    .msg_valid(rx_msg_valid), .msg_bit(rx_msg_bit), .msg_ready(rx_msg_ready)
  );

endmodule
