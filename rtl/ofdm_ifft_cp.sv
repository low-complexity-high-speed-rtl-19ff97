// ofdm_ifft_cp: transmitter OFDM stage, inverse FFT plus cyclic prefix.
//
// N constellation points (one per subcarrier, subcarrier 0 first) are taken
// on in_re/in_im while in_ready is high. Each point is widened to DW bits and
// shifted left by IN_SHIFT, then the inverse transform runs on an
// ofdm_fft_core with per-stage halving, so the time samples equal
// sum_k X_k exp(+j*2*pi*k*n/N) scaled by 2^IN_SHIFT / N.
// The stage then sends N + CP time samples on out_re/out_im with a
// valid/ready handshake: first the last CP samples of the symbol (the
// cyclic prefix), then all N samples in order. After the last one the core
// is released for the next symbol.
// Timing per symbol: N load cycles, (N/2)*log2(N) transform cycles, then
// N + CP output cycles when out_ready stays high.
// Joining the inverse transform and prefix insertion in one stage follows
// the system block diagram; N = 64 and CP = 16 are IEEE 802.11a values and
// all subcarriers carry data here (no pilots or null carriers).
module ofdm_ifft_cp #(
  parameter int SW       = 8,
  parameter int DW       = 16,
  parameter int TW       = 16,
  parameter int N        = 64,
  parameter int CP       = 16,
  parameter int IN_SHIFT = 6,
  localparam int L       = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_re,
  input  logic signed [SW-1:0] in_im,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  input  logic                 out_ready
);

  localparam int OW = $clog2(N + CP);

  logic          done;
  logic [L-1:0]  rd_addr;
  logic [OW-1:0] ocnt;
  logic          last;

  ofdm_fft_core #(.DW(DW), .TW(TW), .N(N), .INVERSE(1'b1), .SCALE(1'b1)) u_core (
    .clk, .rst_n,
    .in_valid(in_valid),
    .in_re(DW'(in_re) <<< IN_SHIFT),
    .in_im(DW'(in_im) <<< IN_SHIFT),
    .in_ready,
    .done,
    .rd_addr,
    .rd_re(out_re),
    .rd_im(out_im),
    .release_i(last)
  );

  // Prefix first: sample N-CP+ocnt, then sample ocnt-CP.
  assign rd_addr   = (ocnt < OW'(CP)) ? L'(N - CP + int'(ocnt)) : L'(int'(ocnt) - CP);
  assign out_valid = done;
  assign last      = done && out_ready && (ocnt == OW'(N + CP - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  ocnt <= '0;
    else if (last)               ocnt <= '0;
    else if (done && out_ready)  ocnt <= ocnt + OW'(1);
  end

endmodule
