// ofdm_fft_rmcp: receiver OFDM stage, cyclic prefix removal plus FFT.
//
// Time samples of one OFDM symbol (N + CP of them) are taken on in_re/in_im
// while in_ready is high. The first CP samples (the prefix) are dropped and
// the next N go into an ofdm_fft_core that runs the forward transform
// without scaling, giving sum_n x_n exp(-j*2*pi*k*n/N). The N bins are then
// sent in subcarrier order on out_re/out_im (valid/ready handshake), each
// shifted right by OUT_SHIFT with rounding and saturated to SW bits, which undoes the
// transmitter's gain so that noiseless points come back at their levels.
// Timing per symbol: N + CP input cycles, (N/2)*log2(N) transform cycles,
// then N output cycles when out_ready stays high.
// Joining prefix removal and the transform in one stage follows the system
// block diagram; N = 64, CP = 16 and the scaling are this design's choices.
module ofdm_fft_rmcp #(
  parameter int SW        = 8,
  parameter int DW        = 16,
  parameter int TW        = 16,
  parameter int N         = 64,
  parameter int CP        = 16,
  parameter int OUT_SHIFT = 6,
  localparam int L        = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic signed [SW-1:0] out_re,
  output logic signed [SW-1:0] out_im,
  input  logic                 out_ready
);

  localparam int IW = $clog2(N + CP);

  logic                 core_ready, done, last;
  logic [IW-1:0]        icnt;
  logic [L-1:0]         ocnt;
  logic signed [DW-1:0] bin_re, bin_im;

  ofdm_fft_core #(.DW(DW), .TW(TW), .N(N), .INVERSE(1'b0), .SCALE(1'b0)) u_core (
    .clk, .rst_n,
    .in_valid(in_valid && icnt >= IW'(CP)),
    .in_re, .in_im,
    .in_ready(core_ready),
    .done,
    .rd_addr(ocnt),
    .rd_re(bin_re),
    .rd_im(bin_im),
    .release_i(last)
  );

  function automatic logic signed [SW-1:0] shrink(input logic signed [DW-1:0] v);
    logic signed [DW:0] s;
    s = ((DW+1)'(v) + (DW+1)'(1 << (OUT_SHIFT - 1))) >>> OUT_SHIFT;   // round
    if (s > (DW+1)'((1 << (SW - 1)) - 1)) return SW'((1 << (SW - 1)) - 1);
    if (s < -(DW+1)'(1 << (SW - 1)))      return SW'(-(1 << (SW - 1)));
    return SW'(s);
  endfunction

  assign in_ready  = core_ready;
  assign out_valid = done;
  assign out_re    = shrink(bin_re);
  assign out_im    = shrink(bin_im);
  assign last      = done && out_ready && (ocnt == L'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt <= '0;
      ocnt <= '0;
    end else begin
      if (in_valid && core_ready)
        icnt <= (icnt == IW'(N + CP - 1)) ? '0 : icnt + IW'(1);
      if (last)                    ocnt <= '0;
      else if (done && out_ready)  ocnt <= ocnt + L'(1);
    end
  end

endmodule
