// ofdm_fft_core: in-place radix-2 decimation-in-time FFT / IFFT engine.
//
// Three phases:
//   LOAD   : N complex samples are taken on in_re/in_im (one per cycle when
//            in_valid and in_ready), in natural order; each is stored at its
//            bit-reversed address.
//   RUN    : log2(N) stages of N/2 butterflies, one butterfly per cycle, so
//            (N/2)*log2(N) cycles (192 for N = 64). Butterfly b of stage s
//            pairs words i0 and i0 + 2^s and uses twiddle
//            W = exp(-+j*2*pi*((b mod 2^s) * 2^(L-1-s))/N), '+' when INVERSE.
//            With SCALE each stage halves its results (arithmetic shift), so
//            the result carries the 1/N factor; without SCALE the results
//            saturate at the word width.
//   DONE   : 'done' is high and rd_addr reads any output bin (natural order,
//            combinational). 'release_i' returns the engine to LOAD.
// Twiddles are Q2.(TW-2) and computed at elaboration from $cos/$sin.
// The transform sizes, the radix-2 choice and the word widths are this
// design's choices (the system only names an IFFT and an FFT stage and
// compares radix-2, radix-4 and split-radix resource counts).
module ofdm_fft_core #(
  parameter int DW      = 16,
  parameter int TW      = 16,
  parameter int N       = 64,
  parameter bit INVERSE = 1'b0,
  parameter bit SCALE   = 1'b0,
  localparam int L      = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 in_ready,
  output logic                 done,
  input  logic [L-1:0]         rd_addr,
  output logic signed [DW-1:0] rd_re,
  output logic signed [DW-1:0] rd_im,
  input  logic                 release_i
);

  typedef logic [N/2-1:0][TW-1:0] tw_tab_t;

  function automatic tw_tab_t gen_tw(input bit use_sin);
    tw_tab_t t;
    for (int k = 0; k < N/2; k++) begin
      real a, v;
      a = 2.0 * 3.14159265358979323846 * k / N;
      v = (use_sin ? $sin(a) : $cos(a)) * (2.0 ** (TW - 2));
      t[k] = TW'($rtoi(v + ((v < 0.0) ? -0.5 : 0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t COS_T = gen_tw(1'b0);
  localparam tw_tab_t SIN_T = gen_tw(1'b1);

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_DONE} state_e;

  state_e              state;
  logic [L-1:0]        lcnt;
  logic [L-1:0]        bcnt;    // butterfly index within a stage (L-1 bits used)
  logic [$clog2(L+1)-1:0] stage;

  logic signed [DW-1:0] mre [N];
  logic signed [DW-1:0] mim [N];

  function automatic logic [L-1:0] bitrev(input logic [L-1:0] a);
    for (int k = 0; k < L; k++) bitrev[k] = a[L-1-k];
  endfunction

  // ------------------------------------------------------------ butterfly
  localparam int PW = DW + TW;
  logic [L-1:0]          i0, i1, half, pos;
  logic [L-2:0]          twi;
  logic signed [TW-1:0]  wc, ws;
  logic signed [DW+1:0]  ar, ai, tr, ti;
  logic signed [DW+1:0]  sr0, si0, sr1, si1;
  logic signed [DW-1:0]  yr0, yi0, yr1, yi1;

  function automatic logic signed [DW-1:0] fit(input logic signed [DW+1:0] v);
    logic signed [DW+1:0] s;
    s = SCALE ? (v >>> 1) : v;
    if (s > (DW+2)'((1 << (DW - 1)) - 1)) return DW'((1 << (DW - 1)) - 1);
    if (s < -(DW+2)'(1 << (DW - 1)))      return DW'(-(1 << (DW - 1)));
    return DW'(s);
  endfunction

  always_comb begin
    logic signed [PW-1:0] pr, pi;
    half = L'(1) << stage;
    pos  = bcnt & (half - L'(1));
    i0   = ((bcnt >> stage) << (stage + 1)) | pos;
    i1   = i0 | half;
    twi  = (L-1)'(pos << (L - 1 - int'(stage)));
    wc   = COS_T[twi];
    // forward: W = cos - j sin ; inverse: W = cos + j sin
    ws   = INVERSE ? SIN_T[twi] : -SIN_T[twi];
    ar   = (DW+2)'(mre[i0]);
    ai   = (DW+2)'(mim[i0]);
    pr   = PW'(mre[i1]) * PW'(wc) - PW'(mim[i1]) * PW'(ws);
    pi   = PW'(mre[i1]) * PW'(ws) + PW'(mim[i1]) * PW'(wc);
    tr   = (DW+2)'((pr + PW'(1 << (TW - 3))) >>> (TW - 2));
    ti   = (DW+2)'((pi + PW'(1 << (TW - 3))) >>> (TW - 2));
    sr0  = ar + tr;
    si0  = ai + ti;
    sr1  = ar - tr;
    si1  = ai - ti;
    yr0  = fit(sr0);
    yi0  = fit(si0);
    yr1  = fit(sr1);
    yi1  = fit(si1);
  end

  // --------------------------------------------------------------- control
  assign in_ready = (state == S_LOAD);
  assign done     = (state == S_DONE);
  assign rd_re    = mre[rd_addr];
  assign rd_im    = mim[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      lcnt  <= '0;
      bcnt  <= '0;
      stage <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          lcnt <= lcnt + L'(1);
          if (lcnt == L'(N - 1)) begin
            state <= S_RUN;
            bcnt  <= '0;
            stage <= '0;
          end
        end
        S_RUN: begin
          if (bcnt == L'(N/2 - 1)) begin
            bcnt <= '0;
            if (stage == ($clog2(L+1))'(L - 1)) state <= S_DONE;
            else stage <= stage + 1'b1;
          end else begin
            bcnt <= bcnt + L'(1);
          end
        end
        S_DONE: if (release_i) begin
          state <= S_LOAD;
          lcnt  <= '0;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mre[bitrev(lcnt)] <= in_re;
      mim[bitrev(lcnt)] <= in_im;
    end else if (state == S_RUN) begin
      mre[i0] <= yr0;
      mim[i0] <= yi0;
      mre[i1] <= yr1;
      mim[i1] <= yi1;
    end
  end

endmodule
