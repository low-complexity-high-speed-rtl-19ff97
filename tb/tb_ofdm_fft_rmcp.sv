// tb_ofdm_fft_rmcp: self-checking test of the prefix removal + FFT stage.
// Each symbol is built here: x_n = round(sum_k X_k exp(+j*2*pi*k*n/N)) for
// random QPSK/16-QAM points X_k, preceded by CP random samples standing for
// the prefix (so a prefix that is not dropped corrupts the result). The N
// output bins, taken with random out_ready, must equal X_k exactly.
module tb_ofdm_fft_rmcp;
  localparam int SW = 8, DW = 16, N = 64, CP = 16, UNIT = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic in_ready, out_valid;
  logic signed [SW-1:0] out_re, out_im;
  int checks = 0, failures = 0;

  ofdm_fft_rmcp #(.SW(SW), .DW(DW), .N(N), .CP(CP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl();
    int l [4] = '{-3, -1, 1, 3};
    return l[$urandom_range(0, 3)] * UNIT;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      int xr [N], xi [N];
      int tr [N + CP], ti [N + CP];
      for (int k = 0; k < N; k++) begin xr[k] = lvl(); xi[k] = lvl(); end
      for (int n = 0; n < N; n++) begin
        real sr, si;
        sr = 0; si = 0;
        for (int k = 0; k < N; k++) begin
          real a;
          a = 2.0 * PI * k * n / N;
          sr += xr[k] * $cos(a) - xi[k] * $sin(a);
          si += xi[k] * $cos(a) + xr[k] * $sin(a);
        end
        tr[CP + n] = int'(sr); ti[CP + n] = int'(si);
      end
      for (int n = 0; n < CP; n++) begin
        tr[n] = $signed($urandom_range(0, 2000)) - 1000;
        ti[n] = $signed($urandom_range(0, 2000)) - 1000;
      end
      for (int n = 0; n < N + CP; ) begin
        @(negedge clk);
        in_valid = 1'($urandom);
        in_re = DW'(tr[n]); in_im = DW'(ti[n]);
        @(posedge clk);
        if (in_valid && in_ready) n++;
      end
      @(negedge clk);
      in_valid = 0;
      for (int k = 0; k < N; ) begin
        out_ready = 1'($urandom);
        @(posedge clk);
        if (out_valid && out_ready) begin
          checks++;
          if (int'(out_re) != xr[k] || int'(out_im) != xi[k]) begin
            failures++;
            $display("FAIL bin %0d: got %0d,%0d want %0d,%0d", k, out_re, out_im, xr[k], xi[k]);
          end
          k++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      @(negedge clk);
      checks++;
      if (!in_ready) begin failures++; $display("FAIL: not ready for next symbol"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
