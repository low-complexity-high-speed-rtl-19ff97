// tb_ofdm_ifft_cp: self-checking test of the IFFT + cyclic prefix stage.
// Random QPSK/16-QAM points are loaded; the N + CP output samples, taken
// with random out_ready, must start with a copy of the last CP samples and
// match sum_k X_k exp(+j*2*pi*k*n/N) (computed here in real arithmetic)
// within a few LSBs.
module tb_ofdm_ifft_cp;
  localparam int SW = 8, DW = 16, N = 64, CP = 16, UNIT = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0;
  logic signed [SW-1:0] in_re = '0, in_im = '0;
  logic in_ready, out_valid;
  logic signed [DW-1:0] out_re, out_im;
  int checks = 0, failures = 0;

  ofdm_ifft_cp #(.SW(SW), .DW(DW), .N(N), .CP(CP)) dut (.*);

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

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      int xr [N], xi [N];
      int yr [N + CP], yi [N + CP];
      for (int k = 0; k < N; k++) begin xr[k] = lvl(); xi[k] = lvl(); end
      for (int k = 0; k < N; ) begin
        @(negedge clk);
        in_valid = 1'($urandom);
        in_re = SW'(xr[k]); in_im = SW'(xi[k]);
        @(posedge clk);
        if (in_valid && in_ready) k++;
      end
      @(negedge clk);
      in_valid = 0;
      for (int n = 0; n < N + CP; ) begin
        out_ready = 1'($urandom);
        @(posedge clk);
        if (out_valid && out_ready) begin
          yr[n] = int'(out_re); yi[n] = int'(out_im); n++;
        end
        #1;
        if (n < N + CP) begin
          checks++;
          if (in_ready) begin failures++; $display("FAIL: loading while sending"); end
        end
        @(negedge clk);
      end
      out_ready = 0;
      for (int n = 0; n < CP; n++) begin
        checks++;
        if (yr[n] != yr[N + n] || yi[n] != yi[N + n]) begin
          failures++;
          $display("FAIL prefix sample %0d", n);
        end
      end
      for (int n = 0; n < N; n++) begin
        real sr, si;
        sr = 0; si = 0;
        for (int k = 0; k < N; k++) begin
          real a;
          a = 2.0 * PI * k * n / N;
          sr += xr[k] * $cos(a) - xi[k] * $sin(a);
          si += xi[k] * $cos(a) + xr[k] * $sin(a);
        end
        checks++;
        if (rabs(sr - yr[CP + n]) > 8.0 || rabs(si - yi[CP + n]) > 8.0) begin
          failures++;
          $display("FAIL sample %0d: got %0d,%0d want %f,%f", n, yr[CP + n], yi[CP + n], sr, si);
        end
      end
      @(negedge clk);
      checks++;
      if (!in_ready) begin failures++; $display("FAIL: not ready for next symbol"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
