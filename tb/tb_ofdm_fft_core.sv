// tb_ofdm_fft_core: self-checking test of the radix-2 FFT engine.
// Two engines: forward without scaling, inverse with per-stage halving.
// Random frames are loaded; every output bin is compared with a DFT
// computed here in real arithmetic (tolerance a few LSBs), and the
// transform must take (N/2)*log2(N) cycles from the last input to 'done'.
module tb_ofdm_fft_core;
  localparam int DW = 16, N = 64, L = 6;
  localparam int RUN_CYCLES = (N / 2) * L;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic                 v [2];
  logic signed [DW-1:0] ire [2], iim [2];
  logic                 rdy [2], dn [2];
  logic [L-1:0]         ra [2];
  logic signed [DW-1:0] ore [2], oim [2];
  logic                 rel [2];

  ofdm_fft_core #(.DW(DW), .N(N), .INVERSE(1'b0), .SCALE(1'b0)) u_fwd (
    .clk, .rst_n, .in_valid(v[0]), .in_re(ire[0]), .in_im(iim[0]), .in_ready(rdy[0]),
    .done(dn[0]), .rd_addr(ra[0]), .rd_re(ore[0]), .rd_im(oim[0]), .release_i(rel[0]));
  ofdm_fft_core #(.DW(DW), .N(N), .INVERSE(1'b1), .SCALE(1'b1)) u_inv (
    .clk, .rst_n, .in_valid(v[1]), .in_re(ire[1]), .in_im(iim[1]), .in_ready(rdy[1]),
    .done(dn[1]), .rd_addr(ra[1]), .rd_re(ore[1]), .rd_im(oim[1]), .release_i(rel[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int e, int amp);
    real xr [N], xi [N];
    int  cyc, maxerr;
    for (int n = 0; n < N; n++) begin
      xr[n] = $signed($urandom_range(0, 2 * amp)) - amp;
      xi[n] = $signed($urandom_range(0, 2 * amp)) - amp;
    end
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      v[e] = 1; ire[e] = DW'($rtoi(xr[n])); iim[e] = DW'($rtoi(xi[n]));
      checks++;
      if (!rdy[e]) failures++;
    end
    @(negedge clk);
    v[e] = 0;
    cyc = 1;
    while (!dn[e]) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != RUN_CYCLES + 1) begin
      failures++;
      $display("FAIL: transform took %0d cycles", cyc);
    end
    maxerr = 0;
    for (int k = 0; k < N; k++) begin
      real sr, si, sg;
      int  er, ei;
      sr = 0; si = 0;
      sg = (e == 1) ? 1.0 : -1.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a  = 2.0 * PI * k * n / N;
        sr += xr[n] * $cos(a) - sg * xi[n] * $sin(a);
        si += xi[n] * $cos(a) + sg * xr[n] * $sin(a);
      end
      if (e == 1) begin sr = sr / N; si = si / N; end
      ra[e] = L'(k);
      #1;
      er = $rtoi(sr) - int'(ore[e]); if (er < 0) er = -er;
      ei = $rtoi(si) - int'(oim[e]); if (ei < 0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (er > 6 || ei > 6) begin
        failures++;
        $display("FAIL e=%0d bin %0d: got %0d,%0d want %f,%f", e, k, ore[e], oim[e], sr, si);
      end
    end
    $display("engine %0d: max error %0d LSB", e, maxerr);
    @(negedge clk);
    rel[e] = 1;
    @(negedge clk);
    rel[e] = 0;
    checks++;
    if (!rdy[e]) failures++;
  endtask

  initial begin
    for (int e = 0; e < 2; e++) begin
      v[e] = 0; ire[e] = '0; iim[e] = '0; ra[e] = '0; rel[e] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      run(0, 250);
      run(1, 8000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
