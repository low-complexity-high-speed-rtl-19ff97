// tb_qam_demapper: self-checking test of the soft demapper.
// Random received points in both modes; the values handed out, one per
// accepted cycle with random back-pressure, are compared with the max-log
// metrics computed here, scaled by 1/4 (arithmetic shift) and clipped to
// -16..15. Also checks sym_ready and that clear drops pending values.
module tb_qam_demapper;
  import ldpc_pkg::*;
  localparam int SW = 8, UNIT = 16, SHIFT = 2;
  logic clk = 0, rst_n = 0, clear = 0, qam16 = 0, sym_valid = 0;
  logic signed [SW-1:0] sym_i = '0, sym_q = '0;
  logic sym_ready, llr_valid, llr_ready = 0;
  llr_t llr;
  int checks = 0, failures = 0;

  qam_demapper #(.SW(SW), .UNIT(UNIT), .SHIFT(SHIFT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sc(int v);
    int s;
    s = v >>> SHIFT;
    return (s > 15) ? 15 : (s < -16) ? -16 : s;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 500; s++) begin
      int yi, yq, nb;
      int e [4];
      bit m;
      m  = 1'($urandom);
      yi = $signed($urandom_range(0, 255)) - 128;
      yq = $signed($urandom_range(0, 255)) - 128;
      if (m) begin
        e[0] = sc(-yi); e[1] = sc(iabs(yi) - 2 * UNIT);
        e[2] = sc(-yq); e[3] = sc(iabs(yq) - 2 * UNIT);
        nb = 4;
      end else begin
        e[0] = sc(-yi); e[1] = sc(-yq);
        nb = 2;
      end
      @(negedge clk);
      checks++;
      if (!sym_ready) begin failures++; $display("FAIL: not ready"); end
      sym_valid = 1; sym_i = SW'(yi); sym_q = SW'(yq); qam16 = m;
      @(negedge clk);
      sym_valid = 0;
      for (int k = 0; k < nb; ) begin
        llr_ready = 1'($urandom);
        checks++;
        if (!llr_valid || sym_ready) begin failures++; $display("FAIL: valid/ready"); end
        if (llr_ready) begin
          checks++;
          if (int'(llr) != e[k]) begin
            failures++;
            $display("FAIL sym %0d bit %0d: got %0d want %0d (y=%0d,%0d m=%0d)", s, k, llr, e[k], yi, yq, m);
          end
          k++;
        end
        @(negedge clk);
      end
      llr_ready = 0;
      checks++;
      if (llr_valid) begin failures++; $display("FAIL: extra value"); end
    end
    // clear
    sym_valid = 1; qam16 = 1;
    @(negedge clk);
    sym_valid = 0; clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (llr_valid || !sym_ready) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
