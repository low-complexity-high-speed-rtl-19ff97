// tb_qam_mapper: self-checking test of the QPSK / 16-QAM mapper.
// Random bits in both modes, with gaps; each emitted point is compared with
// the Gray table worked out here (I from b0[b1], Q from b1 or b2 b3).
module tb_qam_mapper;
  localparam int SW = 8, UNIT = 16;
  logic clk = 0, rst_n = 0, clear = 0, qam16 = 0, bit_valid = 0, bit_i = 0;
  logic sym_valid;
  logic signed [SW-1:0] sym_i, sym_q;
  int checks = 0, failures = 0, nq = 0, n16 = 0;

  qam_mapper #(.SW(SW), .UNIT(UNIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl(bit a, bit b);   // 00 -3, 01 -1, 11 +1, 10 +3
    return a ? (b ? 1 : 3) * UNIT : (b ? -1 : -3) * UNIT;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 400; s++) begin
      bit m;
      bit b [4];
      int nb, ei, eq;
      m  = 1'($urandom);
      nb = m ? 4 : 2;
      for (int k = 0; k < nb; k++) begin
        b[k] = 1'($urandom);
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          bit_valid = 0;
          @(negedge clk);
        end
        bit_valid = 1; bit_i = b[k]; qam16 = (k == 0) ? m : ~m;  // mode only sampled on b0
      end
      @(negedge clk);
      bit_valid = 0;
      checks++;
      if (!sym_valid) begin
        failures++;
        $display("FAIL: no symbol after group %0d", s);
      end
      if (m) begin ei = lvl(b[0], b[1]); eq = lvl(b[2], b[3]); n16++; end
      else   begin ei = b[0] ? UNIT : -UNIT; eq = b[1] ? UNIT : -UNIT; nq++; end
      checks++;
      if (int'(sym_i) != ei || int'(sym_q) != eq) begin
        failures++;
        $display("FAIL sym %0d mode %0d: got %0d,%0d want %0d,%0d", s, m, sym_i, sym_q, ei, eq);
      end
    end
    // clear drops a partial group
    @(negedge clk); bit_valid = 1; bit_i = 1; qam16 = 0;
    @(negedge clk); bit_valid = 0; clear = 1;
    @(negedge clk); clear = 0; bit_valid = 1; bit_i = 0;
    @(negedge clk); bit_valid = 1; bit_i = 0;
    @(negedge clk); bit_valid = 0;
    checks++;
    if (!(sym_valid && sym_i == -UNIT && sym_q == -UNIT)) failures++;
    checks++;
    if (nq == 0 || n16 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
