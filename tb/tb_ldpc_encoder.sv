// tb_ldpc_encoder: self-checking test of the systematic LDPC encoder.
// Random messages are sent with gaps and the codeword is taken with random
// back-pressure. Each codeword must satisfy every parity check of H, and
// equal the reference model's systematic encoding (its own elimination of
// H); the stall-free timing of CK + 1 + N cycles is checked once.
module tb_ldpc_encoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P = P_DEF, N = 5 * P;
  logic clk = 0, rst_n = 1;
  logic msg_valid = 0, msg_bit = 0, msg_ready, cw_valid, cw_bit, cw_ready = 0;
  int checks = 0, failures = 0;

  ldpc_encoder dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ldpc_ref #(.P(P)) ref_m;

  initial begin
    int K;
    ref_m = new(SHIFT_DEFAULT);
    K = ref_m.k_bits();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 40; w++) begin
      bit msg [$];
      bit want [N];
      bit got [N];
      bit gaps;
      int cyc;
      gaps = (w != 0);
      msg.delete();
      for (int i = 0; i < K; i++) msg.push_back(1'($urandom));
      if (w == 1) for (int i = 0; i < K; i++) msg[i] = 1;
      ref_m.encode(msg, want);
      cyc = 0;
      for (int i = 0; i < K; ) begin
        @(negedge clk);
        msg_valid = !gaps || ($urandom_range(0, 3) != 0);
        msg_bit   = msg[i];
        @(posedge clk);
        cyc++;
        if (msg_valid && msg_ready) i++;
      end
      @(negedge clk);
      msg_valid = 0;
      for (int c = 0; c < N; ) begin
        cw_ready = !gaps || 1'($urandom);
        @(posedge clk);
        cyc++;
        if (cw_valid && cw_ready) begin
          got[c] = cw_bit;
          c++;
        end
        @(negedge clk);
      end
      cw_ready = 0;
      if (!gaps) begin
        checks++;
        if (cyc != K + 1 + N) begin
          failures++;
          $display("FAIL: %0d cycles, want %0d", cyc, K + 1 + N);
        end
      end
      checks++;
      if (!ref_m.check(got)) begin failures++; $display("FAIL word %0d: H.t != 0", w); end
      for (int c = 0; c < N; c++) begin
        checks++;
        if (got[c] != want[c]) begin failures++; $display("FAIL word %0d bit %0d", w, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
