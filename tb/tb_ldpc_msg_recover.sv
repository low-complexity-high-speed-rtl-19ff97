// tb_ldpc_msg_recover: self-checking test of message recovery.
// Codewords of random messages (reference model encoding) are delivered in
// the decoder's output order, NCB bits per cycle with gaps; the message
// bits that come out, with random back-pressure, must equal the message.
module tb_ldpc_msg_recover;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P = P_DEF, N = 5 * P;
  logic clk = 0, rst_n = 1;
  logic dec_valid = 0, msg_valid, msg_bit, msg_ready = 0;
  logic [NCB-1:0] dec_bits = '0;
  int checks = 0, failures = 0;

  ldpc_msg_recover dut (.*);

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
      bit cw [N];
      msg.delete();
      for (int i = 0; i < K; i++) msg.push_back(1'($urandom));
      ref_m.encode(msg, cw);
      for (int k = 0; k < P; ) begin
        @(negedge clk);
        dec_valid = 1'($urandom);
        for (int j = 0; j < NCB; j++) dec_bits[j] = cw[j * P + k];
        @(posedge clk);
        if (dec_valid) k++;
      end
      @(negedge clk);
      dec_valid = 0;
      for (int i = 0; i < K; ) begin
        msg_ready = 1'($urandom);
        @(posedge clk);
        if (msg_valid && msg_ready) begin
          checks++;
          if (msg_bit != msg[i]) begin failures++; $display("FAIL word %0d bit %0d", w, i); end
          i++;
        end
        @(negedge clk);
      end
      msg_ready = 0;
      checks++;
      if (msg_valid) begin failures++; $display("FAIL: extra bits"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
