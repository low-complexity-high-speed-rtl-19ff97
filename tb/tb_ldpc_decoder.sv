// tb_ldpc_decoder: self-checking test of the partially parallel decoder,
// at its default parallelism (PAR = 2) and as the conventional decoder
// (PAR = 1), both fed the same stimulus.
//
// Random codewords of the default (3,5) quasi-cyclic code are sent as
// BPSK-like intrinsic values with added noise, loaded with random gaps on
// in_valid, and decoded. Every decoded bit is compared with the flat
// fixed-point model of ldpc_ref_pkg; noiseless words must come back
// unchanged, noisy ones must at least sometimes be corrected, and the
// decoding latency must be (2*ITER + 1)*(P/PAR + 1) + 2 cycles from the last
// accepted input to the first valid_o, with PAR rows or columns per cycle.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P    = P_DEF;
  localparam int ITER = ITER_DEF;
  localparam int N    = 5 * P;
  localparam int NWORDS = 24;

  logic clk = 0, rst_n = 0;
  logic start_i = 0, in_valid = 0;
  llr_t in_llr = '0;
  logic           in_ready [2], valid_o [2], busy [2];
  logic [NCB-1:0] dec_o [2];
  localparam int PARS [2] = '{PAR_DEF, 1};

  int checks = 0, failures = 0;

  ldpc_decoder dut (
    .clk, .rst_n, .start_i, .in_valid, .in_llr,
    .in_ready(in_ready[0]), .valid_o(valid_o[0]), .dec_o(dec_o[0]), .busy(busy[0])
  );
  ldpc_decoder #(.PAR(1)) dut_conv (
    .clk, .rst_n, .start_i, .in_valid, .in_llr,
    .in_ready(in_ready[1]), .valid_o(valid_o[1]), .dec_o(dec_o[1]), .busy(busy[1])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ldpc_ref #(.P(P), .ITER(ITER)) ref_m;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit  cw [N];
    bit  exp_hard [N];
    bit  got [N];
    int  z [N];
    automatic int corrected = 0;
    ref_m = new(SHIFT_DEFAULT);
    $display("code: N=%0d rank(H)=%0d", N, ref_m.rank);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      int noise_amp, raw_err, done_cycles;
      done_cycles = 0;
      noise_amp = (w < 4) ? 0 : (w < 14 ? 2 : 3);
      ref_m.random_codeword(cw);
      check(ref_m.check(cw), "reference codeword satisfies H");
      raw_err = 0;
      for (int c = 0; c < N; c++) begin
        int v;
        v = cw[c] ? -4 : 4;
        for (int s = 0; s < 3; s++) v += $signed($urandom_range(0, 2 * noise_amp)) - noise_amp;
        z[c] = ref_m.clip(v, -16, 15);
        if ((z[c] < 0) != cw[c]) raw_err++;
      end
      ref_m.decode(z, exp_hard);
      // load
      @(negedge clk);
      start_i = 1;
      @(negedge clk);
      start_i = 0;
      for (int c = 0; c < N; ) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_llr   = llr_t'(z[c]);
        @(posedge clk);
        if (in_valid && in_ready[0]) begin
          check(in_ready[1], "both decoders load together");
          c++;
        end
        @(negedge clk);
      end
      in_valid = 0;
      // latency and output of both decoders
      for (int d = 0; d < 2; d++) begin
        int lat, nout, diff_ref, diff_cw;
        lat = 0;
        nout = 0;
        while (nout < P) begin
          @(posedge clk);
          if (nout == 0) lat++;
          if (valid_o[d]) begin
            for (int j = 0; j < NCB; j++) got[j * P + nout] = dec_o[d][j];
            if (nout == 0)
              check(lat == (2 * ITER + 1) * (P / PARS[d] + 1) + 2 - done_cycles,
                    $sformatf("PAR=%0d latency %0d cycles", PARS[d], lat + done_cycles));
            nout++;
          end
        end
        done_cycles += lat + P - 1;
        @(posedge clk);
        done_cycles++;
        check(!busy[d], "decoder idle after output");
        diff_ref = 0; diff_cw = 0;
        for (int c = 0; c < N; c++) begin
          check(got[c] == exp_hard[c],
                $sformatf("PAR=%0d word %0d bit %0d matches model", PARS[d], w, c));
          if (got[c] != exp_hard[c]) diff_ref++;
          if (got[c] != cw[c]) diff_cw++;
        end
        if (noise_amp == 0) check(diff_cw == 0, "noiseless word decoded");
        if (d == 0 && raw_err > 0 && diff_cw == 0) corrected++;
        $display("PAR=%0d word %0d noise %0d: channel errors %0d, after decoding %0d (model mismatches %0d)",
                 PARS[d], w, noise_amp, raw_err, diff_cw, diff_ref);
      end
    end
    check(corrected > 0, "at least one noisy word corrected");
    $display("noisy words fully corrected: %0d", corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
