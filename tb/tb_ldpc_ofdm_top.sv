// tb_ldpc_ofdm_top: end-to-end test of the LDPC-coded OFDM chain at its
// default sizes.
//
// For each frame a random message is encoded by the design's LDPC encoder,
// padded with zero bits to a whole OFDM symbol, and sent through the
// transmit path. The testbench is the
// channel: it takes the N + CP time samples, adds uniform-sum noise and
// feeds them to the receive path, with random stalls on both handshakes.
// QPSK and 16-QAM frames alternate.
// Checks per frame: the decoder output equals the reference decoder run on
// the intrinsic values that actually reached the decoder; noiseless frames
// return the codeword (the reference model's encoding of the message) and
// the message; a frame decoded to the right codeword returns the message;
// the number of dropped padding values is exact.
// Mechanisms counted (each must occur): QPSK frames, 16-QAM frames, padding
// drops, transmit back-pressure, receive stalls, decoder load gaps, and
// noisy frames whose channel errors the decoder fully corrected.
module tb_ldpc_ofdm_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P = P_DEF, ITER = ITER_DEF, NB = 5 * P;
  localparam int N = 64, CP = 16, DW = 16;
  localparam int NFRAMES = 12;

  logic clk = 0, rst_n = 1, qam16 = 0;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous resets act at once
  logic tx_msg_valid = 0, tx_msg_bit = 0, tx_msg_ready, tx_pad_valid = 0, tx_pad_ready;
  logic tx_valid, tx_ready = 0, rx_msg_valid, rx_msg_bit, rx_msg_ready = 0;
  logic signed [DW-1:0] tx_re, tx_im, rx_re = '0, rx_im = '0;
  logic rx_valid = 0, rx_ready, start_i = 0, valid_o, busy, rx_dropped;
  logic [NCB-1:0] dec_o;

  int checks = 0, failures = 0;
  int n_qpsk = 0, n_16qam = 0, n_drop = 0, n_tx_stall = 0, n_rx_stall = 0;
  int n_load_gap = 0, n_corrected = 0;

  ldpc_ofdm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  ldpc_ref #(.P(P), .ITER(ITER)) ref_m;

  // observation of what the decoder loads and what is dropped
  int z_seen [$];
  int drops_in_frame;
  always @(posedge clk) begin
    if (dut.u_dec.in_valid && dut.u_dec.in_ready) z_seen.push_back(int'(dut.u_dec.in_llr));
    if (rx_dropped) drops_in_frame++;
    if (dut.u_dec.in_ready && !dut.u_dec.in_valid) n_load_gap++;
    if (tx_valid && !tx_ready) n_tx_stall++;
    if (rx_ready && !rx_valid) n_rx_stall++;
  end

  initial begin
    ref_m = new(SHIFT_DEFAULT);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      bit cw [NB];
      bit got [NB];
      bit exp_hard [NB];
      int z [NB];
      int bps, nbits, namp, raw_err, nout;
      bit msg [$];
      bit rmsg [$];
      int K;
      int samp_re [$], samp_im [$];

      qam16 = f[0];
      bps   = qam16 ? 4 : 2;
      nbits = ((NB + N * bps - 1) / (N * bps)) * N * bps;
      namp  = (f < 4) ? 0 : ((f < 8) ? 70 : 110);
      if (qam16) n_16qam++; else n_qpsk++;
      K = ref_m.k_bits();
      msg.delete();
      rmsg.delete();
      for (int i = 0; i < K; i++) msg.push_back(1'($urandom));
      ref_m.encode(msg, cw);
      z_seen.delete();
      samp_re.delete();
      samp_im.delete();
      drops_in_frame = 0;

      @(negedge clk);
      start_i = 1;
      @(negedge clk);
      start_i = 0;

      fork
        // transmit: message bits, then padding once the codeword is out
        begin
          for (int b = 0; b < K; ) begin
            tx_msg_valid = ($urandom_range(0, 4) != 0);
            tx_msg_bit = msg[b];
            @(posedge clk);
            if (tx_msg_valid && tx_msg_ready) b++;
            @(negedge clk);
          end
          tx_msg_valid = 0;
          @(posedge clk);
          while (!tx_msg_ready) @(posedge clk);
          @(negedge clk);
          for (int b = 0; b < nbits - NB; ) begin
            tx_pad_valid = ($urandom_range(0, 4) != 0);
            @(posedge clk);
            if (tx_pad_valid && tx_pad_ready) b++;
            @(negedge clk);
          end
          tx_pad_valid = 0;
        end
        // recovered message
        begin
          while (rmsg.size() < K) begin
            rx_msg_ready = ($urandom_range(0, 3) != 0);
            @(posedge clk);
            if (rx_msg_valid && rx_msg_ready) rmsg.push_back(rx_msg_bit);
            @(negedge clk);
          end
          rx_msg_ready = 0;
        end
        // channel: take transmit samples, add noise
        begin
          int need;
          need = (nbits / (N * bps)) * (N + CP);
          while (need > 0) begin
            tx_ready = ($urandom_range(0, 3) != 0);
            @(posedge clk);
            if (tx_valid && tx_ready) begin
              int nr, ni;
              nr = 0; ni = 0;
              for (int s = 0; s < 3; s++) begin
                nr += $signed($urandom_range(0, 2 * namp)) - namp;
                ni += $signed($urandom_range(0, 2 * namp)) - namp;
              end
              samp_re.push_back(int'(tx_re) + nr);
              samp_im.push_back(int'(tx_im) + ni);
              need--;
            end
            @(negedge clk);
          end
          tx_ready = 0;
        end
        // receive samples
        begin
          int total, sent;
          total = (nbits / (N * bps)) * (N + CP);
          sent = 0;
          while (sent < total) begin
            rx_valid = (samp_re.size() > 0) && ($urandom_range(0, 4) != 0);
            if (rx_valid) begin rx_re = DW'(samp_re[0]); rx_im = DW'(samp_im[0]); end
            @(posedge clk);
            if (rx_valid && rx_ready) begin
              void'(samp_re.pop_front());
              void'(samp_im.pop_front());
              sent++;
            end
            @(negedge clk);
          end
          rx_valid = 0;
        end
        // decoded bits
        begin
          nout = 0;
          while (nout < P) begin
            @(posedge clk);
            if (valid_o) begin
              for (int j = 0; j < NCB; j++) got[j * P + nout] = dec_o[j];
              nout++;
            end
          end
        end
      join
      repeat (4 * N) @(posedge clk);   // let the padding drain

      check(z_seen.size() == NB, $sformatf("frame %0d: %0d values loaded", f, z_seen.size()));
      check(drops_in_frame == nbits - NB,
            $sformatf("frame %0d: %0d padding values dropped, want %0d", f, drops_in_frame, nbits - NB));
      raw_err = 0;
      for (int c = 0; c < NB; c++) begin
        z[c] = z_seen[c];
        if ((z[c] < 0) != cw[c]) raw_err++;
      end
      ref_m.decode(z, exp_hard);
      begin
        int d_ref, d_cw;
        d_ref = 0; d_cw = 0;
        for (int c = 0; c < NB; c++) begin
          if (got[c] != exp_hard[c]) d_ref++;
          if (got[c] != cw[c]) d_cw++;
        end
        check(d_ref == 0, $sformatf("frame %0d: %0d bits differ from the model", f, d_ref));
        if (namp == 0) check(d_cw == 0 && raw_err == 0, $sformatf("frame %0d: noiseless frame", f));
        if (raw_err > 0 && d_cw == 0) n_corrected++;
        if (d_cw == 0) begin
          int d_msg;
          d_msg = 0;
          for (int i = 0; i < K; i++) if (rmsg[i] != msg[i]) d_msg++;
          check(d_msg == 0, $sformatf("frame %0d: %0d message bits wrong", f, d_msg));
        end
        $display("frame %0d %s noise %0d: channel errors %0d, decoded errors %0d",
                 f, qam16 ? "16-QAM" : "QPSK", namp, raw_err, d_cw);
      end
      if (drops_in_frame > 0) n_drop++;
    end
    $display("mechanisms: qpsk=%0d 16qam=%0d drop_frames=%0d tx_stall=%0d rx_stall=%0d load_gap=%0d corrected=%0d",
             n_qpsk, n_16qam, n_drop, n_tx_stall, n_rx_stall, n_load_gap, n_corrected);
    check(n_qpsk > 0, "QPSK frames");
    check(n_16qam > 0, "16-QAM frames");
    check(n_drop > 0, "padding drops");
    check(n_tx_stall > 0, "transmit back-pressure");
    check(n_rx_stall > 0, "receive stalls");
    check(n_load_gap > 0, "decoder load gaps");
    check(n_corrected > 0, "noisy frames corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
