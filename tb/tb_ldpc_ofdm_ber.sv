// tb_ldpc_ofdm_ber: bit-error-rate sweep of the LDPC-coded OFDM chain at
// its default sizes, for QPSK and for 16-QAM.
//
// For each modulation and each of NLEV noise levels (the 16-QAM amplitudes
// are the QPSK ones times sqrt(5), the ratio of the two constellations' mean
// energies; the zero padding maps to 16-QAM corner points, so 16-QAM still
// runs at about 1.7 dB more SNR than QPSK), NFR frames of random
// messages go through the whole chain (encoder, mapper, IFFT and prefix,
// additive noise, prefix removal and FFT, demapper, decoder, message
// recovery) with every handshake always ready. The testbench is the
// channel: it adds to each time sample the sum of three uniform integers
// in [-a, a] per component (variance a(a+1) each), and reports the SNR per
// time sample from the measured signal power.
// Printed per point: SNR, channel bit errors (hard decisions of the values
// the decoder loaded), errors in the decoded codeword, and errors in the
// recovered message.
// Checks: every decoded frame equals the reference decoder run on the same
// values; the noiseless points are error-free; at every point where the
// channel makes errors but is below 5 % BER, decoding lowers the bit error
// count; the channel error count grows with the noise level; and 16-QAM
// makes more channel errors than QPSK at each level despite its higher SNR,
// its price for twice the bits per subcarrier.
module tb_ldpc_ofdm_ber;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P = P_DEF, ITER = ITER_DEF, NB = 5 * P;
  localparam int N = 64, CP = 16, DW = 16;
  localparam int NLEV = 5;
  localparam int NFR  = 30;
  localparam int LEVELS [2][NLEV] = '{'{0, 40, 70, 100, 130}, '{0, 89, 157, 224, 291}};

  logic clk = 0, rst_n = 1, qam16 = 0;
  initial #1 rst_n = 0;   // an edge, so that the asynchronous resets act at once
  logic tx_msg_valid = 0, tx_msg_bit = 0, tx_msg_ready, tx_pad_valid = 0, tx_pad_ready;
  logic tx_valid, tx_ready = 0, rx_msg_valid, rx_msg_bit, rx_msg_ready = 0;
  logic signed [DW-1:0] tx_re, tx_im, rx_re = '0, rx_im = '0;
  logic rx_valid = 0, rx_ready, start_i = 0, valid_o, busy, rx_dropped;
  logic [NCB-1:0] dec_o;

  int checks = 0, failures = 0;

  ldpc_ofdm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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

  int z_seen [$];
  always @(posedge clk)
    if (dut.u_dec.in_valid && dut.u_dec.in_ready) z_seen.push_back(int'(dut.u_dec.in_llr));

  // Sends one frame through the chain at noise amplitude namp; returns the
  // error counts and the signal energy of the transmitted samples.
  task automatic run_frame(input int namp, output int ch_err, output int cw_err,
                           output int msg_err, output int model_diff,
                           inout real sig_energy, inout int nsamp);
    bit cw [NB];
    bit got [NB];
    bit exp_hard [NB];
    int z [NB];
    bit msg [$];
    bit rmsg [$];
    int samp_re [$], samp_im [$];
    int bps, nbits, K, nout;

    bps   = qam16 ? 4 : 2;
    nbits = ((NB + N * bps - 1) / (N * bps)) * N * bps;
    K = ref_m.k_bits();
    for (int i = 0; i < K; i++) msg.push_back(1'($urandom));
    ref_m.encode(msg, cw);
    z_seen.delete();

    @(negedge clk);
    start_i = 1;
    @(negedge clk);
    start_i = 0;
    fork
      begin
        for (int b = 0; b < K; ) begin
          tx_msg_valid = 1;
          tx_msg_bit = msg[b];
          @(posedge clk);
          if (tx_msg_ready) b++;
          @(negedge clk);
        end
        tx_msg_valid = 0;
        @(posedge clk);
        while (!tx_msg_ready) @(posedge clk);
        @(negedge clk);
        for (int b = 0; b < nbits - NB; ) begin
          tx_pad_valid = 1;
          @(posedge clk);
          if (tx_pad_ready) b++;
          @(negedge clk);
        end
        tx_pad_valid = 0;
      end
      begin
        rx_msg_ready = 1;
        while (rmsg.size() < K) begin
          @(posedge clk);
          if (rx_msg_valid) rmsg.push_back(rx_msg_bit);
        end
        @(negedge clk);
        rx_msg_ready = 0;
      end
      begin
        int need;
        need = (nbits / (N * bps)) * (N + CP);
        tx_ready = 1;
        while (need > 0) begin
          @(posedge clk);
          if (tx_valid) begin
            int nr, ni;
            nr = 0; ni = 0;
            for (int s = 0; s < 3; s++) begin
              nr += $signed($urandom_range(0, 2 * namp)) - namp;
              ni += $signed($urandom_range(0, 2 * namp)) - namp;
            end
            sig_energy += real'(int'(tx_re)) ** 2 + real'(int'(tx_im)) ** 2;
            nsamp++;
            samp_re.push_back(int'(tx_re) + nr);
            samp_im.push_back(int'(tx_im) + ni);
            need--;
          end
        end
        @(negedge clk);
        tx_ready = 0;
      end
      begin
        int total, sent;
        total = (nbits / (N * bps)) * (N + CP);
        sent = 0;
        while (sent < total) begin
          rx_valid = (samp_re.size() > 0);
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

    ch_err = 0; cw_err = 0; msg_err = 0; model_diff = 0;
    if (z_seen.size() != NB) begin
      model_diff = NB;
      return;
    end
    for (int c = 0; c < NB; c++) begin
      z[c] = z_seen[c];
      if ((z[c] < 0) != cw[c]) ch_err++;
    end
    ref_m.decode(z, exp_hard);
    for (int c = 0; c < NB; c++) begin
      if (got[c] != exp_hard[c]) model_diff++;
      if (got[c] != cw[c]) cw_err++;
    end
    for (int i = 0; i < K; i++) if (rmsg[i] != msg[i]) msg_err++;
  endtask

  initial begin
    int ch_tot [2][NLEV];
    int cw_tot [2][NLEV];
    int msg_tot [2][NLEV];
    int K;
    ref_m = new(SHIFT_DEFAULT);
    K = ref_m.k_bits();
    repeat (3) @(posedge clk);
    rst_n = 1;
    $display("mod     noise   SNR(dB)  channel BER   decoded BER   message BER   frames fully corrected");
    for (int m = 0; m < 2; m++) begin
      qam16 = m[0];
      for (int l = 0; l < NLEV; l++) begin
        real energy, snr_db, noise_pow;
        int nsamp, mismatches, fixed_frames;
        energy = 0.0; nsamp = 0; mismatches = 0; fixed_frames = 0;
        ch_tot[m][l] = 0; cw_tot[m][l] = 0; msg_tot[m][l] = 0;
        for (int f = 0; f < NFR; f++) begin
          int ce, we, me, md;
          run_frame(LEVELS[m][l], ce, we, me, md, energy, nsamp);
          ch_tot[m][l] += ce;
          cw_tot[m][l] += we;
          msg_tot[m][l] += me;
          mismatches += md;
          if (ce > 0 && we == 0) fixed_frames++;
        end
        check(mismatches == 0,
              $sformatf("%s noise %0d: %0d decoded bits differ from the model",
                        qam16 ? "16-QAM" : "QPSK", LEVELS[m][l], mismatches));
        noise_pow = 2.0 * LEVELS[m][l] * (LEVELS[m][l] + 1);
        snr_db = (noise_pow > 0.0) ? 10.0 * $log10((energy / nsamp) / noise_pow) : 99.0;
        $display("%-6s  %5d   %6.1f   %10.5f    %10.5f    %10.5f    %0d of %0d",
                 qam16 ? "16-QAM" : "QPSK", LEVELS[m][l], snr_db,
                 real'(ch_tot[m][l]) / (NFR * NB), real'(cw_tot[m][l]) / (NFR * NB),
                 real'(msg_tot[m][l]) / (NFR * K), fixed_frames, NFR);
        if (LEVELS[m][l] == 0)
          check(ch_tot[m][l] == 0 && cw_tot[m][l] == 0 && msg_tot[m][l] == 0,
                "noiseless point error-free");
        else if (ch_tot[m][l] > 0 && ch_tot[m][l] * 20 < NFR * NB)
          check(cw_tot[m][l] < ch_tot[m][l],
                $sformatf("%s noise %0d: decoding lowers the error count (%0d -> %0d)",
                          qam16 ? "16-QAM" : "QPSK", LEVELS[m][l], ch_tot[m][l], cw_tot[m][l]));
        if (l > 1)
          check(ch_tot[m][l] > ch_tot[m][l-1],
                $sformatf("channel errors grow with the noise (%0d -> %0d)",
                          ch_tot[m][l-1], ch_tot[m][l]));
      end
    end
    for (int l = 1; l < NLEV; l++)
      check(ch_tot[1][l] > ch_tot[0][l],
            $sformatf("level %0d: 16-QAM %0d channel errors, QPSK %0d",
                      l, ch_tot[1][l], ch_tot[0][l]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
