# Quasi-cyclic LDPC coded OFDM baseband

This RTL is a small OFDM modem in which a low-density parity-check (LDPC) code
takes the place of the usual convolutional code and Viterbi decoder. Its
centre is a **partially parallel sum-product decoder for a (3,5)-regular
quasi-cyclic LDPC code**. Because the parity-check matrix is built from shifted
identity blocks, the decoder can keep every message in a small bank of its own.
Every bank is addressed by a plain modulo counter, and the decoder finishes one
row or one column of the matrix per clock cycle. In its enhanced form, which is
the default, each bank is split in two and the node units are doubled. The
decoder then finishes two rows or two columns per cycle, and the counters stay
plain counters.

Around the decoder sit a systematic encoder, a QPSK/16-QAM mapper, a 64-point
IFFT with cyclic-prefix insertion, and the receive mirror of these: prefix
removal and FFT, then a soft demapper. The demapper needs no estimate of the
channel noise. The last stage recovers the message from the decoded codeword.

The architecture follows the paper *Low-complexity high-speed quasi-cyclic LDPC
coded modulation in OFDM wireless communication system*. The paper describes the
decoder in detail: the bank organisation, the counter addressing, and the
check-node and variable-node datapaths. It names the other stages and fixes
little about them. Everything the paper leaves open (word formats, look-up
contents, the code itself, handshakes, OFDM sizes) is a choice made here and is
marked as such below and in each file header.

```
 message bits ─► ldpc_encoder ─► qam_mapper ─► ofdm_ifft_cp ─► tx samples ──► (channel)
                      (+ zero padding bits)
 (channel) ─► rx samples ─► ofdm_fft_rmcp ─► qam_demapper ─► ldpc_decoder ─► ldpc_msg_recover ─► message bits
                                                                 └──► dec_o (decoded codeword)
```

## The code

The parity-check matrix H is a 3 × 5 array of P × P blocks. Block (i,j) is the
identity matrix cyclically shifted by s_ij: row r of the block has its single
one in column (r + s_ij) mod P. This gives every check 5 ones (row weight) and
every code bit 3 ones (column weight).

* Default P = 14, so a codeword has N = 70 bits, and H has 42 rows of rank 40.
  A codeword therefore carries K = 30 message bits (rate 0.43).
* The default shifts (`ldpc_pkg::SHIFT_DEFAULT`) are

  | block row | s_i0 | s_i1 | s_i2 | s_i3 | s_i4 |
  |---|---|---|---|---|---|
  | 0 | 0 | 0 | 0 | 0 | 0 |
  | 1 | 0 | 5 | 8 | 11 | 12 |
  | 2 | 0 | 11 | 5 | 1 | 7 |

  They were picked so that no 4-cycle exists: for no two block rows i, i' and
  two block columns j, j' is s_ij − s_ij' + s_i'j' − s_i'j ≡ 0 (mod 14).
* The paper gives no code. Its only bank size is 14 entries, from its addressing
  example. P and SHIFT are parameters, so another code of the same (3,5)
  shape can be used by overriding them.

## Decoder (`ldpc_decoder`)

### Where each message lives

This section and the next describe the conventional decoder (`PAR = 1`). The
section after them shows how the enhanced form splits it.

There is one message bank `m_ij` per block, 15 in all, each P words deep. Word r
of `m_ij` holds the message on the single one in **row r** of block (i,j). The
same word holds the variable-to-check message during one pass and the
check-to-variable message during the other. Three check node units (`CPU i`)
serve the three block rows. Five variable node units (`VPU j`) serve the five
block columns. Each block column also has an intrinsic bank `Z_j` and a
decoded-bit bank `C_j`.

### Why counters are enough

* **Row pass.** In cycle k, CPU i needs the five messages of row k of block
  row i. They are word k of `m_i0 … m_i4`. Every bank reads and writes
  address k.
* **Column pass.** In cycle k, VPU j handles bit k of block column j. In block
  (i,j) that bit's one is in row (k − s_ij) mod P. So bank `m_ij` reads the
  sequence (P − s_ij) mod P, …, P − 1, 0, 1, …, which is a counter that starts
  at an offset and wraps at P. For s = 5 and P = 14 the sequence is
  9, 10, …, 13, 0, 1, …, 8.

`ldpc_addr_gen` is this loadable modulo-P counter, one per bank. Before each pass
it is loaded with 0 (row pass) or with the bank's offset (column pass). `Z_j` and
`C_j` use one shared plain counter.

### Enhanced form: PAR rows or columns per cycle

The parameter `PAR`, which must divide P, sets how many rows or columns the
decoder handles per cycle. `PAR = 1` is the conventional decoder described above.
The default is `PAR = 2`.

* **Banks.** Every bank, including `Z_j` and `C_j`, is split into PAR sub-banks
  of P/PAR words. Word r goes to sub-bank r mod PAR, at address r / PAR.
* **Node units.** There are PAR copies of each CPU and of each VPU.
* **Row pass.** In cycle c, CPU copy p handles row c·PAR + p. It reads word c of
  sub-bank p of its five banks, so every sub-bank again reads address c.
* **Column pass.** In cycle c, VPU copy q handles bit k = c·PAR + q. In bank
  `m_ij` that bit sits in row r = (k − s) mod P. PAR divides P, so r mod PAR is
  the same in every cycle: (q − s) mod PAR. Each VPU copy is therefore wired to
  one fixed sub-bank of each bank, and no crossbar is needed. Between cycles, r
  grows by PAR (mod P), so r / PAR grows by one (mod P/PAR). Each sub-bank is
  still addressed by a modulo-(P/PAR) counter, which starts at
  ((q − s) mod P) / PAR.

Take s = 5, P = 14, PAR = 2. VPU copy 0 reads sub-bank 1 at addresses
4, 5, 6, 0, 1, 2, 3 (rows 9, 11, 13, 1, 3, 5, 7). Copy 1 reads sub-bank 0 at
5, 6, 0, …, 4 (rows 10, 12, 0, …, 8).

The total bank size is the same as in the conventional decoder. The cost is PAR
times the node units and counters. The throughput grows linearly with PAR.

### Node units

Messages are stored as 5-bit sign-magnitude values (`msg_t`), with a 4-bit
magnitude in steps of 0.25. The check node computes the sum-product rule in the
log domain, with phi(x) = −ln(tanh(x/2)), and it is split across the two units:

* **`ldpc_cpu`** (check node, 5 inputs). Each input magnitude goes through
  phi (LUT-A). One adder sums the five results. Each output takes the total
  minus its own term. Each output sign is the parity of all signs combined with
  its own sign, which is the product of the other four. The output magnitude
  stays in the "phi domain", clipped to 15. phi(15) = 0, so the clip loses
  nothing.
* **`ldpc_vpu`** (variable node, 3 inputs). Each check message goes through
  phi again (LUT-B) and gets its sign back as a two's complement term. The unit
  forms Lv = Zv + Σ terms. Its sign is the hard decision: 1 when Lv < 0, since
  positive means bit 0. Each output is Lv − own term, saturated to 6 bits. The
  decoder converts it back to the 5-bit sign-magnitude format, clipped to 15,
  before writing it to the bank.

The phi table at 0.25 resolution is

| m | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7–11 | 12–15 |
|---|---|---|---|---|---|---|---|---|---|
| phi(m) | 15 | 8 | 6 | 4 | 3 | 2 | 2 | 1 | 0 |

(round(−ln(tanh(0.125·m)) / 0.25), with phi(0) clipped to 15.)

The port widths follow the paper's unit diagrams: 5-bit check inputs and
outputs, 5-bit VPU message inputs and 6-bit VPU outputs. The look-up contents,
the 0.25 step, the 5-bit intrinsic width and the sign-magnitude storage format
are choices made here.

### Schedule and timing

| phase | what happens | cycles |
|---|---|---|
| LOAD | after `start_i`, 5P intrinsic values are taken on `in_llr` in code-bit order (bit j·P+k → `Z_j[k]`); `in_ready` is high | 5P accepted values |
| INIT | a column pass with all check messages forced to zero (phi-domain 15), which copies Z into the banks | P/PAR+1 |
| ROW / COL | alternate, ITER = 10 times, no early stop | 2(P/PAR+1) per iteration |
| OUT | `valid_o` for P cycles; in the k-th, `dec_o[j]` is bit j·P+k | P+1 |

The banks are simple dual-port RAMs (`ldpc_mem_bank`) with one write port and
one registered read port. A word is read in one cycle, processed by the
combinational node unit, and written back to the same address in the next
cycle. A pass therefore takes P/PAR+1 cycles: PAR rows or columns per cycle,
plus the write-back of the last ones. Passes do not overlap, so no read ever sees a stale
word.

From the last accepted input to the first `valid_o` there are
(2·ITER + 1)(P/PAR + 1) + 2 cycles. That is 170 at the default sizes (PAR = 2)
and 317 for the conventional decoder (PAR = 1). The testbench checks both
counts. Loading (5P cycles) and output (P + 1 cycles) run one value or one
column at a time whatever PAR is.

## Encoder and message recovery

`ldpc_encoder` computes t = s·G without storing G. During elaboration, the
include file `ldpc_code.svh` reduces H to reduced row echelon form over GF(2).
The message bits fill the non-pivot positions, in order. Each pivot position
then gets the XOR of the message positions marked in its reduced row, which
makes H·t = 0 by construction.

* The encoder collects the K bits (K cycles) and fills in all parity bits in one
  cycle.
* It then shifts the codeword out, bit 0 first (N cycles).

`ldpc_msg_recover` gathers the decoder's P output cycles into a codeword. It
then sends the message bits, ŝ = t·R, where R is a right inverse of G
(G·R = I). For this systematic encoder, R just selects the non-pivot
positions.

## OFDM and modulation stages

* **`qam_mapper`**. 2 bits (QPSK) or 4 bits (16-QAM) per point, with the Gray
  tables of IEEE 802.11a: 00 → −3, 01 → −1, 11 → +1, 10 → +3 per axis for
  16-QAM, and 0 → −1, 1 → +1 for QPSK. Levels are multiplied by UNIT = 16 and
  not normalised. The mode is sampled with the first bit of each group.
* **`ofdm_fft_core`**. An in-place radix-2 decimation-in-time FFT. Input
  samples are written at bit-reversed addresses. It computes one butterfly per
  cycle, so a 64-point transform takes 6 × 32 = 192 cycles. Twiddles are Q2.14
  values computed from `$cos`/`$sin` at elaboration. The `INVERSE` parameter
  conjugates the twiddles. The `SCALE` parameter halves every stage (otherwise
  the stages saturate).
* **`ofdm_ifft_cp`**. Takes 64 points, shifts them left by 6, and runs the
  inverse transform with halving. It then sends 80 samples: the last 16 (the
  prefix) first, then all 64.
* **`ofdm_fft_rmcp`**. Drops the first 16 of each 80 received samples and runs
  the forward transform without scaling. It sends the 64 bins out shifted right
  by 6, rounded and saturated to 8 bits. The round trip has unit gain, so
  noiseless points come back exactly.
* **`qam_demapper`**. Computes max-log bit metrics without any noise variance:
  −I and −Q for the sign bits, and |I| − 2·UNIT and |Q| − 2·UNIT for the inner
  16-QAM bits. It scales them by 1/4 and saturates them to the decoder's 5-bit
  intrinsic format. It hands out one value per cycle.

The paper builds on IEEE 802.11a and compares radix-2, radix-4 and split-radix
FFTs without fixing one. The 64-point size, the 16-sample prefix, radix-2 and
the choice to use all 64 subcarriers for data (no pilots, no null carriers) are
choices made here.

## Top level (`ldpc_ofdm_top`) and its protocol

* **Transmit.** Message bits enter on `tx_msg_*` (valid/ready). The bits sent to
  the mapper are the code bits, followed by zero padding bits that the user
  requests on `tx_pad_valid/tx_pad_ready`, which fill the last OFDM symbol.
  Code bits have priority: a padding bit is taken only when the encoder has
  none to send. Request padding only after the encoder has finished sending,
  which is when `tx_msg_ready` is high again. Time samples leave on `tx_*`
  (valid/ready). `tx_msg_ready`/`tx_pad_ready` are low while the IFFT transforms
  or sends.
* **Receive.** Samples enter on `rx_*` (valid/ready). Pulse `start_i` before the
  first sample of a codeword's OFDM symbol(s). This also clears any leftover
  values in the demapper. The decoder takes the first 70 intrinsic values.
  Values that arrive while it is not loading are dropped and flagged on
  `rx_dropped`; these are the padding. The decoded codeword appears on
  `valid_o/dec_o`, and the message on `rx_msg_*` (valid/ready). The message must
  be taken before the next codeword's output starts.
* `qam16` selects the modulation of both paths.

The channel is outside the RTL. In simulation the testbench plays that role.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. All of them pass at their default sizes.

| testbench | what it checks |
|---|---|
| `tb_ldpc_cpu`, `tb_ldpc_vpu` | random and saturating inputs against formulas that use a phi table computed with real `$ln` |
| `tb_ldpc_mem_bank`, `tb_ldpc_addr_gen` | shadow model; wrap-around |
| `tb_ldpc_decoder` | the default decoder (PAR = 2) and the conventional one (PAR = 1), side by side on the same input: 24 random codewords at three noise levels, loaded with gaps; every bit compared with a flat edge-by-edge fixed-point model (`tb/ldpc_ref_pkg.sv`); noiseless words exact; latencies of 170 and 317 cycles |
| `tb_ldpc_encoder`, `tb_ldpc_msg_recover` | H·t = 0 and equality with the reference model's own elimination; back-pressure; stall-free timing K+1+N |
| `tb_qam_mapper`, `tb_qam_demapper` | Gray tables and metrics worked out in the testbench; both modes; stalls; clear |
| `tb_ofdm_fft_core`, `tb_ofdm_ifft_cp`, `tb_ofdm_fft_rmcp` | against a DFT computed in real arithmetic (within 6 LSB for the core and 8 for the IFFT stage; the receive stage must return the QAM points exactly); prefix copy and removal; 192-cycle transform |
| `tb_ldpc_ofdm_top` | 12 frames end to end at the default sizes, QPSK and 16-QAM alternating, three noise levels. Checks: decoder bit-exact with the model on the values it received, message recovered for every correctly decoded frame, exact padding drop count. Each of these must happen at least once: transmit back-pressure, receive stalls, decoder load gaps, padding drops, both modes, and frames with channel errors corrected |

`tb_ldpc_ofdm_ber` sweeps the noise for both modulations at the default sizes,
30 frames per point with all handshakes ready. It reports the SNR per time
sample and the bit error rates before decoding, after decoding and in the
recovered message. Its checks:

* each decoded frame matches the model
* the noiseless points have no errors
* decoding lowers the error count wherever the channel BER is between 0 and 5 %
* channel errors grow with the noise
* at each level, 16-QAM makes more channel errors than QPSK

One run gave:

| mod | SNR (dB) | channel BER | decoded BER | message BER |
|---|---|---|---|---|
| QPSK | 10.0 | 0 | 0 | 0 |
| QPSK | 5.2 | 0.036 | 0.0052 | 0.0033 |
| QPSK | 2.1 | 0.088 | 0.041 | 0.037 |
| QPSK | −0.1 | 0.172 | 0.143 | 0.143 |
| 16-QAM | 11.7 | 0.060 | 0 | 0 |
| 16-QAM | 6.8 | 0.155 | 0.096 | 0.101 |
| 16-QAM | 3.7 | 0.227 | 0.227 | 0.237 |

The 16-QAM amplitudes are the QPSK ones × √5. The zero padding maps to corner
points, so 16-QAM runs about 1.7 dB higher in SNR. The noise is a sum of three
uniform variables added to the time samples, so it is close to Gaussian but not
exactly. These are functional figures, not a reproduction of published curves.

The top-level run decodes and recovers all noiseless frames exactly. In most
noisy frames the decoder corrects every channel error.

To simulate with Verilator 5, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv \
          tb/tb_ldpc_ofdm_top.sv --top-module tb_ldpc_ofdm_top -o sim
./obj_dir/sim
```

For another testbench, replace `tb_ldpc_ofdm_top`. Drop `tb/ldpc_ref_pkg.sv` for
testbenches that do not import it (mapper, demapper, bank, counter and the FFT
testbenches). Once built, each simulation runs in well under a second.

## Where this design departs from the paper, and what is not here

* **The enhanced decoder's organisation is this design's own.** The paper
  claims a decoder whose throughput grows linearly for a small amount of extra
  hardware, but it does not say how it is organised. The split of each bank by
  row index modulo PAR, the duplicated node units and the default PAR = 2 are
  choices made here.
* **Passes have one extra cycle.** Each pass adds one write-back cycle (P/PAR+1
  instead of P/PAR), and there is an extra initial pass. A write-first bank or
  overlapping passes would remove these.
* **The code rate differs.** The paper's BER results are for rate-1/2 coding. A
  (3,5)-regular code has design rate 2/5, and the default code here has rate
  30/70. The BER curves over fading channels were not reproduced: only
  functional noisy runs were done.
* **The decoder runs a fixed 10 iterations.** There is no syndrome check or
  early stop.
* **The LUT-A/LUT-B contents, quantisation and word formats are choices made
  here.** So are the demapper's metrics and scale, the QAM level scaling, the
  OFDM sizes and subcarrier use, all handshakes, and the padding rule.
* **The variable node subtracts each term from the total.** The paper's diagram
  instead adds Zv to the sum of the other two terms. Both give the same value
  before saturation.
* **The encoder is not a QC shift-register encoder.** The paper only notes that
  such encoders can be built. This encoder is systematic, from the reduced H,
  with a parallel parity step and a shift-register output.
* **Not built:** the paper's idea of decoding convolutional codes with the same
  decoder, the conventional path that the LDPC path replaces (convolutional
  encoder, interleaver, de-interleaver, Viterbi decoder), an equaliser (the paper uses an AWGN
  channel and none), and the channel itself.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ldpc_decoder`, `ldpc_ofdm_top` | `P` | 14 | circulant size (bank depth); N = 5P |
| | `ITER` | 10 | decoding iterations |
| | `PAR` | 2 | rows or columns per cycle; must divide P (1 = conventional decoder) |
| | `SHIFT` | see table above | circulant shifts |
| OFDM stages, top | `N`, `CP` | 64, 16 | transform size, prefix length |
| | `SW`, `DW`, `UNIT` | 8, 16, 16 | point width, sample width, QAM unit level |
| `qam_demapper` | `SHIFT` | 2 | metric scale 2^−SHIFT |

Word formats shared by the decoder modules, the phi table and the default code
are in `rtl/ldpc_pkg.sv`. The elaboration-time code tables used by the encoder
and the message recovery are in `rtl/ldpc_code.svh`.
