// ldpc_decoder: partially parallel sum-product decoder for a (3,5)-regular
// quasi-cyclic LDPC code of length 5*P, processing PAR rows or columns of
// the parity-check matrix per clock cycle.
//
// Structure. The parity-check matrix is a 3 x 5 array of P x P shifted
// identity blocks. Each block (i,j) owns a message bank m_ij of P words:
// word r holds the message on the one in row r of that block. For PAR > 1
// every bank is split into PAR sub-banks of P/PAR words, word r going to
// sub-bank r mod PAR at address r / PAR. There are PAR check node units
// per block row (CPU i,p) and PAR variable node units per block column
// (VPU j,q), an intrinsic bank Z_j and a decoded-bit bank C_j per block
// column (split the same way, by bit index), and one modulo-(P/PAR) address
// counter per sub-bank. PAR = 1 is the conventional decoder.
//
// Operation (a "cycle c" below is the c-th cycle of a pass, c < P/PAR).
//   LOAD : after start_i, 5*P intrinsic values are taken on in_llr, one per
//          accepted cycle, in code-bit order (bit n = j*P + k goes to Z_j[k]).
//   INIT : one column pass with every check message forced to zero, which
//          copies the intrinsic values into the message banks.
//   ROW  : check-to-variable pass. In cycle c, CPU (i,p) handles row
//          c*PAR + p of block row i: it reads word c of sub-bank p of its
//          five banks and writes its results back to the same words.
//   COL  : variable-to-check pass. In cycle c, VPU (j,q) handles bit
//          k = c*PAR + q of block column j. In bank m_ij that bit sits in
//          row r = (k - s_ij) mod P. Since PAR divides P, r mod PAR is the
//          same in every cycle, so VPU (j,q) is wired to one fixed sub-bank,
//          and r / PAR steps by one modulo P/PAR: each sub-bank counter just
//          starts at its own offset. The hard decisions go to C_j.
//   ROW and COL alternate for ITER iterations (no early stop), then
//   OUT  : P cycles with valid_o high; dec_o[j] is decoded bit j*P + k in the
//          k-th of them.
// Timing. Banks read synchronously, so a word read in one cycle is
// processed and written back in the next; each pass takes P/PAR + 1 cycles
// (PAR rows or columns per cycle plus the last write-back). Decoding takes
// (2*ITER + 1)*(P/PAR + 1) cycles after the last input; the first valid_o
// follows one cycle later. The output phase takes P + 1 cycles.
// Follows the decoder description: CPUs per block row, VPUs per block
// column, a bank per nonzero block, counters as address generators, a row
// or column per unit and cycle with dual-port banks, 10 iterations, and a
// throughput raised linearly by parallel units. How the parallel decoder
// splits the banks (by row index modulo PAR), the load and output order,
// the idle cycle between passes, the initial pass, PAR = 2 and the default
// code (P = 14, SHIFT) are this design's choices.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int         P     = P_DEF,
  parameter int         ITER  = ITER_DEF,
  parameter int         PAR   = PAR_DEF,   // must divide P
  parameter shift_tab_t SHIFT = SHIFT_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,   // begin a codeword (accepted when idle)
  input  logic             in_valid,  // intrinsic value on in_llr
  input  llr_t             in_llr,
  output logic             in_ready,  // high while loading
  output logic             valid_o,   // dec_o holds decoded bits
  output logic [NCB-1:0]   dec_o,
  output logic             busy
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_INIT, S_ROW, S_COL, S_OUT} state_e;

  localparam int PD = P / PAR;                       // sub-bank depth
  localparam int AW = (PD > 1) ? $clog2(PD) : 1;     // sub-bank address
  localparam int QW = (PAR > 1) ? $clog2(PAR) : 1;   // sub-bank index
  localparam int CW = $clog2(P + 1);
  localparam int IW = (ITER > 1) ? $clog2(ITER) : 1;
  localparam int JW = $clog2(NCB);

  state_e          state, state_n;
  logic [CW-1:0]   cnt;
  logic [IW-1:0]   iter;
  logic [QW-1:0]   lq, oq, oq_q;   // load / output position: sub-bank ...
  logic [AW-1:0]   la, oa;         // ... and address within it
  logic [JW-1:0]   lj;
  logic            rd, wr;
  logic            pass_end;

  // ---------------------------------------------------------------- control
  assign in_ready = (state == S_LOAD);
  assign busy     = (state != S_IDLE);
  assign pass_end = (cnt == ((state == S_OUT) ? CW'(P) : CW'(PD)));
  assign rd       = (state inside {S_INIT, S_ROW, S_COL, S_OUT}) && !pass_end;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE: if (start_i) state_n = S_LOAD;
      S_LOAD: if (in_valid && lq == QW'(PAR - 1) && la == AW'(PD - 1) && lj == JW'(NCB - 1))
                state_n = S_INIT;
      S_INIT: if (pass_end) state_n = S_ROW;
      S_ROW:  if (pass_end) state_n = S_COL;
      S_COL:  if (pass_end) state_n = (iter == IW'(ITER - 1)) ? S_OUT : S_ROW;
      S_OUT:  if (pass_end) state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      iter  <= '0;
      lq    <= '0;
      la    <= '0;
      lj    <= '0;
      oq    <= '0;
      oa    <= '0;
      oq_q  <= '0;
      wr    <= 1'b0;
    end else begin
      state <= state_n;
      wr    <= rd;
      oq_q  <= oq;
      cnt   <= (state_n != state) ? '0 : (rd ? cnt + CW'(1) : cnt);
      if (state == S_IDLE) iter <= '0;
      else if (state == S_COL && pass_end) iter <= iter + IW'(1);
      // load position: bit k of block column lj is Z_lj[k], k = la*PAR + lq
      if (state == S_IDLE) begin
        lq <= '0;
        la <= '0;
        lj <= '0;
      end else if (state == S_LOAD && in_valid) begin
        if (lq != QW'(PAR - 1)) begin
          lq <= lq + QW'(1);
        end else begin
          lq <= '0;
          if (la != AW'(PD - 1)) begin
            la <= la + AW'(1);
          end else begin
            la <= '0;
            lj <= lj + JW'(1);
          end
        end
      end
      // output position, same order
      if (state != S_OUT) begin
        oq <= '0;
        oa <= '0;
      end else if (rd) begin
        if (oq != QW'(PAR - 1)) begin
          oq <= oq + QW'(1);
        end else begin
          oq <= '0;
          oa <= (oa == AW'(PD - 1)) ? '0 : oa + AW'(1);
        end
      end
    end
  end

  // Address counters are (re)loaded on the cycle before a pass begins.
  logic ag_load;
  assign ag_load = (state_n != state);

  // Address counter shared by the Z and C sub-banks during passes.
  logic [AW-1:0] k_addr, k_addr_q;
  ldpc_addr_gen #(.P(PD)) u_ag_k (
    .clk, .rst_n, .load(ag_load), .start('0), .en(rd), .addr(k_addr)
  );

  always_ff @(posedge clk) k_addr_q <= k_addr;

  // ------------------------------------------------- message banks and CPUs
  msg_t m_rdata [PAR][NRB][NCB];
  msg_t rc      [PAR][NRB][NCB];
  msg_t vin     [PAR][NCB][NRB];
  ext_t lv      [PAR][NCB][NRB];
  logic hard [PAR][NCB];

  for (genvar i = 0; i < NRB; i++) begin : g_row
    for (genvar j = 0; j < NCB; j++) begin : g_col
      localparam int S = int'(SHIFT[i][j]) % P;
      for (genvar p = 0; p < PAR; p++) begin : g_sub
        // VPU copy served by this sub-bank in the column pass, and the row
        // its first column hits: (Q - S) mod P, stored at address R0 / PAR.
        localparam int Q  = (p + S) % PAR;
        localparam int R0 = (Q - S + P) % P;
        localparam logic [AW-1:0] COL_START = AW'(R0 / PAR);

        logic [AW-1:0] a, a_q;
        logic [MW-1:0] rdata_raw;
        msg_t          wdata;

        ldpc_addr_gen #(.P(PD)) u_ag (
          .clk, .rst_n, .load(ag_load),
          .start((state_n == S_ROW) ? AW'(0) : COL_START),
          .en(rd), .addr(a)
        );

        always_ff @(posedge clk) a_q <= a;

        assign wdata = (state == S_ROW) ? rc[p][i][j] : ext_to_msg(lv[Q][j][i]);

        ldpc_mem_bank #(.W(MW), .DEPTH(PD)) u_m (
          .clk,
          .we(wr && (state inside {S_INIT, S_ROW, S_COL})),
          .waddr(a_q), .wdata(wdata),
          .re(rd), .raddr(a), .rdata(rdata_raw)
        );

        assign m_rdata[p][i][j] = msg_t'(rdata_raw);
        assign vin[Q][j][i]     = (state == S_INIT) ? MSG_ZERO : m_rdata[p][i][j];
      end
    end

    for (genvar p = 0; p < PAR; p++) begin : g_cpu
      ldpc_cpu #(.DC(NCB)) u_cpu (.lc(m_rdata[p][i]), .rc(rc[p][i]));
    end
  end

  // ------------------------------------------ Z and C banks and the VPUs
  logic [AW-1:0] c_raddr;
  assign c_raddr = (state == S_OUT) ? oa : k_addr;

  for (genvar j = 0; j < NCB; j++) begin : g_vnode
    logic [PAR-1:0] c_raw;

    for (genvar q = 0; q < PAR; q++) begin : g_sub
      logic [ZW-1:0] z_raw;

      ldpc_mem_bank #(.W(ZW), .DEPTH(PD)) u_z (
        .clk,
        .we(state == S_LOAD && in_valid && lj == JW'(j) && lq == QW'(q)),
        .waddr(la), .wdata(in_llr),
        .re(rd), .raddr(k_addr), .rdata(z_raw)
      );

      ldpc_vpu #(.DV(NRB)) u_vpu (
        .rv(vin[q][j]), .zv(llr_t'(z_raw)), .lv(lv[q][j]), .hard(hard[q][j])
      );

      ldpc_mem_bank #(.W(1), .DEPTH(PD)) u_c (
        .clk,
        .we(wr && (state inside {S_INIT, S_COL})),
        .waddr(k_addr_q), .wdata(hard[q][j]),
        .re(rd), .raddr(c_raddr), .rdata(c_raw[q])
      );
    end

    assign dec_o[j] = c_raw[oq_q];
  end

  assign valid_o = wr && (state == S_OUT);

  // A decoding pass only ends after its last write-back.
  assert property (@(posedge clk)
                   (state inside {S_INIT, S_ROW, S_COL, S_OUT} && state_n != state) |-> pass_end)
    else $error("ldpc_decoder: pass ended early");

  // The sub-bank split needs PAR to divide P.
  if (PAR < 1 || P % PAR != 0) begin : g_bad_par
    $error("ldpc_decoder: PAR must divide P");
  end

endmodule
