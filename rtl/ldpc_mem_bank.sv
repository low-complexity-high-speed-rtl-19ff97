// ldpc_mem_bank: one memory bank of the decoder (a message bank m_ij, an
// intrinsic bank Z_j or a decoded-bit bank C_j).
//
// A simple dual-port RAM of DEPTH words of W bits: one write port and one
// read port, so a node unit can read one entry and write back another in
// the same cycle. The read is synchronous: rdata shows the word at raddr
// one clock after re.
// Dual-port banks follow the decoder description (one cycle per row or
// column with dual-port memories); the registered read port is this
// design's choice. Contents are not reset.
module ldpc_mem_bank #(
  parameter int W     = 5,
  parameter int DEPTH = 14,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
