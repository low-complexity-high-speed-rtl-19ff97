// ldpc_addr_gen: address generator of one decoder memory bank.
//
// Because every block of the quasi-cyclic parity-check matrix is a shifted
// identity matrix, the addresses a bank sees in either decoding phase form
// a run of consecutive values modulo P. The generator is therefore a
// modulo-P counter: 'load' sets it to 'start' (0 for the row phase, the
// bank's shift offset for the column phase) and 'en' advances it by one,
// wrapping from P-1 to 0. 'addr' is the current count (registered).
module ldpc_addr_gen #(
  parameter int P   = 14,
  localparam int AW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] start,
  input  logic          en,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         addr <= '0;
    else if (load)                      addr <= start;
    else if (en) addr <= (addr == AW'(P - 1)) ? '0 : addr + AW'(1);
  end

endmodule
