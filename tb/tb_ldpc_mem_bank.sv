// tb_ldpc_mem_bank: self-checking test of the dual-port bank.
// Random simultaneous reads and writes against a shadow array; the read
// data must show the addressed word one clock after re, and hold while re
// is low.
module tb_ldpc_mem_bank;
  localparam int W = 5, DEPTH = 14, AW = $clog2(DEPTH);
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  ldpc_mem_bank #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expect_q;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom); shadow[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      logic        do_re;
      logic [W-1:0] last;
      @(negedge clk);
      last  = rdata;
      do_re = 1'($urandom);
      re    = do_re;
      raddr = AW'($urandom_range(0, DEPTH - 1));
      we    = 1'($urandom);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = W'($urandom);
      expect_q = do_re ? shadow[raddr] : last;   // read sees the old word
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL t=%0d: got %h want %h", t, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
