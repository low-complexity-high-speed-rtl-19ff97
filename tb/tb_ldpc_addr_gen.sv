// tb_ldpc_addr_gen: self-checking test of the modulo-P address counter.
// Loads random start values, advances with random enables and checks the
// count against start + (enables) mod P, including the wrap to 0.
module tb_ldpc_addr_gen;
  localparam int P = 14, AW = $clog2(P);
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [AW-1:0] start = '0, addr;
  int checks = 0, failures = 0, wraps = 0;

  ldpc_addr_gen #(.P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (addr != 0) failures++;
    rst_n = 1;
    model = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      load  = ($urandom_range(0, 20) == 0);
      start = AW'($urandom_range(0, P - 1));
      en    = 1'($urandom);
      @(posedge clk);
      if (load) model = int'(start);
      else if (en) begin
        if (model == P - 1) wraps++;
        model = (model + 1) % P;
      end
      #1;
      checks++;
      if (int'(addr) != model) begin
        failures++;
        $display("FAIL t=%0d: got %0d want %0d", t, addr, model);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
