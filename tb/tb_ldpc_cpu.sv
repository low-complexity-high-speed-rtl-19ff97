// tb_ldpc_cpu: self-checking test of the check node unit.
// Random and corner-case rows of five messages; each output is compared
// with the product of the other signs and the clipped sum of the other
// phi() values, phi computed with real arithmetic.
module tb_ldpc_cpu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int DC = 5;
  msg_t lc [DC];
  msg_t rc [DC];
  int checks = 0, failures = 0;

  ldpc_cpu #(.DC(DC)) dut (.lc(lc), .rc(rc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    #1;
    for (int k = 0; k < DC; k++) begin
      int s, sum;
      s = 0; sum = 0;
      for (int j = 0; j < DC; j++)
        if (j != k) begin
          s ^= int'(lc[j].sign);
          sum += phi_ref(int'(lc[j].mag));
        end
      if (sum > 15) sum = 15;
      checks++;
      if (rc[k].sign != 1'(s) || int'(rc[k].mag) != sum) begin
        failures++;
        $display("FAIL out %0d: got %0d/%0d want %0d/%0d", k, rc[k].sign, rc[k].mag, s, sum);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < DC; k++) lc[k] = '{sign: 1'b0, mag: 4'd15};
    run_one();
    for (int k = 0; k < DC; k++) lc[k] = '{sign: 1'b1, mag: 4'd0};
    run_one();
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < DC; k++) lc[k] = msg_t'($urandom);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
