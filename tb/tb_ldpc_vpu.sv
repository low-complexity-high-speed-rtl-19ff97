// tb_ldpc_vpu: self-checking test of the variable node unit.
// Random check messages and intrinsic values; outputs are compared with
// Lv = Zv + sum(+-phi(mag)), Liv = clip6(Lv - own term), hard = Lv < 0,
// phi computed with real arithmetic.
module tb_ldpc_vpu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int DV = 3;
  msg_t rv [DV];
  llr_t zv;
  ext_t lv [DV];
  logic hard;
  int checks = 0, failures = 0;

  ldpc_vpu #(.DV(DV)) dut (.rv(rv), .zv(zv), .lv(lv), .hard(hard));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sat_hits;
    sat_hits = 0;
    for (int t = 0; t < 3000; t++) begin
      int tot, term [DV];
      for (int k = 0; k < DV; k++) rv[k] = msg_t'($urandom);
      zv = llr_t'($urandom);
      if (t < 16) begin   // force the largest sums to hit the saturation
        zv = (t % 2) ? -16 : 15;
        for (int k = 0; k < DV; k++) rv[k] = '{sign: 1'(t % 2), mag: 4'd0};
      end
      #1;
      tot = int'(zv);
      for (int k = 0; k < DV; k++) begin
        term[k] = rv[k].sign ? -phi_ref(int'(rv[k].mag)) : phi_ref(int'(rv[k].mag));
        tot += term[k];
      end
      checks++;
      if (hard != (tot < 0)) begin
        failures++;
        $display("FAIL hard: got %0d total %0d", hard, tot);
      end
      for (int k = 0; k < DV; k++) begin
        int e;
        e = tot - term[k];
        if (e > 31 || e < -32) sat_hits++;
        e = (e > 31) ? 31 : (e < -32) ? -32 : e;
        checks++;
        if (int'(lv[k]) != e) begin
          failures++;
          $display("FAIL L%0d: got %0d want %0d", k, lv[k], e);
        end
      end
    end
    checks++;
    if (sat_hits == 0) begin
      failures++;
      $display("FAIL: saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
