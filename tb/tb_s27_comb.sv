// Self-checking testbench for s27_comb: every combination of the four
// inputs, three state bits and sixteen fault-enable masks, for stuck-at-0
// (default) and stuck-at-1 copies, against the reference netlist model.
// Also checks that each single fault changes Z or the next state for at
// least one input/state combination (each fault is observable).
module tb_s27_comb;
  import lt_rtpg_pkg::*;
  import s27_ref_pkg::*;

  s27_pi_t pi;
  s27_state_t st;
  fault_sel_t fe;
  s27_state_t ns0, ns1;
  logic z0, z1;
  int checks = 0, failures = 0;

  s27_comb dut0 (.pi(pi), .state(st), .fault_en(fe), .next_state(ns0), .z(z0));
  s27_comb #(.STUCK_VAL(4'b1111)) dut1 (.pi(pi), .state(st), .fault_en(fe), .next_state(ns1), .z(z1));

  initial begin
    int observable [4];
    foreach (observable[i]) observable[i] = 0;
    for (int m = 0; m < 16; m++)
      for (int s = 0; s < 8; s++)
        for (int g = 0; g < 16; g++) begin
          s27_ff_t rs, rn0, rn1, rg;
          bit rz0, rz1, rzg;
          pi = s27_pi_t'(4'(g));
          st = s27_state_t'(3'(s));   // {a6, a11, a7}
          fe = fault_sel_t'(4'(m));   // {a10, a4, a9, a2}
          rs.g7 = st.a6; rs.g6 = st.a11; rs.g5 = st.a7;
          s27_eval(4'(g), rs, 4'(m), 4'b0000, rn0, rz0);
          s27_eval(4'(g), rs, 4'(m), 4'b1111, rn1, rz1);
          s27_eval(4'(g), rs, 4'b0000, 4'b0000, rg, rzg);
          #1;
          checks++;
          if (z0 != rz0 || ns0.a7 != rn0.g5 || ns0.a11 != rn0.g6 || ns0.a6 != rn0.g7) begin
            failures++; $display("FAIL sa0 m=%b s=%b g=%b", m[3:0], s[2:0], g[3:0]);
          end
          checks++;
          if (z1 != rz1 || ns1.a7 != rn1.g5 || ns1.a11 != rn1.g6 || ns1.a6 != rn1.g7) begin
            failures++; $display("FAIL sa1 m=%b s=%b g=%b", m[3:0], s[2:0], g[3:0]);
          end
          if ($countones(m) == 1)
            for (int f = 0; f < 4; f++)
              if (m == (1 << f) && (rz0 != rzg || rn0 != rg)) observable[f]++;
        end
    for (int f = 0; f < 4; f++) begin
      checks++;
      if (observable[f] == 0) begin failures++; $display("FAIL fault %0d never observable", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
