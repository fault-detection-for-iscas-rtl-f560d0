// Self-checking testbench for bist_controller with L = 3 and 15 patterns
// (and a second instance with L = 2, 4 patterns). Checks the cycle-by-cycle
// phase sequence against the schedule "L shifts, 1 capture" repeated, a
// final unload, and the session length (P + 1) * L + P clocks.
module tb_bist_controller;
  import lt_rtpg_pkg::*;
  logic clk = 0, rst = 1;
  logic run_a, se_a, cz_a, cs_a, done_a, run_b, se_b, cz_b, cs_b, done_b;
  bist_phase_e ph_a, ph_b;
  logic [3:0] cnt_a;
  logic [2:0] cnt_b;
  int checks = 0, failures = 0;

  bist_controller #(.L(3), .NUM_PATTERNS(15)) dut_a (.clk(clk), .rst(rst), .run(run_a),
    .scan_en(se_a), .cmp_z(cz_a), .cmp_so(cs_a), .done(done_a), .phase(ph_a), .count(cnt_a));
  bist_controller #(.L(2), .NUM_PATTERNS(4)) dut_b (.clk(clk), .rst(rst), .run(run_b),
    .scan_en(se_b), .cmp_z(cz_b), .cmp_so(cs_b), .done(done_b), .phase(ph_b), .count(cnt_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cyc = 0, len_a = -1, len_b = -1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (cyc = 0; cyc < 80; cyc++) begin
      // expected schedule for instance a: period L + 1 = 4
      automatic int per_a = cyc / 4, pos_a = cyc % 4, per_b = cyc / 3, pos_b = cyc % 3;
      automatic bit exp_done_a = (cyc >= 16 * 3 + 15), exp_done_b = (cyc >= 5 * 2 + 4);
      if (!exp_done_a) begin
        check(se_a == (pos_a < 3) && cz_a == (pos_a == 3), $sformatf("a phase cyc %0d", cyc));
        check(cs_a == (pos_a < 3 && per_a > 0), $sformatf("a cmp_so cyc %0d", cyc));
        check(cnt_a == 4'(per_a), $sformatf("a count cyc %0d", cyc));
        check(run_a && !done_a, "a running");
      end else begin
        check(done_a && !run_a && !se_a && !cz_a && !cs_a, $sformatf("a done cyc %0d", cyc));
        if (len_a < 0) len_a = cyc;
      end
      if (!exp_done_b) begin
        check(se_b == (pos_b < 2) && cz_b == (pos_b == 2), $sformatf("b phase cyc %0d", cyc));
        check(cnt_b == 3'(per_b), $sformatf("b count cyc %0d", cyc));
      end else begin
        check(done_b && !run_b, $sformatf("b done cyc %0d", cyc));
        if (len_b < 0) len_b = cyc;
      end
      @(posedge clk); #1;
    end
    check(len_a == 63 && len_b == 14, $sformatf("session lengths %0d %0d", len_a, len_b));
    check(cnt_a == 4'd15, "a final count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
