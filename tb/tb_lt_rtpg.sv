// Self-checking testbench for lt_rtpg (defaults: 4-stage BS-LFSR, AND of
// bits 3 and 1 of the swapped pattern, T flip-flop). Compares the pattern,
// T input and scan-in bit with a reference model over two LFSR periods,
// checks that en = 0 freezes the generator, and that the scan-in stream
// has fewer transitions than the plain LFSR's serial output c1 (the
// low-transition property): 4 against 8 per 15 clocks.
module tb_lt_rtpg;
  logic clk = 0, rst = 1, en = 0;
  logic [3:0] lq, bq;
  logic swap, tin, si;
  int checks = 0, failures = 0;

  lt_rtpg dut (.clk(clk), .rst(rst), .en(en), .lfsr_q(lq), .bs_q(bq), .swap(swap),
               .tin(tin), .scan_in(si));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit [3:0] r, rb;
    bit rt, rq, prev_si, prev_c1;
    int tr_si = 0, tr_c1 = 0, toggles = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0; en = 1;
    r = 4'b0001; rq = 0;
    for (int i = 0; i < 30; i++) begin
      rb = r;
      if (!r[0]) begin rb[3] = r[2]; rb[2] = r[3]; end
      rt = rb[3] & rb[1];
      check(lq == r && bq == rb && tin == rt && si == rq, $sformatf("step %0d", i));
      prev_si = si; prev_c1 = lq[3];
      @(posedge clk); #1;
      if (rt) begin rq = ~rq; toggles++; end
      r = {r[2:0], r[3] ^ r[2]};
      if (i >= 15) begin
        tr_si += int'(si != prev_si);
        tr_c1 += int'(lq[3] != prev_c1);
      end
    end
    check(toggles > 0, "T flip-flop toggled");
    check(tr_si == 4 && tr_c1 == 8, $sformatf("transitions scan-in %0d lfsr %0d", tr_si, tr_c1));
    en = 0;
    rb = lq; rq = si;
    repeat (4) @(posedge clk);
    #1 check(lq == rb && si == rq, "frozen while en=0");
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
