// End-to-end testbench for tbist at its default parameters (15 patterns,
// K = 2, stuck-at-0 faults). It runs six complete BIST sessions: fault-free,
// each of the four faults alone (p1 = a2, p2 = a9, p3 = a4, p4 = a10) and
// all four together. A cycle-accurate reference model (LFSR, bit swap, AND,
// toggle flip-flop, scan schedule, two s27 netlists from s27_ref_pkg)
// predicts every cycle's pattern, scan-in bit, s27 states, Z outputs and
// fault flag, and the session length of (15 + 1) * 3 + 15 = 63 clocks.
// The fault-free session must end with fault = 0. The testbench counts how
// often each mechanism occurs (bit swap, T toggle, shift, capture, unload
// compare, response mismatch, detected fault) and fails any that never does.
module tb_tbist;
  import lt_rtpg_pkg::*;
  import s27_ref_pkg::*;

  localparam int P = 15, L = 3, SESSION = (P + 1) * L + P;

  logic clk = 0, rst = 1, p1 = 0, p2 = 0, p3 = 0, p4 = 0;
  logic fault, done, swap, tin, tout, scan_en, z, z_faulty, mismatch;
  logic [3:0] dataout, bit_swap, count;
  s27_state_t state, state_faulty;
  bist_phase_e phase;
  logic [7:0] mismatches;
  int checks = 0, failures = 0;

  tbist dut (.clk(clk), .rst(rst), .p1(p1), .p2(p2), .p3(p3), .p4(p4), .fault(fault),
    .done(done), .dataout(dataout), .bit_swap(bit_swap), .swap(swap), .tin(tin), .tout(tout),
    .scan_en(scan_en), .count(count), .state(state), .z(z), .z_faulty(z_faulty),
    .state_faulty(state_faulty), .phase(phase), .mismatch(mismatch), .mismatches(mismatches));

  always #5 clk = ~clk;

  int n_swap = 0, n_toggle = 0, n_shift = 0, n_capture = 0, n_unload = 0, n_mismatch = 0,
      n_detect = 0, n_done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One session with fault mask m (bit 0 = a2/p1 ... bit 3 = a10/p4).
  // Returns whether the reference saw a difference.
  task automatic session(input bit [3:0] m, output bit detected);
    bit [3:0] r, rb;
    bit rq, rt, rz, rzf, rfault, se, cap, unload, mm;
    s27_ff_t g, f, gn, fn;
    int len;
    {p4, p3, p2, p1} = m;
    rst = 1;
    @(posedge clk); #1 rst = 0;
    r = 4'b0001; rq = 0; rfault = 0;
    g = '{0, 0, 0}; f = '{0, 0, 0};
    len = -1;
    for (int cyc = 0; cyc < SESSION + 5; cyc++) begin
      bit running = (cyc < SESSION);
      int pos = cyc % (L + 1);
      se = running && pos < L;
      cap = running && pos == L;
      unload = se && cyc >= L + 1;
      rb = r;
      if (!r[0]) begin rb[3] = r[2]; rb[2] = r[3]; end
      rt = rb[3] & rb[1];
      s27_eval(rb, g, 4'b0000, 4'b0000, gn, rz);
      s27_eval(rb, f, m, 4'b0000, fn, rzf);
      mm = (cap && rz != rzf) || (unload && g.g7 != f.g7);
      // compare this cycle
      check(dataout == r && bit_swap == rb, $sformatf("m=%b cyc %0d pattern %b/%b exp %b/%b", m, cyc, dataout, bit_swap, r, rb));
      check(tin == rt && tout == rq, $sformatf("m=%b cyc %0d tin/tout", m, cyc));
      check(state.a7 == g.g5 && state.a11 == g.g6 && state.a6 == g.g7, $sformatf("m=%b cyc %0d good state", m, cyc));
      check(state_faulty.a7 == f.g5 && state_faulty.a11 == f.g6 && state_faulty.a6 == f.g7, $sformatf("m=%b cyc %0d faulty state", m, cyc));
      check(z == rz && z_faulty == rzf, $sformatf("m=%b cyc %0d Z", m, cyc));
      check(scan_en == se && done == !running, $sformatf("m=%b cyc %0d control", m, cyc));
      check(mismatch == mm && fault == rfault, $sformatf("m=%b cyc %0d fault flag", m, cyc));
      if (running) begin
        if (rb != r) n_swap++;
        if (rt) n_toggle++;
        if (se) n_shift++;
        if (cap) n_capture++;
        if (unload) n_unload++;
        if (mm) n_mismatch++;
      end else if (len < 0) begin
        len = cyc;
        n_done++;
      end
      @(posedge clk); #1;
      // reference state update
      if (running) begin
        if (mm) rfault = 1;
        if (rt) rq = ~rq;
        // the chain shifts in the toggle flip-flop output from before the edge
        if (se) begin
          g.g7 = g.g6; g.g6 = g.g5; g.g5 = rq ^ rt;
          f.g7 = f.g6; f.g6 = f.g5; f.g5 = rq ^ rt;
        end else begin
          g = gn; f = fn;
        end
        r = {r[2:0], r[3] ^ r[2]};
      end
    end
    check(len == SESSION, $sformatf("m=%b session length %0d, expected %0d", m, len, SESSION));
    check(count == 4'(P), "pattern count at end");
    detected = rfault;
  endtask

  initial begin
    bit det;
    repeat (2) @(posedge clk);
    session(4'b0000, det);
    check(!det && !fault, "fault-free session flags no fault");
    for (int i = 0; i < 4; i++) begin
      session(4'(1 << i), det);
      $display("fault p%0d: %s (%0d mismatches)", i + 1, fault ? "detected" : "not detected", mismatches);
      if (det) n_detect++;
    end
    session(4'b1111, det);
    $display("all four faults: %s", fault ? "detected" : "not detected");
    $display("mechanisms: swap=%0d toggle=%0d shift=%0d capture=%0d unload=%0d mismatch=%0d detect=%0d done=%0d",
             n_swap, n_toggle, n_shift, n_capture, n_unload, n_mismatch, n_detect, n_done);
    check(n_swap > 0, "BS-LFSR swap happened");
    check(n_toggle > 0, "T flip-flop toggled");
    check(n_shift > 0 && n_capture > 0 && n_unload > 0, "shift, capture and unload happened");
    check(n_mismatch > 0 && n_detect == 4, "each of the four faults was detected");
    check(n_done == 6, "every session completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
