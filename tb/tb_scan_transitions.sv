// Switching-activity testbench for tbist at its default parameters.
// Runs one fault-free BIST session and counts, in shift cycles, the
// transitions at the scan input and in the three scan cells of s27 (a
// weighted-switching proxy for shift power). The same session is modelled
// with the scan input taken straight from a conventional LFSR cell (c1),
// the usual pseudo-random scan feed without the AND gate and toggle
// flip-flop. Checks that the design's counts equal the model's LT-RTPG
// counts and that the LT-RTPG has fewer scan-input and scan-cell
// transitions than the conventional feed.
module tb_scan_transitions;
  import lt_rtpg_pkg::*;

  localparam int P = 15, L = 3, SESSION = (P + 1) * L + P;

  logic clk = 0, rst = 1;
  logic fault, done, swap, tin, tout, scan_en, z, z_faulty, mismatch;
  logic [3:0] dataout, bit_swap, count;
  s27_state_t state, state_faulty;
  bist_phase_e phase;
  logic [7:0] mismatches;
  int checks = 0, failures = 0;

  tbist dut (.clk(clk), .rst(rst), .p1(1'b0), .p2(1'b0), .p3(1'b0), .p4(1'b0), .fault(fault),
    .done(done), .dataout(dataout), .bit_swap(bit_swap), .swap(swap), .tin(tin), .tout(tout),
    .scan_en(scan_en), .count(count), .state(state), .z(z), .z_faulty(z_faulty),
    .state_faulty(state_faulty), .phase(phase), .mismatch(mismatch), .mismatches(mismatches));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit [3:0] r;
    bit [2:0] ch_lt, ch_base, prev_lt, prev_base;
    bit rq, rt, prev_rq, prev_base_in;
    logic [2:0] prev_dut;
    logic prev_tout;
    int in_lt = 0, in_base = 0, cell_lt = 0, cell_base = 0, in_dut = 0, cell_dut = 0;
    int peak_lt = 0, peak_base = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    r = 4'b0001; rq = 0; ch_lt = '0; ch_base = '0;
    prev_rq = 0; prev_base_in = 0; prev_dut = '0; prev_tout = 0;
    // Only the shift phases are modelled; captures are skipped in both
    // models so that the counts isolate the scan-in stream.
    for (int cyc = 0; cyc < SESSION; cyc++) begin
      automatic bit se = (cyc % (L + 1)) < L;
      bit [3:0] rb;
      rb = r;
      if (!r[0]) begin rb[3] = r[2]; rb[2] = r[3]; end
      rt = rb[3] & rb[1];
      if (se) begin
        // scan-input transitions
        in_lt   += int'(rq != prev_rq);
        in_base += int'(r[3] != prev_base_in);
        in_dut  += int'(tout != prev_tout);
        prev_rq = rq; prev_base_in = r[3]; prev_tout = tout;
      end
      @(posedge clk); #1;
      if (se) begin
        automatic int t_lt, t_base;
        prev_lt = ch_lt; prev_base = ch_base;
        ch_lt   = {ch_lt[1:0], rq};
        ch_base = {ch_base[1:0], r[3]};
        t_lt   = $countones(ch_lt ^ prev_lt);
        t_base = $countones(ch_base ^ prev_base);
        cell_lt += t_lt; cell_base += t_base;
        if (t_lt > peak_lt) peak_lt = t_lt;
        if (t_base > peak_base) peak_base = t_base;
        cell_dut += $countones(3'(state) ^ prev_dut);
      end else begin
        // capture: both models load the design's captured state
        ch_lt = 3'(state); ch_base = 3'(state);
      end
      prev_dut = 3'(state);
      if (rt) rq = ~rq;
      r = {r[2:0], r[3] ^ r[2]};
    end
    $display("scan-input transitions: LT-RTPG %0d, conventional LFSR %0d", in_lt, in_base);
    $display("scan-cell transitions in shift: LT-RTPG %0d (design %0d), conventional %0d; peak per cycle %0d vs %0d",
             cell_lt, cell_dut, cell_base, peak_lt, peak_base);
    check(in_dut == in_lt, "design scan-input transitions match the model");
    check(cell_dut == cell_lt, "design scan-cell transitions match the model");
    check(in_lt < in_base, "LT-RTPG lowers scan-input transitions");
    check(cell_lt < cell_base, "LT-RTPG lowers scan-cell transitions");
    check(done, "session completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
