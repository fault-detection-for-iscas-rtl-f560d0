// Self-checking testbench for s27_scan: random inputs, scan enable and
// fault enables, against the reference netlist model with a reference
// scan chain (order G5, G6, G7 from scan-in to scan-out).
module tb_s27_scan;
  import lt_rtpg_pkg::*;
  import s27_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0, se = 0, si = 0;
  s27_pi_t pi;
  fault_sel_t fe;
  s27_state_t st;
  logic so, z;
  int checks = 0, failures = 0;

  s27_scan dut (.clk(clk), .rst(rst), .en(en), .scan_en(se), .scan_in(si), .pi(pi),
                .fault_en(fe), .state(st), .scan_out(so), .z(z));

  always #5 clk = ~clk;

  initial begin
    s27_ff_t r, rn;
    bit rz;
    int caps = 0;
    pi = '0; fe = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    r.g5 = 0; r.g6 = 0; r.g7 = 0;
    for (int i = 0; i < 400; i++) begin
      en = ($urandom_range(0, 5) != 0);
      se = $urandom_range(0, 1);
      si = $urandom_range(0, 1);
      pi = s27_pi_t'(4'($urandom));
      fe = fault_sel_t'((i < 200) ? 4'b0000 : 4'(1 << (i % 4)));
      #1;
      s27_eval(4'(pi), r, 4'(fe), 4'b0000, rn, rz);
      checks++;
      if (z != rz || so != r.g7 || st.a7 != r.g5 || st.a11 != r.g6 || st.a6 != r.g7) begin
        failures++; $display("FAIL step %0d", i);
      end
      @(posedge clk);
      if (en) begin
        if (se) begin r.g7 = r.g6; r.g6 = r.g5; r.g5 = si; end
        else begin r = rn; caps++; end
      end
      #1;
    end
    checks++; if (caps == 0) begin failures++; $display("FAIL no capture"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
