// Self-checking testbench for lfsr (4 stages, x^4+x^3+1, seed 0001).
// Checks the state sequence against the expected m-sequence written out by
// hand, the period of 15, that en = 0 holds the state, that reset reloads
// the seed, and that every cell makes 2^(n-1) = 8 transitions per period.
module tb_lfsr;
  logic clk = 0, rst = 1, en = 0;
  logic [3:0] q;
  int checks = 0, failures = 0;

  lfsr dut (.clk(clk), .rst(rst), .en(en), .q(q));

  always #5 clk = ~clk;

  localparam logic [3:0] EXP [15] = '{4'b0001, 4'b0010, 4'b0100, 4'b1001, 4'b0011,
    4'b0110, 4'b1101, 4'b1010, 4'b0101, 4'b1011, 4'b0111, 4'b1111, 4'b1110,
    4'b1100, 4'b1000};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int trans [4];
    logic [3:0] prev;
    foreach (trans[i]) trans[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(q == 4'b0001, "seed after reset");
    en = 1;
    for (int i = 0; i < 30; i++) begin
      check(q == EXP[i % 15], $sformatf("step %0d q=%b exp=%b", i, q, EXP[i % 15]));
      prev = q;
      @(posedge clk); #1;
      if (i < 15) for (int b = 0; b < 4; b++) if (q[b] != prev[b]) trans[b]++;
    end
    for (int b = 0; b < 4; b++) check(trans[b] == 8, $sformatf("cell %0d transitions %0d", b, trans[b]));
    en = 0;
    prev = q;
    repeat (3) @(posedge clk);
    #1 check(q == prev, "hold while en=0");
    rst = 1; @(posedge clk); #1 rst = 0;
    check(q == 4'b0001, "reset reloads seed");
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
