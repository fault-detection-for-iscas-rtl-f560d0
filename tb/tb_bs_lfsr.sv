// Self-checking testbench for bs_lfsr (defaults: 4 stages, one swapped
// pair c1/c2, select c4 active low, seed 0001).
// Checks the swapped output against the 16-value sequence
// 0001 0010 1000 1001 0011 1010 1101 0110 0101 1011 0111 1111 1110 1100
// 0100 0001, the swap flag, that the swapped output has as many ones per
// cell over a period as the LFSR (balance), and that the swapped cell c2'
// makes half the transitions of a plain LFSR cell (4 against 8 per period)
// while the overall vector transitions drop from 32 to 28.
module tb_bs_lfsr;
  logic clk = 0, rst = 1, en = 0;
  logic [3:0] lq, bq;
  logic swap;
  int checks = 0, failures = 0;

  bs_lfsr dut (.clk(clk), .rst(rst), .en(en), .lfsr_q(lq), .bs_q(bq), .swap(swap));

  always #5 clk = ~clk;

  localparam logic [3:0] EXP [16] = '{4'b0001, 4'b0010, 4'b1000, 4'b1001, 4'b0011,
    4'b1010, 4'b1101, 4'b0110, 4'b0101, 4'b1011, 4'b0111, 4'b1111, 4'b1110,
    4'b1100, 4'b0100, 4'b0001};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ones_l [4], ones_b [4], tr_l [4], tr_b [4];
    int vec_l = 0, vec_b = 0, swaps = 0;
    logic [3:0] pl, pb;
    foreach (ones_l[i]) begin ones_l[i] = 0; ones_b[i] = 0; tr_l[i] = 0; tr_b[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0; en = 1;
    for (int i = 0; i < 16; i++) begin
      check(bq == EXP[i], $sformatf("step %0d bs=%b exp=%b", i, bq, EXP[i]));
      check(swap == ~lq[0], "swap flag follows c4");
      check($countones(bq) == $countones(lq), "swap keeps the number of ones");
      if (i < 15) begin
        if (swap) swaps++;
        for (int b = 0; b < 4; b++) begin ones_l[b] += lq[b]; ones_b[b] += bq[b]; end
      end
      pl = lq; pb = bq;
      @(posedge clk); #1;
      if (i < 15) begin
        vec_l += $countones(lq ^ pl);
        vec_b += $countones(bq ^ pb);
        for (int b = 0; b < 4; b++) begin
          tr_l[b] += int'(lq[b] != pl[b]);
          tr_b[b] += int'(bq[b] != pb[b]);
        end
      end
    end
    for (int b = 0; b < 4; b++) check(ones_b[b] == 8 && ones_l[b] == 8, $sformatf("balance cell %0d", b));
    check(swaps == 7, $sformatf("swapped patterns %0d", swaps));
    check(tr_l[2] == 8 && tr_b[2] == 4, $sformatf("c2 transitions lfsr=%0d bs=%0d", tr_l[2], tr_b[2]));
    check(vec_l == 32 && vec_b == 28, $sformatf("vector transitions lfsr=%0d bs=%0d", vec_l, vec_b));
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
