// Self-checking testbench for t_flipflop: random t and en for 200 clocks,
// compared with a reference toggle model; checks reset to 0.
module tb_t_flipflop;
  logic clk = 0, rst = 1, en = 0, t = 0, q;
  logic ref_q;
  int checks = 0, failures = 0;

  t_flipflop dut (.clk(clk), .rst(rst), .en(en), .t(t), .q(q));

  always #5 clk = ~clk;

  initial begin
    int toggles = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (q != 0) begin failures++; $display("FAIL reset"); end
    rst = 0; ref_q = 0;
    for (int i = 0; i < 200; i++) begin
      en = ($urandom_range(0, 3) != 0);
      t  = $urandom_range(0, 1);
      @(posedge clk);
      if (en && t) begin ref_q = ~ref_q; toggles++; end
      #1 checks++;
      if (q != ref_q) begin failures++; $display("FAIL step %0d q=%b ref=%b", i, q, ref_q); end
    end
    checks++; if (toggles == 0) begin failures++; $display("FAIL no toggles"); end
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
