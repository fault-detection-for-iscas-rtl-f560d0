// Self-checking testbench for scan_chain (L = 3): random shift/capture/
// hold operations compared with a reference queue model, plus reset.
module tb_scan_chain;
  logic clk = 0, rst = 1, en = 0, se = 0, si = 0;
  logic [2:0] d, q;
  logic so;
  logic [2:0] ref_q;
  int checks = 0, failures = 0;

  scan_chain #(.L(3)) dut (.clk(clk), .rst(rst), .en(en), .scan_en(se), .scan_in(si),
                           .d(d), .q(q), .scan_out(so));

  always #5 clk = ~clk;

  initial begin
    int shifts = 0, captures = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (q != 0) begin failures++; $display("FAIL reset"); end
    rst = 0; ref_q = 0;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom_range(0, 4) != 0);
      se = $urandom_range(0, 1);
      si = $urandom_range(0, 1);
      d  = 3'($urandom);
      @(posedge clk);
      if (en) begin
        if (se) begin ref_q = {ref_q[1:0], si}; shifts++; end
        else    begin ref_q = d; captures++; end
      end
      #1 checks++;
      if (q != ref_q || so != ref_q[2]) begin failures++; $display("FAIL step %0d q=%b ref=%b", i, q, ref_q); end
    end
    checks++; if (shifts == 0 || captures == 0) begin failures++; $display("FAIL coverage"); end
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
