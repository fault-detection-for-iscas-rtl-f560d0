// Self-checking testbench for response_analyser: random compare enables and
// responses; checks the combinational mismatch, the sticky fault flag and
// the mismatch count against a reference, and that reset clears both.
module tb_response_analyser;
  logic clk = 0, rst = 1, cz = 0, cs = 0, gz = 0, bz = 0, gs = 0, bs = 0;
  logic mm, fault;
  logic [7:0] cnt;
  int checks = 0, failures = 0;

  response_analyser dut (.clk(clk), .rst(rst), .cmp_z(cz), .cmp_so(cs), .good_z(gz),
    .bad_z(bz), .good_so(gs), .bad_so(bs), .mismatch(mm), .fault(fault), .mismatches(cnt));

  always #5 clk = ~clk;

  initial begin
    bit rf;
    int rc;
    repeat (2) @(posedge clk);
    #1 rst = 0; rf = 0; rc = 0;
    for (int i = 0; i < 400; i++) begin
      bit exp_mm;
      if (i == 200) begin
        rst = 1; @(posedge clk); #1 rst = 0; rf = 0; rc = 0;
        checks++; if (fault || cnt != 0) begin failures++; $display("FAIL reset"); end
      end
      cz = ($urandom_range(0, 3) == 0); cs = ($urandom_range(0, 3) == 0);
      gz = $urandom_range(0, 1); gs = $urandom_range(0, 1);
      // mostly equal responses, occasionally different
      bz = ($urandom_range(0, 7) == 0) ? ~gz : gz;
      bs = ($urandom_range(0, 7) == 0) ? ~gs : gs;
      #1 exp_mm = (cz && gz != bz) || (cs && gs != bs);
      checks++; if (mm != exp_mm) begin failures++; $display("FAIL mismatch %0d", i); end
      @(posedge clk);
      if (exp_mm) begin rf = 1; if (rc < 255) rc++; end
      #1 checks++;
      if (fault != rf || cnt != 8'(rc)) begin failures++; $display("FAIL flag/count %0d", i); end
    end
    checks++; if (!rf) begin failures++; $display("FAIL no mismatch seen"); end
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
