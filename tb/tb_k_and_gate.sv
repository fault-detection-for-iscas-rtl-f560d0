// Self-checking testbench for k_and_gate: all 16 input vectors for the
// default K = 2 gate (bits 3 and 1, true) and for a K = 3 gate with one
// inverted input (bits 0, 2, 3, bit 2 inverted), against a direct formula.
module tb_k_and_gate;
  logic [3:0] v;
  logic y2, y3;
  int checks = 0, failures = 0;

  k_and_gate dut2 (.vec(v), .y(y2));
  k_and_gate #(.K(3), .SEL({8'd3, 8'd2, 8'd0}), .INV(3'b010)) dut3 (.vec(v), .y(y3));

  initial begin
    int ones2 = 0;
    for (int i = 0; i < 16; i++) begin
      v = 4'(i);
      #1;
      checks++; if (y2 != (v[3] & v[1])) begin failures++; $display("FAIL K2 %b", v); end
      checks++; if (y3 != (v[0] & ~v[2] & v[3])) begin failures++; $display("FAIL K3 %b", v); end
      ones2 += int'(y2);
    end
    checks++; if (ones2 != 4) begin failures++; $display("FAIL K2 ones %0d", ones2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
