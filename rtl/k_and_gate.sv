// K-input AND gate of the LT-RTPG.
//
// Each of the K inputs is taken from one bit of the pattern vector, either
// true or inverted: input k is vec[SEL[k]] XOR INV[k]. The output is 1 only
// when all K selected literals are 1, so with K = 2 it is 1 in about one
// clock in four. It drives the T input of the toggle flip-flop. SEL packs
// one 8-bit bit index per input, input 0 in the low byte.
//
// Purely combinational. K = 2 or 3 is what the LT-RTPG is meant for; the
// default taps (c1 after the swap and c3, both true) are this design's own.
module k_and_gate #(
  parameter int unsigned W = 4,
  parameter int unsigned K = 2,
  parameter logic [K-1:0][7:0] SEL = {8'd3, 8'd1},
  parameter logic [K-1:0] INV = '0
) (
  input  logic [W-1:0] vec,
  output logic         y
);

  logic [K-1:0] lit;

  always_comb begin
    for (int k = 0; k < int'(K); k++) begin
      lit[k] = INV[k];
      for (int b = 0; b < int'(W); b++)
        if (SEL[k] == 8'(b)) lit[k] = vec[b] ^ INV[k];
    end
    y = &lit;
  end

  for (genvar k = 0; k < K; k++) begin : g_chk
    initial assert (int'(SEL[k]) < int'(W)) else $error("k_and_gate: SEL[%0d] out of range", k);
  end

endmodule
