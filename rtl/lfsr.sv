// Conventional external-XOR (Fibonacci) LFSR.
//
// Cells are numbered c1..cN and stored as q[N-1] = c1 ... q[0] = cN, so the
// state reads c1 first when printed as a binary number. Each clock every
// cell takes the value of its neighbour towards cN (q shifts left) and cN
// takes the XOR of the tapped cells. With the defaults (N = 4, taps c1 and
// c2, that is x^4 + x^3 + 1, seed 0001) the state runs through
// 0001 0010 0100 1001 0011 0110 1101 1010 0101 1011 0111 1111 1110 1100 1000
// and repeats after 15 clocks, the sequence of the reference design.
//
// Interface: synchronous active-high reset loads SEED; en advances one step.
// Timing: q is registered, one step per enabled clock.
// The polynomial and seed are taken from the reference pattern sequence;
// the reset and enable are this design's own.
module lfsr #(
  parameter int unsigned   N    = 4,
  parameter logic [N-1:0]  TAPS = 4'b1100,
  parameter logic [N-1:0]  SEED = 4'b0001
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [N-1:0] q
);

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (rst)     q <= SEED;
    else if (en) q <= {q[N-2:0], fb};
  end

  initial assert (SEED != '0) else $error("lfsr: an all-zero seed locks the LFSR");

endmodule
