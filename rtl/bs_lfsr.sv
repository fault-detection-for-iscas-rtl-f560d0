// Bit-swapping LFSR (BS-LFSR): a conventional LFSR whose outputs pass
// through pairs of 2x1 multiplexers that swap adjacent cells.
//
// Cell pair (c1, c2) is swapped, and likewise (c3, c4) and so on for
// NUM_PAIRS pairs, under control of the last cell cN: while cN is 0 the
// multiplexer outputs carry (c2, c1) instead of (c1, c2); while cN is 1 the
// cells pass straight through. Cells that belong to no pair, cN included,
// are passed through unchanged. Swapping a pair never changes the number
// of ones, so the pattern stays balanced, and over a full period the
// swapped patterns are a reordering of the LFSR's own.
//
// Outputs: lfsr_q is the plain LFSR state (c1 at the MSB), bs_q the same
// vector after the swap multiplexers, and swap is the multiplexers' select
// (1 = this cycle's pattern is swapped). Both vectors change one clock
// after en; the swap path is combinational.
// One pair (two multiplexers, select from cN) is the reference design; the
// select polarity (swap on cN = 0) is the one that reproduces its printed
// output sequence.
module bs_lfsr #(
  parameter int unsigned  N         = 4,
  parameter logic [N-1:0] TAPS      = 4'b1100,
  parameter logic [N-1:0] SEED      = 4'b0001,
  parameter int unsigned  NUM_PAIRS = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [N-1:0] lfsr_q,
  output logic [N-1:0] bs_q,
  output logic         swap
);

  lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk(clk), .rst(rst), .en(en), .q(lfsr_q)
  );

  // Select line of every multiplexer: cN, active low.
  assign swap = ~lfsr_q[0];

  always_comb begin
    bs_q = lfsr_q;
    for (int p = 0; p < int'(NUM_PAIRS); p++) begin
      // Pair p is cells c(2p+1) and c(2p+2), stored at q[N-1-2p], q[N-2-2p].
      bs_q[N-1-2*p] = swap ? lfsr_q[N-2-2*p] : lfsr_q[N-1-2*p];
      bs_q[N-2-2*p] = swap ? lfsr_q[N-1-2*p] : lfsr_q[N-2-2*p];
    end
  end

  // The select cell cN must not itself be part of a swapped pair.
  initial assert (2 * NUM_PAIRS <= N - 1)
    else $error("bs_lfsr: NUM_PAIRS too large for N");

endmodule
