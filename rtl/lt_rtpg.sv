// Low-transition random test pattern generator (LT-RTPG).
//
// A BS-LFSR drives a K-input AND gate whose output is the T input of a
// toggle flip-flop; the flip-flop's output is the serial scan-in stream.
// Because the AND output is rarely 1, the toggle flip-flop keeps the same
// value for several clocks and neighbouring scan cells receive equal
// values, which cuts transitions in the scan chain during shifting. The
// parallel BS-LFSR output is also offered as the primary-input pattern.
//
// Interface: en advances the BS-LFSR and clocks the toggle flip-flop.
//   lfsr_q   plain LFSR state, bs_q swapped pattern (both c1 at the MSB)
//   swap     1 while the BS-LFSR multiplexers swap
//   tin      AND-gate output (T input), scan_in toggle flip-flop output.
// Timing: bs_q and tin are combinational from the LFSR state; scan_in
// follows tin by one clock.
// The structure (BS-LFSR, K-input AND, T flip-flop) is the reference
// design's; the AND taps are this design's own.
module lt_rtpg #(
  parameter int unsigned  N         = 4,
  parameter logic [N-1:0] TAPS      = 4'b1100,
  parameter logic [N-1:0] SEED      = 4'b0001,
  parameter int unsigned  NUM_PAIRS = 1,
  parameter int unsigned  K         = 2,
  parameter logic [K-1:0][7:0] AND_SEL = {8'd3, 8'd1},
  parameter logic [K-1:0] AND_INV   = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [N-1:0] lfsr_q,
  output logic [N-1:0] bs_q,
  output logic         swap,
  output logic         tin,
  output logic         scan_in
);

  bs_lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED), .NUM_PAIRS(NUM_PAIRS)) u_bs (
    .clk(clk), .rst(rst), .en(en), .lfsr_q(lfsr_q), .bs_q(bs_q), .swap(swap)
  );

  k_and_gate #(.W(N), .K(K), .SEL(AND_SEL), .INV(AND_INV)) u_and (
    .vec(bs_q), .y(tin)
  );

  t_flipflop u_tff (
    .clk(clk), .rst(rst), .en(en), .t(tin), .q(scan_in)
  );

endmodule
