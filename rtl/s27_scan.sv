// s27 with its three flip-flops stitched into a scan chain.
//
// The s27 combinational logic (s27_comb) computes the next state and Z from
// the primary inputs and the chain contents; the chain (scan_chain, three
// cells in the order a7, a11, a6 from scan_in to scan_out) either shifts
// (scan_en = 1) or captures that next state (scan_en = 0). fault_en selects
// the injected faults; tie it to zero for the fault-free copy.
// Timing: z is combinational from pi and the chain; scan_out is the a6
// cell. The chain order is this design's own choice.
module s27_scan
  import lt_rtpg_pkg::*;
#(
  parameter logic [NUM_FAULT_SITES-1:0] STUCK_VAL = '0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       scan_en,
  input  logic       scan_in,
  input  s27_pi_t    pi,
  input  fault_sel_t fault_en,
  output s27_state_t state,
  output logic       scan_out,
  output logic       z
);

  s27_state_t next_state;

  s27_comb #(.STUCK_VAL(STUCK_VAL)) u_comb (
    .pi(pi), .state(state), .fault_en(fault_en), .next_state(next_state), .z(z)
  );

  scan_chain #(.L(S27_FF)) u_chain (
    .clk(clk), .rst(rst), .en(en), .scan_en(scan_en), .scan_in(scan_in),
    .d(next_state), .q(state), .scan_out(scan_out)
  );

endmodule
