// Shared sizes and types of the low-transition BIST for the ISCAS'89 s27
// benchmark circuit.
//
// The test pattern generator is a 4-stage bit-swapping LFSR (BS-LFSR) that
// feeds a K-input AND gate and a toggle flip-flop (the LT-RTPG). The toggle
// flip-flop drives the scan chain that is built from the three state
// flip-flops of s27, while the four primary inputs of s27 take the parallel
// BS-LFSR outputs. A fault-free and a fault-injected copy of s27 run side by
// side and a response analyser flags any difference.
//
// The 4-stage LFSR, its x^4+x^3+1 feedback and the 0001 seed reproduce the
// pattern sequence of the reference design; the scan chain length of three
// is the number of flip-flops in s27. The net names a0..a11 are the ones the
// reference drawing of s27 uses.
package lt_rtpg_pkg;

  // Stages of the (BS-)LFSR.
  localparam int unsigned LFSR_N = 4;
  // Flip-flops of s27, which form the scan chain.
  localparam int unsigned S27_FF = 3;
  // Number of sites at which a fault can be injected (a2, a9, a4, a10).
  localparam int unsigned NUM_FAULT_SITES = 4;

  // Primary inputs of s27.
  typedef struct packed {
    logic g0;
    logic g1;
    logic g2;
    logic g3;
  } s27_pi_t;

  // State of s27, in scan-chain order: a7 is next to the scan input, a6 is
  // next to the scan output. a7 = DFF(a1), a11 = DFF(a10), a6 = DFF(a4).
  typedef struct packed {
    logic a6;
    logic a11;
    logic a7;
  } s27_state_t;

  // Fault enables, one per injection site (p1..p4 of the BIST top).
  typedef struct packed {
    logic a10;  // p4
    logic a4;   // p3
    logic a9;   // p2
    logic a2;   // p1
  } fault_sel_t;

  // Phases of the test-per-scan session.
  typedef enum logic [1:0] {
    PH_SHIFT   = 2'd0,
    PH_CAPTURE = 2'd1,
    PH_DONE    = 2'd2
  } bist_phase_e;

endpackage
