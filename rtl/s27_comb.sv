// Combinational logic of the ISCAS'89 s27 benchmark, with stuck-at fault
// injection at four nets.
//
// s27 has four primary inputs g0..g3, one output Z and three flip-flops
// (a7, a11, a6 here). The gate netlist is the published ISCAS'89 one
// (standard names in brackets):
//   a0  = NOT g0            [G14]   a3  = NOR(g1, a6)   [G12]
//   a4  = NAND(g2, a3)      [G13]   a2  = AND(a0, a11)  [G8]
//   a5  = OR(a3, a2)        [G15]   a8  = OR(g3, a2)    [G16]
//   a9  = NAND(a8, a5)      [G9]    a10 = NOR(a7, a9)   [G11]
//   a1  = NOR(a0, a10)      [G10]   Z   = NOT a10       [G17]
//   next a7 = a1, next a11 = a10, next a6 = a4.
// fault_en.a2/.a9/.a4/.a10 force that net to its stuck value from
// STUCK_VAL (bit 0 = a2, 1 = a9, 2 = a4, 3 = a10) and so also every gate
// it feeds. All faults off gives the fault-free circuit.
// The four fault sites are the reference design's; the stuck-at values
// (default stuck-at-0 everywhere) are this design's own choice.
module s27_comb
  import lt_rtpg_pkg::*;
#(
  parameter logic [NUM_FAULT_SITES-1:0] STUCK_VAL = '0
) (
  input  s27_pi_t    pi,
  input  s27_state_t state,
  input  fault_sel_t fault_en,
  output s27_state_t next_state,
  output logic       z
);

  logic a0, a1, a2, a3, a4, a5, a8, a9, a10;

  always_comb begin
    a0  = ~pi.g0;
    a3  = ~(pi.g1 | state.a6);
    a4  = ~(pi.g2 & a3);
    if (fault_en.a4) a4 = STUCK_VAL[2];
    a2  = a0 & state.a11;
    if (fault_en.a2) a2 = STUCK_VAL[0];
    a5  = a3 | a2;
    a8  = pi.g3 | a2;
    a9  = ~(a8 & a5);
    if (fault_en.a9) a9 = STUCK_VAL[1];
    a10 = ~(state.a7 | a9);
    if (fault_en.a10) a10 = STUCK_VAL[3];
    a1  = ~(a0 | a10);
    z   = ~a10;
    next_state.a7  = a1;
    next_state.a11 = a10;
    next_state.a6  = a4;
  end

endmodule
