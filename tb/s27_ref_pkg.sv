// Reference model of ISCAS'89 s27 for the testbenches, written in the
// benchmark's own net names (G0..G17), independent of the RTL.
// Fault mask bits: 0 = G8 (a2), 1 = G9 (a9), 2 = G13 (a4), 3 = G11 (a10);
// a set bit forces that net to the matching bit of stuck.
package s27_ref_pkg;

  typedef struct {
    bit g5, g6, g7;   // flip-flops: G5 = a7, G6 = a11, G7 = a6
  } s27_ff_t;

  function automatic void s27_eval(input bit [3:0] g, input s27_ff_t s,
                                   input bit [3:0] mask, input bit [3:0] stuck,
                                   output s27_ff_t nxt, output bit g17);
    bit g8, g9, g10, g11, g12, g13, g14, g15, g16;
    // g[3] = G0 ... g[0] = G3
    g14 = !g[3];
    g12 = !(g[2] || s.g7);
    g13 = mask[2] ? stuck[2] : !(g[1] && g12);
    g8  = mask[0] ? stuck[0] : (g14 && s.g6);
    g15 = g12 || g8;
    g16 = g[0] || g8;
    g9  = mask[1] ? stuck[1] : !(g16 && g15);
    g11 = mask[3] ? stuck[3] : !(s.g5 || g9);
    g10 = !(g14 || g11);
    g17 = !g11;
    nxt.g5 = g10;
    nxt.g6 = g11;
    nxt.g7 = g13;
  endfunction

endpackage
