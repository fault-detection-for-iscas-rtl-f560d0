// Top level: low-power scan BIST of the ISCAS'89 s27 circuit with an
// LT-RTPG built on a bit-swapping LFSR, checking four injected faults.
//
// Data path: the LT-RTPG (BS-LFSR -> K-input AND -> T flip-flop) produces
// the serial scan-in stream, shared by two scan-wrapped copies of s27: u0
// is fault-free, u1 carries the faults selected by p1..p4 (p1 = a2,
// p2 = a9, p3 = a4, p4 = a10). The swapped BS-LFSR pattern drives the
// primary inputs g0..g3 (c1' -> g0 ... c4 -> g3) of both copies. The
// response analyser compares their Z outputs in capture cycles and their
// scan-out bits while unloading, and raises fault when they differ.
// bist_controller sequences NUM_PATTERNS scan loads, captures and a final
// unload, and raises done at the end; fault is then the verdict for the
// selected fault(s). With no p input set the copies are identical and
// fault must stay 0.
//
// Ports: rst is synchronous and active high and starts a new session.
// dataout is the plain LFSR state, bit_swap the swapped pattern, tin the T
// input, tout the scan-in bit, count the patterns applied, state the
// fault-free s27 flip-flops (state_faulty those of the
// faulty copy), phase the controller phase and mismatch a difference seen
// in this cycle. The LFSR, the chain and the controller all
// advance on every clock while the session runs.
// Structure, fault sites and port names follow the reference design;
// pattern count, chain order, AND taps and input wiring are this design's.
module tbist
  import lt_rtpg_pkg::*;
#(
  parameter int unsigned                NUM_PATTERNS = 15,
  parameter int unsigned                K            = 2,
  parameter logic [K-1:0][7:0]          AND_SEL      = {8'd3, 8'd1},
  parameter logic [K-1:0]               AND_INV      = '0,
  parameter logic [NUM_FAULT_SITES-1:0] STUCK_VAL    = '0,
  parameter int unsigned                PW           = $clog2(NUM_PATTERNS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              p1,
  input  logic              p2,
  input  logic              p3,
  input  logic              p4,
  output logic              fault,
  output logic              done,
  output logic [LFSR_N-1:0] dataout,
  output logic [LFSR_N-1:0] bit_swap,
  output logic              swap,
  output logic              tin,
  output logic              tout,
  output logic              scan_en,
  output logic [PW-1:0]     count,
  output s27_state_t        state,
  output logic              z,
  output logic              z_faulty,
  output s27_state_t        state_faulty,
  output bist_phase_e       phase,
  output logic              mismatch,
  output logic [7:0]        mismatches
);

  logic        run, cmp_z, cmp_so;
  logic        good_so, bad_so;
  s27_pi_t     pi;
  fault_sel_t  fsel;

  bist_controller #(.L(S27_FF), .NUM_PATTERNS(NUM_PATTERNS), .PW(PW)) u_ctrl (
    .clk(clk), .rst(rst), .run(run), .scan_en(scan_en), .cmp_z(cmp_z),
    .cmp_so(cmp_so), .done(done), .phase(phase), .count(count)
  );

  lt_rtpg #(.N(LFSR_N), .K(K), .AND_SEL(AND_SEL), .AND_INV(AND_INV)) u_tpg (
    .clk(clk), .rst(rst), .en(run), .lfsr_q(dataout), .bs_q(bit_swap),
    .swap(swap), .tin(tin), .scan_in(tout)
  );

  assign pi   = s27_pi_t'(bit_swap);
  assign fsel = '{a10: p4, a4: p3, a9: p2, a2: p1};

  s27_scan #(.STUCK_VAL(STUCK_VAL)) u0 (
    .clk(clk), .rst(rst), .en(run), .scan_en(scan_en), .scan_in(tout),
    .pi(pi), .fault_en('0), .state(state), .scan_out(good_so), .z(z)
  );

  s27_scan #(.STUCK_VAL(STUCK_VAL)) u1 (
    .clk(clk), .rst(rst), .en(run), .scan_en(scan_en), .scan_in(tout),
    .pi(pi), .fault_en(fsel), .state(state_faulty), .scan_out(bad_so), .z(z_faulty)
  );

  response_analyser #(.CW(8)) u_ra (
    .clk(clk), .rst(rst), .cmp_z(cmp_z), .cmp_so(cmp_so),
    .good_z(z), .bad_z(z_faulty), .good_so(good_so), .bad_so(bad_so),
    .mismatch(mismatch), .fault(fault), .mismatches(mismatches)
  );

endmodule
