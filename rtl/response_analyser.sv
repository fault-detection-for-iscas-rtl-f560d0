// Response analyser: compares the fault-free and the faulty s27.
//
// In a capture cycle (cmp_z = 1) it compares the two Z outputs; in a shift
// cycle (cmp_so = 1) it compares the two scan-out bits, which carry the
// captured states. Any difference sets the sticky fault flag, which stays
// set until reset, and is counted in mismatches (saturating). The fault is
// covered when the flag is set by the end of the session.
// Timing: the flag and the count update on the clock edge after the
// compared cycle. Comparing scan-out as well as Z is this design's choice;
// the reference design only states that differing outputs mean the fault
// is covered.
module response_analyser #(
  parameter int unsigned CW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cmp_z,
  input  logic          cmp_so,
  input  logic          good_z,
  input  logic          bad_z,
  input  logic          good_so,
  input  logic          bad_so,
  output logic          mismatch,
  output logic          fault,
  output logic [CW-1:0] mismatches
);

  assign mismatch = (cmp_z && (good_z != bad_z)) || (cmp_so && (good_so != bad_so));

  always_ff @(posedge clk) begin
    if (rst) begin
      fault      <= 1'b0;
      mismatches <= '0;
    end else if (mismatch) begin
      fault <= 1'b1;
      if (mismatches != '1) mismatches <= mismatches + 1'b1;
    end
  end

endmodule
