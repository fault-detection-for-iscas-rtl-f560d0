// Test-per-scan BIST controller.
//
// After reset it repeats NUM_PATTERNS times: L shift cycles (scan_en = 1)
// that load a pattern into the scan chain while unloading the previous
// response, then one capture cycle (scan_en = 0) that applies the primary
// inputs and captures the next state. A last run of L shift cycles unloads
// the final response, then the session stops with done = 1 and run = 0.
// A session takes (NUM_PATTERNS + 1) * L + NUM_PATTERNS clocks.
//
// Outputs: run enables the pattern generator and the scan chains; cmp_so
// marks shift cycles that unload a captured response (not the first L,
// which unload the reset state); cmp_z marks capture cycles; count is the
// number of patterns applied so far. The sequencing is this design's own:
// the reference design only names the test-per-scan scheme.
module bist_controller
  import lt_rtpg_pkg::*;
#(
  parameter int unsigned L            = 3,
  parameter int unsigned NUM_PATTERNS = 15,
  parameter int unsigned PW           = $clog2(NUM_PATTERNS + 1)
) (
  input  logic          clk,
  input  logic          rst,
  output logic          run,
  output logic          scan_en,
  output logic          cmp_z,
  output logic          cmp_so,
  output logic          done,
  output bist_phase_e   phase,
  output logic [PW-1:0] count
);

  localparam int unsigned BW = (L > 1) ? $clog2(L) : 1;

  logic [BW-1:0] bit_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= PH_SHIFT;
      bit_cnt <= '0;
      count   <= '0;
    end else begin
      unique case (phase)
        PH_SHIFT: begin
          if (bit_cnt == BW'(L - 1)) begin
            bit_cnt <= '0;
            phase   <= (count == PW'(NUM_PATTERNS)) ? PH_DONE : PH_CAPTURE;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
        PH_CAPTURE: begin
          count <= count + 1'b1;
          phase <= PH_SHIFT;
        end
        default: phase <= PH_DONE;
      endcase
    end
  end

  assign run     = (phase != PH_DONE);
  assign scan_en = (phase == PH_SHIFT);
  assign cmp_z   = (phase == PH_CAPTURE);
  assign cmp_so  = (phase == PH_SHIFT) && (count != '0);
  assign done    = (phase == PH_DONE);

endmodule
