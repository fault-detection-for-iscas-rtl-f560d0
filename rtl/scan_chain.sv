// Mux-D scan chain of L flip-flops.
//
// With scan_en = 1 the chain shifts: cell 0 takes scan_in and cell i takes
// cell i-1; scan_out is the last cell. With scan_en = 0 every cell loads
// its functional input d[i] from the circuit under test (capture). q holds
// the cells and drives the circuit's state inputs. Holds when en = 0.
// Synchronous active-high reset clears the chain (this design's choice).
module scan_chain #(
  parameter int unsigned L = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         scan_en,
  input  logic         scan_in,
  input  logic [L-1:0] d,
  output logic [L-1:0] q,
  output logic         scan_out
);

  always_ff @(posedge clk) begin
    if (rst)          q <= '0;
    else if (en) begin
      if (scan_en)    q <= {q[L-2:0], scan_in};
      else            q <= d;
    end
  end

  assign scan_out = q[L-1];

endmodule
