// Toggle flip-flop of the LT-RTPG.
//
// q changes value on a clock edge where t is 1 and holds otherwise, so a
// run of zeros at t becomes a run of identical bits at q. q feeds the scan
// chain input. Synchronous active-high reset to 0 (this design's choice);
// en gates the clock so the generator can be paused.
module t_flipflop (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic t,
  output logic q
);

  always_ff @(posedge clk) begin
    if (rst)           q <= 1'b0;
    else if (en && t)  q <= ~q;
  end

endmodule
