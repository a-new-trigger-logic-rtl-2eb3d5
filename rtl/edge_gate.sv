// edge_gate: edge-to-gate function.
//
// A rising edge on 'start' opens the gate and a rising edge on 'stop'
// closes it, so the output is high between the two pulses (used, for
// example, to make a spill gate from the begin-of-spill and end-of-spill
// pulses).  If both edges come in the same cycle the stop wins.  Function
// from the design description; edge detection and the stop-wins rule are
// this design's choice.
//
// Interface: start, stop; gate (registered, rises the cycle after the
// start edge is sampled).
module edge_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic stop,
  output logic gate
);
  logic start_q, stop_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      stop_q  <= 1'b0;
      gate    <= 1'b0;
    end else begin
      start_q <= start;
      stop_q  <= stop;
      if (stop & ~stop_q)        gate <= 1'b0;
      else if (start & ~start_q) gate <= 1'b1;
    end
  end
endmodule
