// anti_metastable: input conditioning applied to every front-panel input.
//
// Each asynchronous input is sampled by a flip-flop; the sample and the
// sample one cycle later feed an AND gate, so a pulse only passes when it is
// seen in two consecutive clock cycles.  This both keeps a metastable first
// sample from reaching the logic and rejects glitches shorter than a clock
// period.  The flip-flop followed by an AND gate is the structure of the
// described circuit; sampling both AND inputs from flip-flops on the rising
// clock edge (instead of AND-ing the raw input with a falling-edge sample)
// is this design's choice, made to keep the block fully synchronous.
//
// Interface: async_in[W] (asynchronous), sync_out[W] (clk domain).
// Timing: a level that rises before clock edge k is seen at sync_out after
// edge k+1 and falls one cycle after the input falls; an input high for at
// least two edges gives an output pulse of (edges high - 1) cycles.
module anti_metastable #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] async_in,
  output logic [W-1:0] sync_out
);
  logic [W-1:0] s0, s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= '0;
      s1 <= '0;
    end else begin
      s0 <= async_in;
      s1 <= s0;
    end
  end

  assign sync_out = s0 & s1;
endmodule
