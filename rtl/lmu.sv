// lmu: logic matrix unit.
//
// For every output j and every input i a two-bit register entry {anti,coinc}
// says whether input i must be absent (10, anticoincidence), present
// (01, coincidence) or does not matter (00).  Per input the circuit forms
// (in & anti) | (~in & coinc), i.e. "this input violates the requirement";
// the violations of all inputs are OR-ed and the result is XOR-ed with the
// per-output register lmu_not.  With lmu_not = 1 the output is high when no
// requirement is violated; with lmu_not = 0 and an all-zero matrix row the
// output is held low, which is how an unused output is switched off.  This
// is the gate structure and truth table given in the design description.
// The packing of the pair in the register (coinc in bit 2i, anti in bit
// 2i+1) is this design's choice.
//
// Interface: in[N_IN], cfg[N_OUT][2*N_IN], lmu_not[N_OUT]; out[N_OUT],
// registered (one clock from input to output).
module lmu #(
  parameter int unsigned N_IN  = 20,
  parameter int unsigned N_OUT = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [N_IN-1:0]                  in,
  input  logic [N_OUT-1:0][2*N_IN-1:0]     cfg,
  input  logic [N_OUT-1:0]                 lmu_not,
  output logic [N_OUT-1:0]                 out
);
  logic [N_OUT-1:0] out_d;

  always_comb begin
    for (int j = 0; j < N_OUT; j++) begin
      logic viol;
      viol = 1'b0;
      for (int i = 0; i < N_IN; i++) begin
        viol |= (in[i] & cfg[j][2*i+1]) | (~in[i] & cfg[j][2*i]);
      end
      out_d[j] = viol ^ lmu_not[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= out_d;
  end
endmodule
