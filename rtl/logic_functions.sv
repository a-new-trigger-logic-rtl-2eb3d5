// logic_functions: the masked OR and coincidence functions.
//
// ALL_OR output k is the OR of all multiplexer sources selected by
// all_or_mask[k].  COINCIDENCE output k is high when at least coinc_level[k]
// of the sources selected by coinc_mask[k] are high at once (a level of 0
// switches the output off).  Both are registered, one clock.  The functions
// and their registers (all_or_mask, coinc_mask, coinc_level) are named in
// the design description; reading the coincidence as a multiplicity
// threshold is this design's choice.
//
// Interface: src[N_SRC], masks, levels; all_or[N_OR], coinc[N_COINC].
module logic_functions
  import trlo_pkg::*;
#(
  parameter int unsigned N_OR    = 4,
  parameter int unsigned N_COINC = 2
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N_SRC-1:0]                  src,
  input  logic [N_OR-1:0][N_SRC-1:0]        all_or_mask,
  input  logic [N_COINC-1:0][N_SRC-1:0]     coinc_mask,
  input  logic [N_COINC-1:0][SRC_W-1:0]     coinc_level,
  output logic [N_OR-1:0]                   all_or,
  output logic [N_COINC-1:0]                coinc
);
  logic [N_OR-1:0]    or_d;
  logic [N_COINC-1:0] co_d;

  always_comb begin
    for (int k = 0; k < N_OR; k++) or_d[k] = |(src & all_or_mask[k]);
    for (int k = 0; k < N_COINC; k++) begin
      logic [SRC_W-1:0] n;
      n = '0;
      for (int s = 0; s < N_SRC; s++) n += SRC_W'(src[s] & coinc_mask[k][s]);
      co_d[k] = (coinc_level[k] != '0) && (n >= coinc_level[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      all_or <= '0;
      coinc  <= '0;
    end else begin
      all_or <= or_d;
      coinc  <= co_d;
    end
  end
endmodule
