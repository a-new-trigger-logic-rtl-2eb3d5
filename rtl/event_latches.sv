// event_latches: time and pattern latches.
//
// A free-running 32-bit timer counts clock cycles (reset by a control
// pulse).  Each of the timer latches copies the timer when its latch input
// shows the edge chosen by latch_mode (leading or trailing), or on a
// control latch pulse; this time-stamps signals such as the begin and end
// of spill.  Each pattern latch copies the whole vector of multiplexer
// sources on the leading edge of its latch input.  The latches and their
// leading/trailing-edge modes are named in the design description; timer
// width and the exact content of a pattern latch are this design's choices.
//
// Interface: timer_reset, timer_latch_pulse, tl_in[N_TL], latch_mode[N_TL],
// pl_in[N_PL], src[N_SRC]; timer, timer_latch[N_TL], pattern_latch[N_PL].
// All outputs are registered.
module event_latches
  import trlo_pkg::*;
#(
  parameter int unsigned N_TL = 4,
  parameter int unsigned N_PL = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          timer_reset,
  input  logic                          timer_latch_pulse,
  input  logic [N_TL-1:0]               tl_in,
  input  latch_mode_e [N_TL-1:0]        latch_mode,
  input  logic [N_PL-1:0]               pl_in,
  input  logic [N_SRC-1:0]              src,
  output logic [31:0]                   timer,
  output logic [N_TL-1:0][31:0]         timer_latch,
  output logic [N_PL-1:0][N_SRC-1:0]    pattern_latch
);
  logic [N_TL-1:0] tl_q;
  logic [N_PL-1:0] pl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer         <= '0;
      timer_latch   <= '0;
      pattern_latch <= '0;
      tl_q          <= '0;
      pl_q          <= '0;
    end else begin
      tl_q  <= tl_in;
      pl_q  <= pl_in;
      timer <= timer_reset ? '0 : timer + 1'b1;
      for (int k = 0; k < N_TL; k++) begin
        logic edge_seen;
        edge_seen = (latch_mode[k] == LATCH_LEADING_EDGE) ? (tl_in[k] & ~tl_q[k])
                                                          : (~tl_in[k] & tl_q[k]);
        if (edge_seen || timer_latch_pulse) timer_latch[k] <= timer;
      end
      for (int k = 0; k < N_PL; k++)
        if (pl_in[k] & ~pl_q[k]) pattern_latch[k] <= src;
    end
  end
endmodule
