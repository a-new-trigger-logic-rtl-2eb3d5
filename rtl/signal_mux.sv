// signal_mux: source-to-destination multiplexer and front-panel outputs.
//
// Every signal that can be routed (front-panel inputs, pulsers, logic
// function outputs, accepted and encoded triggers, master start, dead time,
// ...) is a source; every place that takes a routed signal (front-panel
// outputs, LEDs, logic function inputs, scalers, latches, tracer, LMU
// auxiliary inputs, pending and pulse triggers, dead-time and busy inputs)
// is a destination.  Each destination has a select register holding the
// index of its source.  The routing takes two clock cycles: the sources are
// registered, then the selected source is registered at the destination.
//
// Each of the 26 front-panel outputs can instead be driven in direct mode:
// straight from one raw front-panel input, without any clocking, which is
// the short path for simple fan-out.  The output modes are LOGIC (routed
// destination), DIRECT (raw input chosen by direct_mux), LOGIC_OR_DIRECT
// and LOGIC_AND_DIRECT.  Outputs selected in sum_out_mask also carry the
// master start, OR-ed in after the multiplexer so it does not pay the
// multiplexer's two cycles.
//
// For tests from the register interface, src_pulse is OR-ed into the
// sources (seen at the destinations two cycles later) and dest_pulse into
// the destination registers (seen one cycle later); the top drives them
// from the MUX_SOURCES / MUX_DESTS control pulses and their mask registers.
//
// The source and destination lists, the two-cycle multiplexer, the direct
// modes and the sum_out_mask register follow the design description; index
// numbering is the order of those lists (see trlo_pkg).  Where the pulse
// injection enters the pipeline is this design's choice.
module signal_mux
  import trlo_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [N_SRC-1:0]                 src,
  input  logic [N_DST-1:0][SRC_W-1:0]      sel,
  input  logic [N_SRC-1:0]                 src_pulse,    // OR-ed into the sources
  input  logic [N_DST-1:0]                 dest_pulse,   // OR-ed into the destinations
  input  logic [N_FRONT-1:0]               raw_in,       // unclocked front-panel inputs
  input  logic [N_FRONT-1:0][4:0]          direct_mux,
  input  direct_mode_e [N_FRONT-1:0]       direct_mode,
  input  logic [N_FRONT-1:0]               sum_out_mask,
  input  logic                             master_start,
  output logic [N_DST-1:0]                 dest,
  output logic [N_FRONT-1:0]               front_out
);
  logic [N_SRC-1:0] src_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q <= '0;
      dest  <= '0;
    end else begin
      src_q <= src | src_pulse;
      for (int d = 0; d < N_DST; d++)
        dest[d] <= (sel[d] < SRC_W'(N_SRC)) ? src_q[sel[d]] | dest_pulse[d] : dest_pulse[d];
    end
  end

  always_comb begin
    for (int o = 0; o < N_FRONT; o++) begin
      logic direct;
      direct = (direct_mux[o] < 5'(N_FRONT)) ? raw_in[direct_mux[o]] : 1'b0;
      unique case (direct_mode[o])
        DIRECT_LOGIC:            front_out[o] = dest[o];
        DIRECT_DIRECT:           front_out[o] = direct;
        DIRECT_LOGIC_OR_DIRECT:  front_out[o] = dest[o] | direct;
        DIRECT_LOGIC_AND_DIRECT: front_out[o] = dest[o] & direct;
        default:                 front_out[o] = dest[o];
      endcase
      front_out[o] = front_out[o] | (sum_out_mask[o] & master_start);
    end
  end
endmodule
