// scaler: counter for monitoring signals.
//
// A digital edge detector (the input compared with its value one clock
// earlier) turns a level into one-cycle strobes, so a long pulse is counted
// once and not by its length.  The counting mode selects what increments
// the 32-bit counter: leading edges, trailing edges, clock cycles the input
// is high, or timer ticks the input is high.  A reset pulse clears the
// counter; a latch pulse copies the running count into 'latched' so it can
// be read while counting continues.  The edge detector, the 32-bit width,
// the modes and the reset follow the design description; the counter and
// latch are the obvious implementation.
//
// Interface: din, tick, mode, reset, latch; count (running), latched.
// Timing: count changes on the clock edge after the event.
module scaler
  import trlo_pkg::*;
#(
  parameter int unsigned WIDTH = SCA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             din,
  input  logic             tick,
  input  scaler_mode_e     mode,
  input  logic             reset,
  input  logic             latch,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] latched
);
  logic din_q;
  logic inc;

  always_comb begin
    unique case (mode)
      SCALER_LEADING_EDGE:  inc = din & ~din_q;
      SCALER_TRAILING_EDGE: inc = ~din & din_q;
      SCALER_DURATION_CLK:  inc = din;
      SCALER_DURATION_TICK: inc = din & tick;
      default:              inc = din & ~din_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_q   <= 1'b0;
      count   <= '0;
      latched <= '0;
    end else begin
      din_q <= din;
      if (reset)    count <= '0;
      else if (inc) count <= count + 1'b1;
      if (latch)    latched <= count;
    end
  end
endmodule
