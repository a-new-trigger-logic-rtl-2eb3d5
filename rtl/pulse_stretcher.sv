// pulse_stretcher: gives a pulse a programmed length.
//
// When the start condition is met, a down-counter is loaded with len+2 and
// the output stays high while the counter is not zero, so the output is
// exactly len+2 cycles long (two cycles is the minimum length, as in the
// described stretcher).  The restart mode picks the start condition:
//   LEADING_EDGE  - every rising edge of the input (re)starts the pulse;
//   TRAILING_EDGE - every falling edge of the input (re)starts it;
//   LEAD_IF_INACT - a rising edge starts it only while the output is low;
//   WHEN_PRESENT  - every cycle the input is high restarts it.
// The n+2 rule and the four modes are from the design description; the
// counter implementation is this design's.
//
// Interface: din, len, mode; dout.  Timing: dout rises one cycle after the
// clock edge at which the start condition is seen.
module pulse_stretcher
  import trlo_pkg::*;
#(
  parameter int unsigned LEN_WIDTH = STR_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 din,
  input  logic [LEN_WIDTH-1:0] len,
  input  restart_mode_e        mode,
  output logic                 dout
);
  logic                 din_q;
  logic [LEN_WIDTH:0]   cnt;
  logic                 start;

  always_comb begin
    unique case (mode)
      RESTART_LEADING_EDGE:  start = din & ~din_q;
      RESTART_TRAILING_EDGE: start = ~din & din_q;
      RESTART_LEAD_IF_INACT: start = din & ~din_q & ~dout;
      RESTART_WHEN_PRESENT:  start = din;
      default:               start = din & ~din_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_q <= 1'b0;
      cnt   <= '0;
    end else begin
      din_q <= din;
      if (start)             cnt <= {1'b0, len} + (LEN_WIDTH+1)'(2);
      else if (cnt != '0)    cnt <= cnt - 1'b1;
    end
  end

  assign dout = (cnt != '0);
endmodule
