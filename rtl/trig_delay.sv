// trig_delay: per-channel delay of the trigger inputs.
//
// Four modes select the output: no delay (the input passes straight on),
// one cycle (a single flip-flop), a delay line of programmable length, or
// the channel replaced by a test signal.  The delay line is a shift register
// MAX_DLY bits long into which the input is shifted every clock; the output
// is the tap chosen by the delay register, so a pulse comes out 'dly' cycles
// after it went in (a delay of 0 in line mode also means no delay).  The
// modes and the shift-register delay line measured in 10 ns steps follow the
// design description; the depth (2^DLY_W = 256 cycles) is this design's
// choice.
//
// Interface: din, test_in, mode, dly; dout.  dout is combinational from the
// mode mux; the line itself is registered.
module trig_delay
  import trlo_pkg::*;
#(
  parameter int unsigned DLY_WIDTH = DLY_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 din,
  input  logic                 test_in,
  input  delay_mode_e          mode,
  input  logic [DLY_WIDTH-1:0] dly,
  output logic                 dout
);
  localparam int unsigned DEPTH = 1 << DLY_WIDTH;

  logic [DEPTH-1:0] line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) line <= '0;
    else        line <= {line[DEPTH-2:0], din};
  end

  always_comb begin
    unique case (mode)
      DELAY_ZERO:       dout = din;
      DELAY_ONE:        dout = line[0];
      DELAY_LINE:       dout = (dly == '0) ? din : line[dly - 1'b1];
      DELAY_TEST_INPUT: dout = test_in;
      default:          dout = din;
    endcase
  end
endmodule
