// pulser: periodic one-clock pulse generator.
//
// A counter runs from 0 to period-1 and the output is high for the one
// cycle in which the counter wraps, giving a pulse one clock long every
// 'period' clocks (period 0 switches the pulser off).  Used for the time
// calibrator and clock triggers, whose periods are prime numbers of 10 ns
// steps so that they do not lock to each other.  Function from the design
// description; the counter is this design's.
//
// Interface: period[32]; pulse.  pulse is registered.
module pulser #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] period,
  output logic             pulse
);
  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else if (period == '0) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else if (cnt >= period - 1'b1) begin
      cnt   <= '0;
      pulse <= 1'b1;
    end else begin
      cnt   <= cnt + 1'b1;
      pulse <= 1'b0;
    end
  end
endmodule
