// downscaler: reduction of a trigger channel by a factor 2^n.
//
// Every input pulse (a one-cycle strobe) advances an n-bit counter; only the
// pulse that finds the counter at zero is passed, so one pulse in 2^n gets
// through, the first one included.  n = 0 passes every pulse; n ranges over
// 0..15 as in the described reduction register.  The counter scheme is this
// design's choice.
//
// Interface: pulse_in (one cycle per event), factor (n); pulse_out,
// combinational from pulse_in (no added latency).
module downscaler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pulse_in,
  input  logic [3:0] factor,
  output logic       pulse_out
);
  logic [14:0] cnt;
  logic [14:0] mask;

  assign mask      = 15'((32'd1 << factor) - 1);
  assign pulse_out = pulse_in & ((cnt & mask) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (pulse_in) cnt <= (cnt + 1'b1) & mask;
  end
endmodule
