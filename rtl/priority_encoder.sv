// priority_encoder: picks one read-out trigger out of several requests.
//
// Request bit k (k = 1..N-1) asks for read-out trigger number k; bit 0 is
// the "no trigger" code and is ignored.  When several triggers are requested
// in the same cycle the lowest trigger number wins (trigger 1, physics on
// spill, has the highest priority).  The winner is given both as a one-hot
// word ('accept') and as its binary number ('encoded'), the four-bit code
// sent to the trigger module of the read-out system.  That a priority
// encoder ranks simultaneous triggers and encodes the winner in four bits is
// from the design description; "lowest number wins" is this design's choice.
//
// Interface: req[N]; valid, accept[N], encoded[$clog2(N)].  Purely
// combinational.
module priority_encoder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]         req,
  output logic                 valid,
  output logic [N-1:0]         accept,
  output logic [$clog2(N)-1:0] encoded
);
  always_comb begin
    valid   = 1'b0;
    accept  = '0;
    encoded = '0;
    for (int k = N - 1; k >= 1; k--) begin
      if (req[k]) begin
        valid   = 1'b1;
        encoded = ($clog2(N))'(k);
      end
    end
    if (valid) accept[encoded] = 1'b1;
  end
endmodule
