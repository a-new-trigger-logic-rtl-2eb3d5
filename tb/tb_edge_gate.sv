// tb_edge_gate: random start and stop levels; the gate must follow a
// testbench model (open on a start rising edge, close on a stop rising edge,
// stop wins) one cycle after the edge is sampled.
module tb_edge_gate;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, stop = 1'b0, gate;
  int checks = 0, failures = 0, opened = 0;

  always #5 clk = ~clk;

  edge_gate dut (.clk, .rst_n, .start, .stop, .gate);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic g = 1'b0, sp = 1'b0, tp = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      #1;
      start = ($urandom_range(0, 6) == 0);
      stop  = ($urandom_range(0, 6) == 0);
      @(posedge clk);
      if (stop & ~tp) g = 1'b0;
      else if (start & ~sp) begin g = 1'b1; opened++; end
      sp = start; tp = stop;
      #1;
      checks++;
      if (gate !== g) begin failures++; $display("cycle %0d: gate=%b model=%b", n, gate, g); end
    end
    checks++;
    if (opened == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
