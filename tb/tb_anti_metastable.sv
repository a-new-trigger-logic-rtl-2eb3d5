// tb_anti_metastable: checks that an input reaches the output only when it
// was sampled high at two consecutive clock edges, with the output one
// cycle after the second sample, and that single-sample glitches vanish.
module tb_anti_metastable;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] samp [0:1];
  int checks = 0, failures = 0, glitches = 0;

  always #5 clk = ~clk;

  anti_metastable #(.W(W)) dut (.clk, .rst_n, .async_in(din), .sync_out(dout));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    samp[0] = '0; samp[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      // the value sampled at this edge is what din held just before it
      samp[1] = samp[0];
      samp[0] = din;
      #1;
      checks++;
      if (dout !== (samp[0] & samp[1])) begin
        failures++;
        $display("mismatch at %0d: dout=%b expected %b", n, dout, samp[0] & samp[1]);
      end
      // isolated one-sample pulses must never pass
      for (int b = 0; b < W; b++) if (samp[0][b] & ~samp[1][b]) glitches++;
      #3 din = W'($urandom);
    end
    checks++;
    if (glitches == 0) begin failures++; $display("no rising samples were exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
