// tb_downscaler: feeds trains of one-cycle pulses and checks that exactly
// one pulse in 2^n passes, the first one of the train included, and that
// the passed pulse is the same cycle as the input pulse.
module tb_downscaler;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pulse_in = 1'b0, pulse_out;
  logic [3:0] factor = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  downscaler dut (.clk, .rst_n, .pulse_in, .factor, .pulse_out);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic train(int n, int pulses);
    int passed = 0;
    int idx = 0;
    rst_n = 1'b0;
    factor = 4'(n);
    @(posedge clk); #1 rst_n = 1'b1;
    for (int p = 0; p < pulses; p++) begin
      pulse_in = 1'b1;
      #1;
      checks++;
      if (pulse_out !== ((idx % (1 << n)) == 0)) begin
        failures++;
        $display("n=%0d pulse %0d: out=%b", n, idx, pulse_out);
      end
      if (pulse_out) passed++;
      idx++;
      @(posedge clk); #1 pulse_in = 1'b0;
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
      checks++;
      if (pulse_out !== 1'b0) begin failures++; $display("output without input"); end
    end
    checks++;
    if (passed != (pulses + (1 << n) - 1) / (1 << n)) begin
      failures++;
      $display("n=%0d: %0d of %0d passed", n, passed, pulses);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    train(0, 20);
    train(1, 40);
    train(3, 70);
    train(5, 100);
    train(10, 2100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
