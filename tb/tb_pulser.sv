// tb_pulser: checks one-clock pulses spaced exactly 'period' cycles for a
// few periods, and silence for period 0.
module tb_pulser;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] period = '0;
  logic pulse;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pulser dut (.clk, .rst_n, .period, .pulse);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int p, int cycles);
    int last = -1, npulse = 0, width = 0;
    rst_n = 1'b0;
    period = 32'(p);
    @(posedge clk); #1 rst_n = 1'b1;
    for (int c = 0; c < cycles; c++) begin
      @(posedge clk); #1;
      if (pulse) begin
        npulse++;
        if (last >= 0) begin
          checks++;
          if (c - last != p) begin
            failures++;
            $display("period %0d: spacing %0d", p, c - last);
          end
        end
        last = c;
      end
    end
    checks++;
    if (p == 0 ? (npulse != 0) : (npulse < cycles / p - 1 || npulse > cycles / p + 1)) begin
      failures++;
      $display("period %0d: %0d pulses in %0d cycles", p, npulse, cycles);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(1, 50);
    run(2, 50);
    run(5, 100);
    run(13, 300);
    run(0, 100);
    run(997, 5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
