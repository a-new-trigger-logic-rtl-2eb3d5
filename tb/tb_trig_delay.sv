// tb_trig_delay: runs each delay mode.  A random pulse train is fed in and
// the output is compared with the input history kept by the testbench:
// ZERO = same cycle, ONE = one cycle later, LINE = 'dly' cycles later,
// TEST_INPUT = the test signal.
module tb_trig_delay;
  import trlo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic din = 1'b0, test_in = 1'b0, dout;
  delay_mode_e mode = DELAY_ZERO;
  logic [7:0] dly = '0;
  logic hist [0:300];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trig_delay dut (.clk, .rst_n, .din, .test_in, .mode, .dly, .dout);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(delay_mode_e m, int d, int cycles);
    int exp_d;
    mode = m;
    dly  = 8'(d);
    exp_d = (m == DELAY_ZERO) ? 0 : (m == DELAY_ONE) ? 1 : d;
    for (int k = 0; k <= 300; k++) hist[k] = 1'b0;
    // flush the line
    din = 1'b0;
    repeat (260) @(posedge clk);
    for (int n = 0; n < cycles; n++) begin
      @(posedge clk);
      #1;
      din     = ($urandom_range(0, 3) == 0);
      test_in = $urandom_range(0, 1);
      for (int k = 300; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
      #1;
      checks++;
      if (m == DELAY_TEST_INPUT) begin
        if (dout !== test_in) begin failures++; $display("test mode mismatch"); end
      end else if (dout !== hist[exp_d]) begin
        failures++;
        $display("mode %0d delay %0d cycle %0d: dout=%b expected %b", m, d, n, dout, hist[exp_d]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(DELAY_ZERO, 0, 200);
    run(DELAY_ONE, 0, 200);
    run(DELAY_LINE, 1, 200);
    run(DELAY_LINE, 7, 300);
    run(DELAY_LINE, 100, 400);
    run(DELAY_LINE, 255, 600);
    run(DELAY_LINE, 0, 100);
    run(DELAY_TEST_INPUT, 0, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
