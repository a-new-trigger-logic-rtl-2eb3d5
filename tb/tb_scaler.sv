// tb_scaler: random input levels, counting each mode's events in the
// testbench (rising edges, falling edges, high cycles, high cycles with a
// tick) and comparing with the counter; reset and latch are exercised.
module tb_scaler;
  import trlo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic din = 1'b0, tick = 1'b0, reset = 1'b0, latch = 1'b0;
  scaler_mode_e mode = SCALER_LEADING_EDGE;
  logic [31:0] count, latched;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scaler dut (.clk, .rst_n, .din, .tick, .mode, .reset, .latch, .count, .latched);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(scaler_mode_e m);
    int exp_cnt = 0;
    int snap = 0;
    logic prev = 1'b0;
    mode = m;
    #1 din = 1'b0; reset = 1'b1;
    @(posedge clk); #1 reset = 1'b0;
    @(posedge clk); prev = din;
    for (int n = 0; n < 1000; n++) begin
      #1;
      din  = $urandom_range(0, 1);
      tick = ($urandom_range(0, 3) == 0);
      latch = (n == 500);
      if (latch) snap = exp_cnt;
      @(posedge clk);
      case (m)
        SCALER_LEADING_EDGE:  if (din & ~prev) exp_cnt++;
        SCALER_TRAILING_EDGE: if (~din & prev) exp_cnt++;
        SCALER_DURATION_CLK:  if (din) exp_cnt++;
        default:              if (din & tick) exp_cnt++;
      endcase
      prev = din;
    end
    #1;
    checks++;
    if (count !== 32'(exp_cnt)) begin
      failures++;
      $display("mode %0d: count %0d expected %0d", m, count, exp_cnt);
    end
    checks++;
    if (latched !== 32'(snap)) begin
      failures++;
      $display("mode %0d: latched %0d expected %0d", m, latched, snap);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(SCALER_LEADING_EDGE);
    run(SCALER_TRAILING_EDGE);
    run(SCALER_DURATION_CLK);
    run(SCALER_DURATION_TICK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
