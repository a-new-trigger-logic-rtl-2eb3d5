// tb_event_latches: the timer counts clock cycles from its reset; timer
// latches capture it on the selected edge (leading or trailing) or on the
// control pulse; pattern latches capture the source vector on a leading
// edge.
module tb_event_latches;
  import trlo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic timer_reset = 1'b0, timer_latch_pulse = 1'b0;
  logic [3:0] tl_in = '0;
  latch_mode_e [3:0] latch_mode;
  logic [1:0] pl_in = '0;
  logic [N_SRC-1:0] src = '0;
  logic [31:0] timer;
  logic [3:0][31:0] timer_latch;
  logic [1:0][N_SRC-1:0] pattern_latch;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  event_latches dut (.clk, .rst_n, .timer_reset, .timer_latch_pulse, .tl_in, .latch_mode,
                     .pl_in, .src, .timer, .timer_latch, .pattern_latch);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    logic [31:0] t_at;
    logic [N_SRC-1:0] p;
    latch_mode = {LATCH_TRAILING_EDGE, LATCH_LEADING_EDGE, LATCH_TRAILING_EDGE, LATCH_LEADING_EDGE};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 timer_reset = 1'b1;
    @(posedge clk); #1 timer_reset = 1'b0;
    repeat (100) @(posedge clk); #1;
    chk(timer == 100, $sformatf("timer counts cycles (%0d)", timer));
    // leading edge on inputs 0 and 1: only 0 (leading) latches
    tl_in = 4'b0011;
    t_at = timer;
    @(posedge clk); #1;
    chk(timer_latch[0] == t_at, "leading-edge latch");
    chk(timer_latch[1] == 0, "trailing-edge latch waits");
    repeat (10) @(posedge clk);
    #1 tl_in = 4'b0000;
    t_at = timer;
    @(posedge clk); #1;
    chk(timer_latch[1] == t_at, "trailing-edge latch");
    #1 timer_latch_pulse = 1'b1;
    t_at = timer;
    @(posedge clk); #1 timer_latch_pulse = 1'b0;
    chk(timer_latch[2] == t_at && timer_latch[3] == t_at, "control pulse latches all");
    // pattern latch
    src = {$urandom, $urandom, $urandom};
    p = src;
    pl_in = 2'b01;
    @(posedge clk); #1;
    src = ~src;
    @(posedge clk); #1;
    chk(pattern_latch[0] == p, "pattern latched on the leading edge only");
    chk(pattern_latch[1] == '0, "other pattern latch untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
