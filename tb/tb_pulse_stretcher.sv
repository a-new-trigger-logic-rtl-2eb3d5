// tb_pulse_stretcher: directed checks of the n+2 output length for each
// restart mode, then a random input compared with a cycle model of the
// specified behaviour.
module tb_pulse_stretcher;
  import trlo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic din = 1'b0, dout;
  logic [7:0] len = 8'd3;
  restart_mode_e mode = RESTART_LEADING_EDGE;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pulse_stretcher dut (.clk, .rst_n, .din, .len, .mode, .dout);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count the cycles of the next output pulse following a 'w'-cycle input
  task automatic one_pulse(int w, int expect_len, string what);
    int high, first;
    din = 1'b0;
    repeat (300) @(posedge clk);
    #1 din = 1'b1;
    high = 0;
    first = -1;
    for (int c = 0; c < w + 300; c++) begin
      @(posedge clk); #1;
      if (dout) begin high++; if (first < 0) first = c; end
      if (c == w - 1) din = 1'b0;
    end
    // the output must start one cycle after the first sampled edge
    checks++;
    if (mode != RESTART_TRAILING_EDGE && first != 0) begin
      failures++;
      $display("%s: output started at %0d", what, first);
    end
    checks++;
    if (high != expect_len) begin
      failures++;
      $display("%s: pulse of %0d cycles, expected %0d", what, high, expect_len);
    end
  endtask

  // cycle model of the specification
  int model_cnt = 0;
  logic din_prev = 1'b0;
  logic model_out;

  task automatic random_run(restart_mode_e m, int l);
    logic st;
    mode = m;
    len = 8'(l);
    din = 1'b0;
    repeat (300) @(posedge clk);
    model_cnt = 0;
    din_prev = 1'b0;
    for (int n = 0; n < 1500; n++) begin
      #1 din = ($urandom_range(0, 5) == 0);
      @(posedge clk);
      // the edge samples din; decide start per mode
      case (m)
        RESTART_LEADING_EDGE:  st = din & ~din_prev;
        RESTART_TRAILING_EDGE: st = ~din & din_prev;
        RESTART_LEAD_IF_INACT: st = din & ~din_prev & (model_cnt == 0);
        default:               st = din;
      endcase
      if (st) model_cnt = l + 2;
      else if (model_cnt > 0) model_cnt--;
      din_prev = din;
      #1;
      checks++;
      if (dout !== (model_cnt != 0)) begin
        failures++;
        $display("mode %0d len %0d cycle %0d: dout=%b model=%0d", m, l, n, dout, model_cnt);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    mode = RESTART_LEADING_EDGE;  len = 8'd0;  one_pulse(1, 2, "len0");
    mode = RESTART_LEADING_EDGE;  len = 8'd3;  one_pulse(1, 5, "len3");
    mode = RESTART_LEADING_EDGE;  len = 8'd20; one_pulse(4, 22, "len20");
    mode = RESTART_WHEN_PRESENT;  len = 8'd3;  one_pulse(10, 14, "present");
    mode = RESTART_TRAILING_EDGE; len = 8'd3;  one_pulse(10, 5, "trailing");
    mode = RESTART_LEAD_IF_INACT; len = 8'd3;  one_pulse(10, 5, "lead_if_inact");
    random_run(RESTART_LEADING_EDGE, 4);
    random_run(RESTART_TRAILING_EDGE, 2);
    random_run(RESTART_LEAD_IF_INACT, 6);
    random_run(RESTART_WHEN_PRESENT, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
