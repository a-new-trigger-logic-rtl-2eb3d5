// tb_fast_path: directed run of the fast path with a small matrix:
//   output 0 = in0 AND in1, output 1 = in2 AND NOT in3,
//   output 2 = aux0 AND in4 (reduced by 2^2).
// Checks: the master start follows the shaped input by two clocks and lasts
// sum_out_stretch+2 cycles; one master start per arming; inhibit blocks the
// pattern; ON/OFF masks a channel; reduction passes 1 in 4; the
// anticoincidence vetoes; a delay line brings two inputs into coincidence;
// the four scaler banks count what the testbench counted.
module tb_fast_path;
  import trlo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  trlo_setup_t setup;
  logic [15:0] trig_in = '0;
  logic [3:0]  aux_in = '0;
  logic inhibit = 1'b0, arm = 1'b1, scaler_reset = 1'b0, scaler_latch = 1'b0;
  logic [15:0] trig_shaped, lmu_out, tpat_red;
  logic lmu_or, master_start;
  logic [15:0][31:0] s_in, s_lmu, s_dt, s_red;
  int checks = 0, failures = 0;
  int ms_rises = 0, ms_len = 0, last_ms_len = 0;
  int red_cnt [16];
  logic ms_q = 1'b0;

  always #5 clk = ~clk;

  logic [15:0][31:0] l_in, l_lmu, l_dt, l_red;

  fast_path dut (
    .clk, .rst_n, .setup, .trig_in, .aux_in, .lmu_test(1'b0), .inhibit, .arm,
    .scaler_reset, .trig_shaped, .lmu_out, .lmu_or, .tpat_red, .master_start,
    .sca_before_lmu(s_in), .sca_before_deadtime(s_lmu),
    .sca_after_deadtime(s_dt), .sca_after_reduction(s_red), .scaler_latch,
    .sca_before_lmu_l(l_in), .sca_before_deadtime_l(l_lmu),
    .sca_after_deadtime_l(l_dt), .sca_after_reduction_l(l_red));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    ms_q <= master_start;
    if (master_start && !ms_q) begin ms_rises <= ms_rises + 1; ms_len <= 1; end
    else if (master_start) ms_len <= ms_len + 1;
    if (!master_start && ms_q) last_ms_len <= ms_len;
    for (int b = 0; b < 16; b++) if (tpat_red[b]) red_cnt[b] <= red_cnt[b] + 1;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // drive 'm' for 'w' sampled edges, then idle 20 cycles
  task automatic hit(logic [15:0] m, int w = 1);
    #1 trig_in = m;
    repeat (w) @(posedge clk);
    #1 trig_in = '0;
    repeat (20) @(posedge clk);
  endtask

  initial begin
    int r0, n;
    for (int b = 0; b < 16; b++) red_cnt[b] = 0;
    setup = '0;
    for (int i = 0; i < 16; i++) begin
      setup.trig_delay_mode[i]   = DELAY_ZERO;
      setup.trig_restart_mode[i] = RESTART_LEADING_EDGE;
    end
    setup.trig_lmu[0][1:0] = 2'b01;  setup.trig_lmu[0][3:2] = 2'b01;
    setup.trig_lmu[1][5:4] = 2'b01;  setup.trig_lmu[1][7:6] = 2'b10;
    setup.trig_lmu[2][9:8] = 2'b01;  setup.trig_lmu_aux[2][1:0] = 2'b01;
    setup.trig_lmu_not = 16'h0007;
    setup.tpat_enable  = 16'h0007;
    setup.trig_red[2]  = 4'd2;
    setup.sum_out_stretch = 8'd3;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // 1. latency and master-start length
    #1 trig_in = 16'h0003;
    @(posedge clk);             // edge k samples the inputs
    #1 trig_in = '0;
    chk(trig_shaped[1:0] == 2'b11, "shaped inputs one cycle after sampling");
    @(posedge clk); #1;         // after k+1: LMU output and pattern
    chk(lmu_out[0] && tpat_red[0], "LMU output and pattern at k+1");
    chk(!master_start, "no master start before k+2");
    @(posedge clk); #1;         // after k+2: master start
    chk(master_start, "master start at k+2");
    repeat (20) @(posedge clk);
    chk(ms_rises == 1, $sformatf("one master start (%0d)", ms_rises));
    chk(last_ms_len == 5, "master start lasts sum_out_stretch+2");

    // 2. not armed: pattern but no master start
    #1 arm = 1'b0;
    hit(16'h0003);
    chk(ms_rises == 1, "no master start while not armed");
    chk(red_cnt[0] == 2, "pattern still produced while not armed");
    #1 arm = 1'b1;

    // 3. inhibit blocks everything after the LMU
    #1 inhibit = 1'b1;
    hit(16'h0003);
    chk(red_cnt[0] == 2 && ms_rises == 1, "inhibit blocks the pattern");
    chk(s_lmu[0] == 3 && s_dt[0] == 2, "scalers before/after dead-time veto");
    #1 inhibit = 1'b0;

    // 4. anticoincidence veto
    hit(16'h0004);
    chk(red_cnt[1] == 1, "in2 without in3 fires output 1");
    hit(16'h000C);
    chk(red_cnt[1] == 1, "in3 vetoes output 1");

    // 5. channel ON/OFF
    setup.tpat_enable = 16'h0005;
    hit(16'h0004);
    chk(red_cnt[1] == 1 && s_dt[1] == 2, "switched-off channel blocked after veto scaler");
    setup.tpat_enable = 16'h0007;

    // 6. reduction 1 in 4 on output 2
    #1 aux_in = 4'b0001;
    for (int k = 0; k < 8; k++) hit(16'h0010);
    #1 aux_in = '0;
    chk(s_dt[2] == 8, "8 pulses after the veto on output 2");
    chk(red_cnt[2] == 2 && s_red[2] == 2, "reduction 2^2 passes 2 of 8");

    // 7. delay line: in0 delayed by 6 meets in1 six cycles later
    r0 = red_cnt[0];
    hit(16'h0001, 1);   // in0 alone: nothing
    chk(red_cnt[0] == r0, "in0 alone gives no coincidence");
    setup.trig_delay_mode[0] = DELAY_LINE;
    setup.trig_delay[0] = 8'd6;
    #1 trig_in = 16'h0001;
    @(posedge clk);
    #1 trig_in = '0;
    repeat (5) @(posedge clk);
    #1 trig_in = 16'h0002;
    @(posedge clk);
    #1 trig_in = '0;
    repeat (20) @(posedge clk);
    chk(red_cnt[0] == r0 + 1, "delay line aligns in0 with in1");

    // 8. input scalers, latch and reset
    chk(s_in[4] == 8 && s_in[2] == 3, "input scalers count leading edges");
    #1 scaler_latch = 1'b1;
    @(posedge clk); #1 scaler_latch = 1'b0;
    chk(l_in == s_in && l_lmu == s_lmu && l_dt == s_dt && l_red == s_red && l_in[4] == 8,
        "latch pulse copies all four banks");
    #1 scaler_reset = 1'b1;
    @(posedge clk); #1 scaler_reset = 1'b0;
    n = 0;
    for (int b = 0; b < 16; b++) n += s_in[b] + s_lmu[b] + s_dt[b] + s_red[b];
    chk(n == 0, "scaler reset clears all banks");
    chk(l_in[4] == 8, "latched values survive the reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
