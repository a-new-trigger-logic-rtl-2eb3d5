// tb_trigger_sm: drives the trigger state machine through every path of
// the state diagram and checks states, reasons, winners and timing.  A small
// model of the read-out trigger module raises its dead time 3 cycles after
// each sent trigger and holds it for 40 cycles.
//   A  detector trigger: window of accept_window_len+1 cycles merges two
//      patterns, lowest trigger wins, BUSY lasts fast_busy_len+1 cycles,
//      the machine waits for the LMU OR to drop before IDLE (reason 1);
//   B  pending trigger (reason 2) and its clearing;
//   C  pulse trigger (reason 3); a pulse outside IDLE is ignored;
//   D  TRIVA dead time in IDLE (reason 4); E busy in IDLE (reason 5) with a
//      pending trigger served meanwhile (reason 7); F dead time again in
//      TRIVA DONE (reason 6); G pattern while in PENDING/PULSE (reason 8);
//   H  multi trigger after max_multi_trig unmapped events;
//   I  software dead time and software busy set and cleared by pulses.
module tb_trigger_sm;
  import trlo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  trlo_setup_t setup;
  logic [15:0] tpat_red = '0, pend_set = '0, pend_clear = '0, pulse_trig = '0;
  logic lmu_or = 1'b0, busy_in = 1'b0, dt_in = 1'b0;
  logic set_sw_dt = 1'b0, clear_sw_dt = 1'b0, set_sw_busy = 1'b0, clear_sw_busy = 1'b0;
  logic sw_dt, sw_busy;
  trig_state_e state;
  trig_reason_e reason;
  logic arm, inhibit, deadtime, int_dt, accept_pulse;
  logic [15:0] accept_trig, trig_tpat, accepted, pending;
  logic [3:0] encode_trig, encoded;
  logic [31:0] trig_count;
  int checks = 0, failures = 0;
  int n_window = 0, n_busy = 0, n_send = 0;
  int last_encode = 0;
  bit triva_en = 1'b1;
  bit reason_seen [9];

  always #5 clk = ~clk;

  trigger_sm dut (
    .clk, .rst_n, .setup, .tpat_red, .lmu_or, .pend_set, .pend_clear, .pulse_trig,
    .busy_in, .dt_in, .set_sw_dt, .clear_sw_dt, .set_sw_busy, .clear_sw_busy,
    .sw_dt, .sw_busy, .state, .reason, .arm, .inhibit, .deadtime, .int_dt,
    .accept_trig, .encode_trig, .accept_pulse, .trig_tpat, .accepted, .encoded,
    .trig_count, .pending);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read-out trigger module model and monitors
  always @(posedge clk) if (rst_n) begin
    if (state == TS_WINDOW) n_window++;
    if (state == TS_BUSY) n_busy++;
    if (accept_pulse) begin n_send++; last_encode = encode_trig; end
    reason_seen[reason] = 1'b1;
  end

  initial begin
    forever begin
      @(posedge clk);
      if (triva_en && state == TS_SEND_TRIGGER) begin
        repeat (3) @(posedge clk);
        #1 dt_in = 1'b1;
        repeat (40) @(posedge clk);
        #1 dt_in = 1'b0;
      end
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t state=%h)", what, $time, state); end
  endtask

  task automatic wait_state(trig_state_e s, int max = 500);
    int n = 0;
    while (state != s && n < max) begin @(posedge clk); #1; n++; end
    chk(state == s, $sformatf("reached state %h", s));
  endtask

  task automatic strobe_tpat(logic [15:0] m);
    #1 tpat_red = m;
    @(posedge clk);
    #1 tpat_red = '0;
  endtask

  initial begin
    int c0, s0;
    setup = '0;
    setup.accept_window_len = 16'd3;
    setup.fast_busy_len     = 16'd4;
    setup.tpat_trig[0] = 4'd1;
    setup.tpat_trig[1] = 4'd2;
    setup.tpat_trig[2] = 4'd3;
    setup.tpat_trig[3] = 4'd0;   // unmapped, for the multi trigger
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    chk(state == TS_IDLE && arm && !deadtime, "idle and armed after reset");

    // ---- A: detector trigger
    c0 = trig_count;
    lmu_or = 1'b1;
    strobe_tpat(16'h0002);
    chk(!arm, "arm cleared by the pattern");
    chk(state == TS_START_WINDOW && reason == R_TPAT, "START WINDOW, reason 1");
    @(posedge clk);
    strobe_tpat(16'h0001);        // second pattern inside the window
    wait_state(TS_END_WINDOW);
    chk(n_window == 4, $sformatf("window lasted %0d cycles", n_window));
    chk(trig_tpat == 16'h0003, "patterns in the window merged");
    @(posedge clk); #1;
    chk(int_dt && inhibit && deadtime, "internal dead time set after END WINDOW");
    wait_state(TS_START_SEND_TRIGGER);
    chk(accept_pulse && encode_trig == 4'd1 && accept_trig == 16'h0002, "trigger 1 wins over 2");
    @(posedge clk); #1;
    chk(state == TS_SEND_TRIGGER && encode_trig == 4'd1, "SEND keeps the code");
    wait_state(TS_WAIT_TRIVA);
    chk(n_busy == 5, $sformatf("BUSY lasted %0d cycles", n_busy));
    wait_state(TS_TRIVA_DONE);
    repeat (10) @(posedge clk); #1;
    chk(state == TS_TRIVA_DONE && inhibit, "held in TRIVA DONE while LMU OR is high");
    lmu_or = 1'b0;
    @(posedge clk); #1;
    chk(state == TS_IDLE && arm && !int_dt, "back to IDLE, re-armed");
    chk(trig_tpat == '0 && accepted == '0, "latched values cleared");
    chk(trig_count == c0 + 1, "event counter");

    // ---- B: pending trigger
    #1 pend_set[4] = 1'b1;
    @(posedge clk); #1 pend_set[4] = 1'b0;
    chk(pending[4], "pending bit set");
    @(posedge clk); #1;
    chk(state == TS_PEND_PULSE_TRIG && reason == R_PENDING, "PENDING/PULSE, reason 2");
    @(posedge clk); #1;
    chk(state == TS_PULSE_SELECTION, "PULSE SELECTION");
    wait_state(TS_START_SEND_TRIGGER);
    chk(encode_trig == 4'd4, "pending trigger 4 sent");
    @(posedge clk); #1;
    chk(!pending[4], "served pending trigger cleared");
    wait_state(TS_IDLE);

    // ---- C: pulse trigger, and a pulse outside IDLE is ignored
    #1 pulse_trig[6] = 1'b1;
    @(posedge clk); #1 pulse_trig[6] = 1'b0;
    chk(reason == R_PULSE, "reason 3");
    wait_state(TS_BUSY);
    s0 = n_send;
    #1 pulse_trig[7] = 1'b1;
    @(posedge clk); #1 pulse_trig[7] = 1'b0;
    chk(last_encode == 6, "pulse trigger 6 sent");
    wait_state(TS_IDLE);
    repeat (5) @(posedge clk); #1;
    chk(n_send == s0 && state == TS_IDLE, "pulse outside IDLE ignored");

    // ---- D: TRIVA dead time while idle
    #1 dt_in = 1'b1;
    @(posedge clk); #1;
    chk(state == TS_WAIT_TRIVA && reason == R_DT_IDLE && inhibit, "WAIT TRIVA, reason 4");
    #1 dt_in = 1'b0;
    wait_state(TS_IDLE);

    // ---- E: busy while idle, pending served meanwhile
    #1 busy_in = 1'b1;
    @(posedge clk); #1;
    chk(state == TS_TRIVA_DONE && reason == R_BUSY, "TRIVA DONE, reason 5");
    repeat (5) @(posedge clk); #1;
    chk(state == TS_TRIVA_DONE, "held while busy");
    #1 pend_set[9] = 1'b1;
    @(posedge clk); #1 pend_set[9] = 1'b0;
    @(posedge clk); #1;
    chk(state == TS_PULSE_SELECTION && reason == R_PENDING_DONE, "PULSE SELECTION, reason 7");
    wait_state(TS_SEND_TRIGGER);
    chk(encode_trig == 4'd9, "pending 9 sent while busy");
    wait_state(TS_TRIVA_DONE);
    #1 busy_in = 1'b0;
    wait_state(TS_IDLE);

    // ---- F: TRIVA dead time again in TRIVA DONE
    lmu_or = 1'b1;
    strobe_tpat(16'h0004);
    wait_state(TS_TRIVA_DONE);
    triva_en = 1'b0;
    #1 dt_in = 1'b1;
    @(posedge clk); #1;
    chk(state == TS_WAIT_TRIVA && reason == R_DT_DONE, "WAIT TRIVA, reason 6");
    #1 dt_in = 1'b0; lmu_or = 1'b0;
    triva_en = 1'b1;
    wait_state(TS_IDLE);
    chk(last_encode == 3, "tpat bit 2 mapped to trigger 3");

    // ---- G: pattern while in PENDING/PULSE
    #1 pend_set[5] = 1'b1;
    @(posedge clk); #1 pend_set[5] = 1'b0;
    @(posedge clk); #1;
    chk(state == TS_PEND_PULSE_TRIG, "PENDING/PULSE entered");
    strobe_tpat(16'h0002);
    chk(state == TS_START_WINDOW && reason == R_TPAT_PEND, "START WINDOW, reason 8");
    wait_state(TS_START_SEND_TRIGGER);
    chk(encode_trig == 4'd2, "trigger 2 beats pending 5");
    chk(pending[5], "pending 5 still waiting");
    wait_state(TS_PULSE_SELECTION);
    wait_state(TS_START_SEND_TRIGGER);
    chk(encode_trig == 4'd5, "pending 5 served next");
    wait_state(TS_IDLE);

    // ---- H: multi trigger
    setup.max_multi_trig = 8'd2;
    setup.multi_trigger  = 4'd11;
    s0 = n_send;
    strobe_tpat(16'h0008);
    wait_state(TS_IDLE);
    chk(n_send == s0, "unmapped pattern sends nothing");
    strobe_tpat(16'h0008);
    wait_state(TS_START_SEND_TRIGGER);
    chk(encode_trig == 4'd11, "multi trigger after max_multi_trig events");
    wait_state(TS_IDLE);

    // ---- I: software dead time and busy
    #1 set_sw_dt = 1'b1;
    @(posedge clk); #1 set_sw_dt = 1'b0;
    @(posedge clk); #1;
    chk(sw_dt && deadtime && inhibit && state == TS_WAIT_TRIVA, "software dead time holds WAIT TRIVA");
    repeat (10) @(posedge clk); #1;
    chk(state == TS_WAIT_TRIVA, "software dead time stays until cleared");
    clear_sw_dt = 1'b1;
    @(posedge clk); #1 clear_sw_dt = 1'b0;
    wait_state(TS_IDLE);
    set_sw_busy = 1'b1;
    @(posedge clk); #1 set_sw_busy = 1'b0;
    @(posedge clk); #1;
    chk(sw_busy && inhibit && !deadtime && state == TS_TRIVA_DONE, "software busy: TRIVA DONE, inhibit without dead time");
    clear_sw_busy = 1'b1;
    @(posedge clk); #1 clear_sw_busy = 1'b0;
    wait_state(TS_IDLE);
    chk(!inhibit, "inhibit released");

    for (int r = 1; r <= 8; r++) chk(reason_seen[r], $sformatf("reason %0d seen", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
