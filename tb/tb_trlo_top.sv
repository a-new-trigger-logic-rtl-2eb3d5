// tb_trlo_top: end-to-end test of the whole trigger logic at its default
// sizes (no parameter overrides), as an experiment would set it up.
//
// Set-up: ECL trigger inputs 0..6 feed logic-matrix outputs 0..6 (output 1
// is input 1 without input 2, output 4 is auxiliary input 0 routed from
// ECL IO input 0, output 2 is reduced by 4, output 3 is switched off, output
// 5 has no read-out trigger, output 6 uses the delay line).  The encoded
// read-out trigger is routed to ECL IO outputs 0..3 and the one-hot one to
// the ECL outputs; the master start is OR-ed onto LEMO output 0.  A model of
// the read-out trigger module (TRIVA) watches the encoded trigger, records
// it and raises its dead time on ECL IO input 3 three cycles later for 50
// cycles; the multiplexer routes that input to the dead-time input.  ECL IO
// input 4 is the busy input, pulser 0 sets pending trigger 12 (as a time
// calibrator would), LEMO input 0 is pulse trigger 13, LEMO output 1 is
// LEMO input 1 in DIRECT mode.  General scalers count an edge gate
// (duration), the master start, a gate delay, a downscaler, the 8x8 logic
// matrix, a masked OR and a coincidence.
//
// The control pulses (software dead time and busy, pulses injected into
// multiplexer sources and destinations, edge-gate and pattern-latch pulses,
// fast-path scaler latch) are exercised at the end.
//
// Each test sends a stimulus, waits until the system is idle again and
// compares the recorded read-out triggers, reasons and scalers with what
// the set-up implies.  Every mechanism is counted; one that never
// happened counts as a failure.
module tb_trlo_top;
  import trlo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  trlo_setup_t setup;
  trlo_pulse_t ctrl;
  logic [15:0] ecl_in = '0;
  logic [7:0]  io_drv = '0, ecl_io_in;
  logic [1:0]  lemo_in = '0;
  logic [15:0] ecl_out;
  logic [7:0]  ecl_io_out;
  logic [1:0]  lemo_out;
  logic [5:0]  led;
  logic master_start, deadtime, inhibit, arm, int_deadtime, sw_deadtime, sw_busy;
  trig_state_e trig_state;
  trig_reason_e trig_reason;
  logic [15:0] lmu_out, trig_tpat, accepted, pending;
  logic [3:0]  encoded;
  logic [31:0] trig_count, timer;
  logic [15:0][31:0] sca_before_lmu, sca_before_deadtime, sca_after_deadtime, sca_after_reduction;
  logic [15:0][31:0] sca_before_lmu_l, sca_before_deadtime_l, sca_after_deadtime_l, sca_after_reduction_l;
  logic [7:0][31:0] scaler, scaler_latched;
  logic [1:0] edge_gate_out;
  logic [3:0][31:0] timer_latch;
  logic [1:0][N_SRC-1:0] pattern_latch;
  logic [9:0] tracer_rd_addr = '0;
  logic [31:0] tracer_rd_data;
  logic [10:0] tracer_words;
  logic [2:0] tracer_state;

  int checks = 0, failures = 0;
  // TRIVA model
  logic triva_dt = 1'b0, force_dt = 1'b0;
  int tv_delay = 0, tv_hold = 0;
  logic [3:0] enc_prev = '0;
  int got [$];
  logic [15:0] tpat_at_send [$];
  // mechanism counters
  int n_ms = 0, n_ms_len_ok = 0, n_merge = 0, n_anti = 0, n_red = 0, n_onoff = 0;
  int n_veto = 0, n_aux = 0, n_multi = 0, n_pending = 0, n_pulse = 0, n_busy = 0;
  int n_direct = 0, n_edge_gate = 0, n_gate_delay = 0, n_downscale = 0, n_glmu = 0;
  int n_or = 0, n_coinc = 0, n_tracer = 0, n_delay_line = 0, n_timer_latch = 0;
  int n_sw_dt = 0, n_sw_busy = 0, n_src_pulse = 0, n_dest_pulse = 0, n_ctrl_gate = 0;
  int n_ptn_latch = 0, n_trig_sca_latch = 0;
  int n_in0 = 0;
  int ms_run = 0;
  bit reason_seen [9];

  assign ecl_io_in = {io_drv[7:4], triva_dt | force_dt, io_drv[2:0]};

  always #5 clk = ~clk;

  trlo_top dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t state=%h)", what, $time, trig_state); end
  endtask

  // TRIVA model and monitors
  always @(posedge clk) if (rst_n) begin
    if (ecl_io_out[3:0] != 4'd0 && enc_prev == 4'd0) begin
      got.push_back(int'(ecl_io_out[3:0]));
      tpat_at_send.push_back(trig_tpat);
      chk(ecl_out == (16'd1 << ecl_io_out[3:0]), "one-hot and encoded trigger agree");
      chk(deadtime, "dead time is set while a trigger is sent");
      tv_delay = 3;
    end
    enc_prev <= ecl_io_out[3:0];
    if (tv_delay > 0) begin
      tv_delay--;
      if (tv_delay == 0) tv_hold = 50;
    end
    if (tv_hold > 0) tv_hold--;
    triva_dt <= (tv_hold > 0);
    reason_seen[trig_reason] = 1'b1;
    if (lemo_out[0]) ms_run++;
    else if (ms_run != 0) begin
      n_ms++;
      if (ms_run == int'(setup.sum_out_stretch) + 2) n_ms_len_ok++;
      else $display("master start of %0d cycles", ms_run);
      ms_run = 0;
    end
  end

  task automatic cyc(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic wait_idle();
    int quiet = 0, n = 0;
    while (quiet < 20 && n < 5000) begin
      @(posedge clk); #1; n++;
      if (trig_state == TS_IDLE && !deadtime && !inhibit && tv_hold == 0 && tv_delay == 0) quiet++;
      else quiet = 0;
    end
    chk(quiet >= 20, "system returns to idle");
  endtask

  task automatic pulse_ecl(int i, int w = 2);
    ecl_in[i] = 1'b1;
    if (i == 0) n_in0++;
    cyc(w);
    ecl_in[i] = 1'b0;
  endtask

  task automatic route(int d, int s);
    setup.mux[d] = SRC_W'(s);
  endtask

  task automatic set_coinc(int o, int i);
    setup.trig_lmu[o][2*i] = 1'b1;
  endtask

  initial begin
    int n0, lat0, lat6, t0;
    logic [31:0] a, b;
    setup = '0;
    ctrl  = '0;
    for (int d = 0; d < N_DST; d++) route(d, SRC_WIRED_ZERO);
    for (int i = 0; i < N_TRIG; i++) setup.trig_stretch[i] = 8'd3;
    set_coinc(0, 0);
    set_coinc(1, 1); setup.trig_lmu[1][2*2+1] = 1'b1;   // anti input 2
    set_coinc(2, 3); setup.trig_red[2] = 4'd2;           // reduction by 4
    set_coinc(3, 4);                                     // switched off below
    setup.trig_lmu_aux[4][0] = 1'b1;                     // aux input 0
    set_coinc(5, 5);                                     // no read-out trigger
    set_coinc(6, 6);
    setup.trig_delay_mode[6] = DELAY_LINE;
    setup.trig_delay[6] = 8'd30;
    setup.trig_lmu_not = 16'h007F;                       // outputs 0..6 in use
    setup.tpat_enable = 16'hFFF7;
    setup.tpat_trig[0] = 4'd1;
    setup.tpat_trig[1] = 4'd2;
    setup.tpat_trig[2] = 4'd3;
    setup.tpat_trig[3] = 4'd5;
    setup.tpat_trig[4] = 4'd4;
    setup.tpat_trig[6] = 4'd6;
    setup.accept_window_len = 16'd5;
    setup.fast_busy_len     = 16'd20;
    setup.max_multi_trig    = 8'd2;
    setup.multi_trigger     = 4'd9;
    setup.sum_out_stretch   = 8'd3;
    setup.tracer_len        = 8'd20;
    for (int k = 0; k < 4; k++) route(DST_ECL_IO_OUT + k, SRC_ENCODED_TRIG + k);
    for (int k = 0; k < 16; k++) route(DST_ECL_OUT + k, SRC_ACCEPT_TRIG + k);
    setup.sum_out_mask[24] = 1'b1;
    setup.direct_mode[25]  = DIRECT_DIRECT;
    setup.direct_mux[25]   = 5'd25;
    route(DST_TRIG_LMU_AUX + 0, SRC_ECL_IO_IN + 0);
    route(DST_DEADTIME_IN + 0, SRC_ECL_IO_IN + 3);
    route(DST_BUSY_IN, SRC_ECL_IO_IN + 4);
    route(DST_TRIG_PEND + 12, SRC_PULSER + 0);
    route(DST_TRIG_PULSE + 13, SRC_LEMO_IN + 0);
    route(DST_EDGE_GATE_START + 0, SRC_ECL_IO_IN + 5);
    route(DST_EDGE_GATE_STOP + 0, SRC_ECL_IO_IN + 6);
    route(DST_SCALER + 0, SRC_EDGE_GATE + 0);
    setup.scaler_mode[0] = SCALER_DURATION_CLK;
    route(DST_SCALER + 1, SRC_MASTER_START);
    route(DST_GATE_DELAY + 0, SRC_ECL_IN + 0);
    setup.delay[0] = 8'd10; setup.stretch[0] = 8'd5;
    route(DST_SCALER + 2, SRC_GATE_DELAY + 0);
    route(DST_DOWNSCALE + 0, SRC_ECL_IN + 0);
    setup.downscale[0] = 4'd2;
    route(DST_SCALER + 3, SRC_DOWNSCALE + 0);
    route(DST_LMU_IN + 0, SRC_ECL_IN + 0);
    setup.lmu[0][0] = 1'b1;
    setup.lmu_not[0] = 1'b1;
    route(DST_SCALER + 4, SRC_LMU_OUT + 0);
    setup.all_or_mask[0][SRC_ECL_IN + 6] = 1'b1;
    setup.all_or_mask[0][SRC_ECL_IN + 5] = 1'b1;
    route(DST_SCALER + 5, SRC_ALL_OR + 0);
    setup.coinc_mask[0][SRC_ECL_IN + 1] = 1'b1;
    setup.coinc_mask[0][SRC_ECL_IN + 2] = 1'b1;
    setup.coinc_level[0] = 7'd2;
    route(DST_SCALER + 6, SRC_COINCIDENCE + 0);
    route(DST_TIMER_LATCH + 0, SRC_MASTER_START);

    cyc(3);
    rst_n = 1'b1;
    cyc(5);
    ctrl.timer_reset = 1'b1; cyc(1); ctrl.timer_reset = 1'b0;
    cyc(20);

    // ---- 1: detector trigger, latency, master start, timer latch, tracer
    ctrl.tracer_start = 1'b1; cyc(1); ctrl.tracer_start = 1'b0;
    cyc(5);
    t0 = int'(timer);
    ecl_in[0] = 1'b1; n_in0++;
    lat0 = 0;
    while (!lemo_out[0] && lat0 < 50) begin @(posedge clk); #1; lat0++; end
    chk(lat0 == 5, $sformatf("master start 5 cycles after the input (%0d)", lat0));
    cyc(1); ecl_in[0] = 1'b0;
    wait_idle();
    chk(got.size() == 1 && got[$] == 1, "input 0 gives read-out trigger 1");
    chk(reason_seen[R_TPAT], "reason 1 seen");
    if (timer_latch[0] >= 32'(t0)) n_timer_latch++;
    if (tracer_words > 0) begin
      n_tracer++;
      tracer_rd_addr = 10'd0; cyc(2);
      chk(tracer_rd_data[31:30] == 2'b00, "tracer block starts with the time word");
      tracer_rd_addr = 10'd1; cyc(2);
      chk(tracer_rd_data == {2'b01, 30'd0}, "tracer history word: quiet before the rise");
      tracer_rd_addr = 10'd2; cyc(2);
      chk(tracer_rd_data[31:18] == {2'b01, 12'd14} && tracer_rd_data[0],
          "tracer shows input 0 rising 14 cycles into the block");
    end
    ctrl.tracer_stop = 1'b1; cyc(1); ctrl.tracer_stop = 1'b0;

    // ---- 2: two patterns within the window merge, lowest trigger wins
    ecl_in[1] = 1'b1; cyc(2); ecl_in[0] = 1'b1; n_in0++; cyc(2); ecl_in = '0;
    wait_idle();
    chk(got.size() == 2 && got[$] == 1, "merged event sends trigger 1");
    if (tpat_at_send[$][1:0] == 2'b11) n_merge++;
    chk(trig_count == 2, "event counter");

    // ---- 3: anti-coincidence in the logic matrix; coincidence function
    a = sca_before_lmu[1];
    ecl_in[1] = 1'b1; ecl_in[2] = 1'b1; cyc(3); ecl_in = '0;
    cyc(30);
    wait_idle();
    chk(got.size() == 2, "input 1 with input 2 is vetoed");
    if (sca_before_lmu[1] == a + 1 && sca_before_deadtime[1] == 32'd1) n_anti++;
    if (scaler[6] >= 1) n_coinc++;

    // ---- 4: reduction by 4
    for (int k = 0; k < 8; k++) begin pulse_ecl(3); wait_idle(); end
    chk(got.size() == 4 && got[2] == 3 && got[3] == 3, "reduction passes 2 of 8");
    chk(sca_after_deadtime[2] == 8 && sca_after_reduction[2] == 2, "reduction scalers");
    if (sca_after_reduction[2] == 2) n_red++;

    // ---- 5: channel switched off
    pulse_ecl(4); cyc(30); wait_idle();
    chk(got.size() == 4, "switched-off output sends nothing");
    if (sca_after_deadtime[3] == 1 && sca_after_reduction[3] == 0) n_onoff++;

    // ---- 6: dead-time veto
    a = sca_before_deadtime[0]; b = sca_after_deadtime[0];
    pulse_ecl(0);
    cyc(30);
    chk(deadtime, "read-out dead time active");
    pulse_ecl(0);
    wait_idle();
    chk(got.size() == 5 && got[$] == 1, "second input during dead time is vetoed");
    if (sca_before_deadtime[0] - a == 2 && sca_after_deadtime[0] - b == 1) n_veto++;

    // ---- 7: auxiliary input through the multiplexer
    io_drv[0] = 1'b1; cyc(3); io_drv[0] = 1'b0;
    wait_idle();
    chk(got.size() == 6 && got[$] == 4, "auxiliary input gives trigger 4");
    if (got[$] == 4) n_aux++;

    // ---- 8: multi trigger after two unmapped events
    pulse_ecl(5); wait_idle();
    chk(got.size() == 6, "first unmapped event sends nothing");
    pulse_ecl(5); wait_idle();
    chk(got.size() == 7 && got[$] == 9, "second unmapped event sends the multi trigger");
    if (got[$] == 9) n_multi++;
    if (scaler[5] == 2) n_or++;

    // ---- 9: pending trigger from pulser 0 (time calibrator)
    setup.period[0] = 32'd400;
    cyc(450);
    setup.period[0] = 32'd0;
    wait_idle();
    chk(got.size() == 8 && got[$] == 12, "pulser sets pending trigger 12");
    chk(reason_seen[R_PENDING], "reason 2 seen");
    if (got[$] == 12) n_pending++;

    // ---- 10: pulse trigger
    lemo_in[0] = 1'b1; cyc(2); lemo_in[0] = 1'b0;
    wait_idle();
    chk(got.size() == 9 && got[$] == 13, "pulse trigger 13");
    chk(reason_seen[R_PULSE], "reason 3 seen");
    if (got[$] == 13) n_pulse++;

    // ---- 11: busy in IDLE; a pending trigger is served meanwhile
    io_drv[4] = 1'b1; cyc(10);
    chk(trig_state == TS_TRIVA_DONE && trig_reason == R_BUSY, "busy: reason 5");
    ctrl.trig_pending[7] = 1'b1; cyc(1); ctrl.trig_pending[7] = 1'b0;
    cyc(100);
    io_drv[4] = 1'b0;
    wait_idle();
    chk(got.size() == 10 && got[$] == 7, "pending trigger 7 served while busy");
    chk(reason_seen[R_PENDING_DONE], "reason 7 seen");
    if (reason_seen[R_BUSY]) n_busy++;

    // ---- 12: read-out dead time in IDLE
    force_dt = 1'b1; cyc(10);
    chk(trig_state == TS_WAIT_TRIVA && trig_reason == R_DT_IDLE, "dead time in IDLE: reason 4");
    force_dt = 1'b0;
    wait_idle();

    // ---- 13: dead time again in TRIVA DONE
    pulse_ecl(0);
    cyc(15);
    io_drv[4] = 1'b1;
    cyc(150);
    chk(trig_state == TS_TRIVA_DONE, "held in TRIVA DONE by busy");
    force_dt = 1'b1; cyc(8);
    chk(trig_reason == R_DT_DONE, "reason 6");
    force_dt = 1'b0; io_drv[4] = 1'b0;
    wait_idle();
    chk(got.size() == 11 && got[$] == 1, $sformatf("trigger 1 under busy (%0d sent)", got.size()));

    // ---- 14: pattern arriving in the pending/pulse state
    for (int off = 0; off < 8 && !reason_seen[R_TPAT_PEND]; off++) begin
      lemo_in[0] = 1'b1;
      cyc(off);
      ecl_in[0] = 1'b1; n_in0++;
      cyc(2);
      lemo_in[0] = 1'b0; ecl_in[0] = 1'b0;
      wait_idle();
    end
    chk(reason_seen[R_TPAT_PEND], "reason 8 seen");

    // ---- 15: delay line shifts input 6 by 30 cycles
    ecl_in[6] = 1'b1;
    lat6 = 0;
    while (!lemo_out[0] && lat6 < 100) begin @(posedge clk); #1; lat6++; end
    cyc(1); ecl_in[6] = 1'b0;
    wait_idle();
    chk(lat6 == lat0 + 30, $sformatf("delay line adds 30 cycles (%0d vs %0d)", lat6, lat0));
    chk(got[$] == 6, "trigger 6");
    if (lat6 == lat0 + 30) n_delay_line++;

    // ---- 16: direct mode, unclocked
    for (int k = 0; k < 10; k++) begin
      lemo_in[1] = ~lemo_in[1];
      #1;
      if (lemo_out[1] == lemo_in[1]) n_direct++;
      cyc(1);
    end
    chk(n_direct == 10, "LEMO output 1 follows LEMO input 1 directly");

    // ---- 17: edge gate measured in clock cycles
    io_drv[5] = 1'b1; cyc(3); io_drv[5] = 1'b0;
    cyc(97);
    io_drv[6] = 1'b1; cyc(3); io_drv[6] = 1'b0;
    cyc(10);
    chk(scaler[0] == 100, $sformatf("edge gate open 100 cycles (%0d)", scaler[0]));
    if (scaler[0] == 100) n_edge_gate++;

    // ---- 18: general functions fed by input 0
    cyc(20);
    chk(scaler[2] == 32'(n_in0), $sformatf("gate delay pulses %0d of %0d", scaler[2], n_in0));
    chk(scaler[4] == 32'(n_in0), "8x8 logic matrix output 0");
    chk(scaler[3] == 32'((n_in0 + 3) / 4), $sformatf("downscaler %0d of %0d", scaler[3], n_in0));
    chk(scaler[1] == 32'(n_ms), "master starts counted by a scaler");
    if (scaler[2] == 32'(n_in0)) n_gate_delay++;
    if (scaler[3] == 32'((n_in0 + 3) / 4)) n_downscale++;
    if (scaler[4] == 32'(n_in0)) n_glmu++;
    n0 = 1;                                  // the first unmapped event
    foreach (got[k]) if (!(got[k] inside {7, 12, 13})) n0++;
    chk(n_ms == n0, $sformatf("one master start per detector event (%0d, %0d)", n_ms, n0));
    chk(trig_count == 32'(got.size()), "event counter equals triggers sent");

    // ---- 19: control pulses: software dead time and busy
    ctrl.set_int_dt = 1'b1; cyc(1); ctrl.set_int_dt = 1'b0;
    cyc(3);
    a = sca_after_deadtime[0];
    pulse_ecl(0); cyc(20);
    chk(sw_deadtime && trig_state == TS_WAIT_TRIVA && sca_after_deadtime[0] == a,
        "software dead time vetoes the fast path");
    if (sw_deadtime && sca_after_deadtime[0] == a) n_sw_dt++;
    ctrl.clear_int_dt = 1'b1; cyc(1); ctrl.clear_int_dt = 1'b0;
    wait_idle();
    ctrl.set_int_busy = 1'b1; cyc(1); ctrl.set_int_busy = 1'b0;
    cyc(3);
    chk(sw_busy && inhibit && !deadtime && trig_state == TS_TRIVA_DONE, "software busy");
    if (sw_busy && inhibit) n_sw_busy++;
    ctrl.clear_int_busy = 1'b1; cyc(1); ctrl.clear_int_busy = 1'b0;
    wait_idle();

    // ---- 20: pulses injected into a source and a destination
    b = scaler[1];
    setup.pulse_mux_src_mask[SRC_MASTER_START] = 1'b1;
    ctrl.mux_sources = 1'b1; cyc(1); ctrl.mux_sources = 1'b0;
    cyc(5);
    chk(scaler[1] == b + 1, "source pulse reaches the scaler of the master start");
    if (scaler[1] == b + 1) n_src_pulse++;
    setup.pulse_mux_dest_mask[DST_TRIG_PULSE + 14] = 1'b1;
    ctrl.mux_dests = 1'b1; cyc(1); ctrl.mux_dests = 1'b0;
    wait_idle();
    chk(got[$] == 14, "destination pulse makes pulse trigger 14");
    if (got[$] == 14) n_dest_pulse++;

    // ---- 21: edge gate and pattern latch from control pulses, fast-path scaler latch
    ctrl.edge_gate_start[1] = 1'b1; cyc(1); ctrl.edge_gate_start[1] = 1'b0;
    cyc(2);
    if (edge_gate_out[1]) n_ctrl_gate++;
    ctrl.edge_gate_stop[1] = 1'b1; cyc(1); ctrl.edge_gate_stop[1] = 1'b0;
    cyc(2);
    chk(n_ctrl_gate == 1 && !edge_gate_out[1], "edge gate opened and closed by control pulses");
    ctrl.ptn_latch[1] = 1'b1; cyc(1); ctrl.ptn_latch[1] = 1'b0;
    cyc(1);
    chk(pattern_latch[1][SRC_WIRED_ONE], "pattern latch from a control pulse");
    if (pattern_latch[1][SRC_WIRED_ONE]) n_ptn_latch++;
    ctrl.trig_scaler_latch = 1'b1; cyc(1); ctrl.trig_scaler_latch = 1'b0;
    cyc(1);
    chk(sca_after_reduction_l == sca_after_reduction && sca_before_lmu_l[0] == sca_before_lmu[0],
        "fast-path scaler latch");
    if (sca_before_lmu_l[0] != 0 && sca_before_lmu_l[0] == sca_before_lmu[0]) n_trig_sca_latch++;

    // ---- every mechanism happened
    chk(n_sw_dt > 0, "mechanism: software dead time");
    chk(n_sw_busy > 0, "mechanism: software busy");
    chk(n_src_pulse > 0, "mechanism: source pulse");
    chk(n_dest_pulse > 0, "mechanism: destination pulse");
    chk(n_ctrl_gate > 0, "mechanism: edge gate control pulses");
    chk(n_ptn_latch > 0, "mechanism: pattern latch pulse");
    chk(n_trig_sca_latch > 0, "mechanism: fast-path scaler latch");
    chk(n_ms > 0 && n_ms_len_ok == n_ms, "master start length sum_out_stretch+2");
    chk(n_merge > 0, "mechanism: window merge");
    chk(n_anti > 0, "mechanism: anti-coincidence");
    chk(n_red > 0, "mechanism: reduction");
    chk(n_onoff > 0, "mechanism: ON/OFF");
    chk(n_veto > 0, "mechanism: dead-time veto");
    chk(n_aux > 0, "mechanism: auxiliary LMU input");
    chk(n_multi > 0, "mechanism: multi trigger");
    chk(n_pending > 0, "mechanism: pending trigger");
    chk(n_pulse > 0, "mechanism: pulse trigger");
    chk(n_busy > 0, "mechanism: busy");
    chk(n_direct > 0, "mechanism: direct output");
    chk(n_edge_gate > 0, "mechanism: edge gate");
    chk(n_gate_delay > 0, "mechanism: gate delay");
    chk(n_downscale > 0, "mechanism: downscaler");
    chk(n_glmu > 0, "mechanism: general logic matrix");
    chk(n_or > 0, "mechanism: masked OR");
    chk(n_coinc > 0, "mechanism: coincidence");
    chk(n_tracer > 0, "mechanism: tracer");
    chk(n_delay_line > 0, "mechanism: delay line");
    chk(n_timer_latch > 0, "mechanism: timer latch");
    for (int r = 1; r <= 8; r++) chk(reason_seen[r], $sformatf("reason %0d", r));
    $display("triggers sent: %p", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
