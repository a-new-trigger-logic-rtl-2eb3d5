// trlo_top: the trigger logic of the VME universal logic module.
//
// The whole trigger decision of the experiment lives in this one clocked
// design (100 MHz, 10 ns steps).  The 26 front-panel inputs (16 ECL trigger
// inputs, 8 ECL in/out lines used as inputs, 2 LEMO) pass the
// anti_metastable stage.  The 16 ECL trigger inputs go straight into the
// fast path (delay, stretch, logic matrix, dead-time veto, ON/OFF,
// reduction, master start).  The trigger state machine turns the pattern
// after reduction, pending and pulse triggers, busy and the read-out dead
// time into an accepted read-out trigger (one-hot and 4-bit encoded),
// drives the fast path's inhibit and arm, and produces the total dead time.
// Around this core are the general logic functions (5 pulsers, an 8x8 logic
// matrix, 8 gate delays, 2 edge-to-gate, 2 downscalers, 4 masked ORs, 2
// coincidences, 8 scalers, timer and pattern latches, the tracer) and the
// signal multiplexer that routes any source to any destination, including
// the front-panel outputs, the LEDs, the LMU auxiliary inputs, the pending
// and pulse triggers and the dead-time and busy inputs.
//
// Interface: clk, rst_n; raw front-panel inputs and outputs; 'setup' holds
// every setup register and 'ctrl' the one-cycle control pulses, both as a
// register interface would drive them (the pulses reset and latch the
// scalers and timer, set and clear pending triggers, the software dead
// time and busy, fire the pattern latches and edge gates, inject a pulse
// into masked multiplexer sources or destinations, and drive the tracer);
// status, scalers, latches and the tracer read port are brought out for
// that interface to read.  The display driver, the clock generation and the
// VME register interface are not part of this design; the two
// pseudo-random sources are not built and read as 0.
//
// The block list, the register names, the state sequence, the two
// fast-path clocks from the shaped input to the master start and the two
// multiplexer clocks follow the original trigger logic.  The index
// order of sources and destinations, the struct layout of 'setup' and
// 'ctrl', and the use of separate status ports instead of a packed status
// word are this design's own choices.
//
// Timing: an ECL trigger input (delay mode ZERO) reaches the master start 5
// cycles after the first clock edge that samples it (2 anti-metastable, 1
// stretcher, 1 LMU, 1 master-start stretcher); the master start reaches the
// outputs selected in sum_out_mask without further clocking.  Signals
// routed by the multiplexer take 2 more cycles.
module trlo_top
  import trlo_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  trlo_setup_t                    setup,
  input  trlo_pulse_t                    ctrl,
  // front panel
  input  logic [15:0]                    ecl_in,
  input  logic [7:0]                     ecl_io_in,
  input  logic [1:0]                     lemo_in,
  output logic [15:0]                    ecl_out,
  output logic [7:0]                     ecl_io_out,
  output logic [1:0]                     lemo_out,
  output logic [5:0]                     led,
  // trigger status
  output logic                           master_start,
  output trig_state_e                    trig_state,
  output trig_reason_e                   trig_reason,
  output logic                           deadtime,
  output logic                           inhibit,
  output logic                           arm,
  output logic                           int_deadtime,
  output logic                           sw_deadtime,
  output logic                           sw_busy,
  output logic [N_LMU_OUT-1:0]           lmu_out,
  output logic [N_LMU_OUT-1:0]           trig_tpat,
  output logic [N_RO-1:0]                accepted,
  output logic [3:0]                     encoded,
  output logic [31:0]                    trig_count,
  output logic [N_RO-1:0]                pending,
  // fast-path scalers
  output logic [N_TRIG-1:0][SCA_W-1:0]    sca_before_lmu,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_before_deadtime,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_after_deadtime,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_after_reduction,
  output logic [N_TRIG-1:0][SCA_W-1:0]    sca_before_lmu_l,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_before_deadtime_l,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_after_deadtime_l,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_after_reduction_l,
  // general scalers and latches
  output logic [7:0][SCA_W-1:0]          scaler,
  output logic [7:0][SCA_W-1:0]          scaler_latched,
  output logic [1:0]                     edge_gate_out,
  output logic [31:0]                    timer,
  output logic [3:0][31:0]               timer_latch,
  output logic [1:0][N_SRC-1:0]          pattern_latch,
  // tracer read port
  input  logic [9:0]                     tracer_rd_addr,
  output logic [31:0]                    tracer_rd_data,
  output logic [10:0]                    tracer_words,
  output logic [2:0]                     tracer_state
);
  logic [N_FRONT-1:0] raw, sync;
  logic [N_SRC-1:0]   src;
  logic [N_DST-1:0]   dest;
  logic [N_FRONT-1:0] front_out;

  logic [4:0]  pulser_out;
  logic [7:0]  glmu_out;
  logic [7:0]  gate_delayed, gate_out;
  logic [1:0]  downscale_out, ds_q;
  logic [3:0]  all_or;
  logic [1:0]  coinc;
  logic        tick;
  logic [N_TRIG-1:0] trig_shaped;
  logic [N_LMU_OUT-1:0] tpat_red;
  logic        lmu_or;
  logic [N_RO-1:0] accept_trig;
  logic [3:0]  encode_trig;
  logic        accept_pulse;

  // ------------------------------------------------------------ inputs
  assign raw = {lemo_in, ecl_io_in, ecl_in};

  anti_metastable #(.W(N_FRONT)) u_am (
    .clk, .rst_n, .async_in(raw), .sync_out(sync));

  // ------------------------------------------------------- source vector
  always_comb begin
    src = '0;
    src[SRC_ECL_IN       +: 16] = sync[15:0];
    src[SRC_ECL_IO_IN    +: 8]  = sync[23:16];
    src[SRC_LEMO_IN      +: 2]  = sync[25:24];
    src[SRC_WIRED_ZERO]         = 1'b0;
    src[SRC_WIRED_ONE]          = 1'b1;
    src[SRC_PULSER       +: 5]  = pulser_out;
    src[SRC_LMU_OUT      +: 8]  = glmu_out;
    src[SRC_GATE_DELAY   +: 8]  = gate_out;
    src[SRC_EDGE_GATE    +: 2]  = edge_gate_out;
    src[SRC_DOWNSCALE    +: 2]  = downscale_out;
    src[SRC_ALL_OR       +: 4]  = all_or;
    src[SRC_COINCIDENCE  +: 2]  = coinc;
    src[SRC_ACCEPT_TRIG  +: 16] = accept_trig;
    src[SRC_ENCODED_TRIG +: 4]  = encode_trig;
    src[SRC_MASTER_START]       = master_start;
    src[SRC_DEADTIME]           = deadtime;
    src[SRC_ACCEPT_PULSE]       = accept_pulse;
    src[SRC_LMU_OUT_OR]         = lmu_or;
  end

  signal_mux u_mux (
    .clk, .rst_n,
    .src, .sel(setup.mux),
    .src_pulse  (setup.pulse_mux_src_mask & {N_SRC{ctrl.mux_sources}}),
    .dest_pulse (setup.pulse_mux_dest_mask & {N_DST{ctrl.mux_dests}}),
    .raw_in(raw),
    .direct_mux(setup.direct_mux), .direct_mode(setup.direct_mode),
    .sum_out_mask(setup.sum_out_mask), .master_start,
    .dest, .front_out);

  assign ecl_out    = front_out[15:0];
  assign ecl_io_out = front_out[23:16];
  assign lemo_out   = front_out[25:24];
  assign led        = dest[DST_FRONT_LED +: 6];

  // ------------------------------------------------------------ fast path
  fast_path u_fp (
    .clk, .rst_n, .setup,
    .trig_in      (sync[15:0]),
    .aux_in       (dest[DST_TRIG_LMU_AUX +: N_AUX]),
    .lmu_test     (dest[DST_TRIG_LMU_TEST]),
    .inhibit, .arm,
    .scaler_reset (ctrl.trig_scaler_reset),
    .scaler_latch (ctrl.trig_scaler_latch),
    .trig_shaped, .lmu_out, .lmu_or, .tpat_red, .master_start,
    .sca_before_lmu, .sca_before_deadtime, .sca_after_deadtime, .sca_after_reduction,
    .sca_before_lmu_l, .sca_before_deadtime_l, .sca_after_deadtime_l, .sca_after_reduction_l);

  // ------------------------------------------------------- state machine
  trigger_sm u_sm (
    .clk, .rst_n, .setup,
    .tpat_red, .lmu_or,
    .pend_set    (dest[DST_TRIG_PEND +: N_RO] | ctrl.trig_pending),
    .pend_clear  (ctrl.trig_clear_pending),
    .pulse_trig  (dest[DST_TRIG_PULSE +: N_RO]),
    .busy_in     (dest[DST_BUSY_IN]),
    .dt_in       (|dest[DST_DEADTIME_IN +: 2]),
    .set_sw_dt   (ctrl.set_int_dt),
    .clear_sw_dt (ctrl.clear_int_dt),
    .set_sw_busy (ctrl.set_int_busy),
    .clear_sw_busy(ctrl.clear_int_busy),
    .state       (trig_state),
    .reason      (trig_reason),
    .arm, .inhibit, .deadtime, .int_dt(int_deadtime),
    .sw_dt(sw_deadtime), .sw_busy,
    .accept_trig, .encode_trig, .accept_pulse,
    .trig_tpat, .accepted, .encoded, .trig_count, .pending);

  // ------------------------------------------------- general logic functions
  for (genvar k = 0; k < 5; k++) begin : g_pulser
    pulser u_pulser (.clk, .rst_n, .period(setup.period[k]), .pulse(pulser_out[k]));
  end

  pulser u_tick (.clk, .rst_n, .period(setup.timer_period), .pulse(tick));

  lmu #(.N_IN(8), .N_OUT(8)) u_glmu (
    .clk, .rst_n, .in(dest[DST_LMU_IN +: 8]), .cfg(setup.lmu),
    .lmu_not(setup.lmu_not), .out(glmu_out));

  for (genvar k = 0; k < 8; k++) begin : g_gate_delay
    trig_delay u_dly (
      .clk, .rst_n, .din(dest[DST_GATE_DELAY + k]), .test_in(1'b0),
      .mode(DELAY_LINE), .dly(setup.delay[k]), .dout(gate_delayed[k]));
    pulse_stretcher u_str (
      .clk, .rst_n, .din(gate_delayed[k]), .len(setup.stretch[k]),
      .mode(setup.restart_mode[k]), .dout(gate_out[k]));
  end

  for (genvar k = 0; k < 2; k++) begin : g_edge_gate
    edge_gate u_eg (
      .clk, .rst_n,
      .start(dest[DST_EDGE_GATE_START + k] | ctrl.edge_gate_start[k]),
      .stop (dest[DST_EDGE_GATE_STOP + k]  | ctrl.edge_gate_stop[k]),
      .gate (edge_gate_out[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ds_q <= '0;
    else        ds_q <= dest[DST_DOWNSCALE +: 2];
  end

  for (genvar k = 0; k < 2; k++) begin : g_downscale
    downscaler u_ds (
      .clk, .rst_n, .pulse_in(dest[DST_DOWNSCALE + k] & ~ds_q[k]),
      .factor(setup.downscale[k]), .pulse_out(downscale_out[k]));
  end

  logic_functions u_logic (
    .clk, .rst_n, .src, .all_or_mask(setup.all_or_mask),
    .coinc_mask(setup.coinc_mask), .coinc_level(setup.coinc_level),
    .all_or, .coinc);

  for (genvar k = 0; k < 8; k++) begin : g_scaler
    scaler u_sca (
      .clk, .rst_n, .din(dest[DST_SCALER + k]), .tick,
      .mode(setup.scaler_mode[k]), .reset(ctrl.scaler_reset),
      .latch(ctrl.scaler_latch | (|dest[DST_SC_LATCH +: 2])),
      .count(scaler[k]), .latched(scaler_latched[k]));
  end

  event_latches u_latches (
    .clk, .rst_n,
    .timer_reset(ctrl.timer_reset), .timer_latch_pulse(ctrl.timer_latch),
    .tl_in(dest[DST_TIMER_LATCH +: 4]), .latch_mode(setup.latch_mode),
    .pl_in(dest[DST_PTN_LATCH +: 2] | ctrl.ptn_latch), .src,
    .timer, .timer_latch, .pattern_latch);

  tracer #(.PW(N_TRIG + 2), .DEPTH(1024)) u_tracer (
    .clk, .rst_n,
    .pattern({dest[DST_TRACER +: 2], trig_shaped}),
    .start(ctrl.tracer_start), .stop(ctrl.tracer_stop), .clear(ctrl.tracer_clear),
    .len(setup.tracer_len),
    .rd_addr(tracer_rd_addr), .rd_data(tracer_rd_data),
    .words(tracer_words), .tstate(tracer_state));
endmodule
