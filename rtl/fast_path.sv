// fast_path: from the trigger inputs to the master start and the trigger
// pattern.
//
// Per trigger input (already through the anti-metastable stage) the signal
// passes a delay (trig_delay) and a stretcher (pulse_stretcher) so that the
// signals of different detectors overlap in time.  The 16 shaped inputs and
// the 4 auxiliary inputs enter the logic matrix (lmu), whose 16 outputs are
// the trigger pattern.  A leading-edge detector makes each LMU output a
// one-cycle strobe; the strobe is blocked while the state machine asserts
// 'inhibit' (dead-time veto), masked by the channel ON/OFF register
// (tpat_enable) and reduced by 2^n (downscaler).  The result, the trigger
// pattern after reduction, goes to the trigger state machine, and its OR,
// gated by the state machine's 'arm', starts the master-start stretcher
// (length sum_out_stretch + 2 cycles).  Four banks of 16 scalers count
// leading edges before the LMU, after the LMU (before the dead-time veto),
// after the veto and after the reduction; a latch pulse copies all 64
// of them at once into the *_l outputs for a consistent read-out.
//
// This chain, its order, the registers and the scalers follow the design
// description.  Its timing: one clock from the shaped inputs to the LMU
// output and one more to the master start, i.e. a shaped input high at
// cycle k gives tpat_red at k+1 and master_start from k+2.  With delay mode
// ZERO the stretcher adds one cycle after the synchronised input.  Where the
// veto sits relative to ON/OFF and whether the master start of a pattern is
// taken before reduction are not spelt out; here ON/OFF and reduction both
// act before the OR, so a reduced-away pattern makes no master start.
module fast_path
  import trlo_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  trlo_setup_t                  setup,
  input  logic [N_TRIG-1:0]            trig_in,      // synchronised trigger inputs
  input  logic [N_AUX-1:0]             aux_in,       // auxiliary LMU inputs
  input  logic                         lmu_test,     // test signal for DELAY_TEST_INPUT
  input  logic                         inhibit,      // dead-time veto from the state machine
  input  logic                         arm,          // state machine ready for a trigger
  input  logic                         scaler_reset,
  input  logic                         scaler_latch,
  output logic [N_TRIG-1:0]            trig_shaped,  // after delay and stretcher
  output logic [N_LMU_OUT-1:0]         lmu_out,
  output logic                         lmu_or,
  output logic [N_LMU_OUT-1:0]         tpat_red,     // trigger pattern after reduction
  output logic                         master_start,
  output logic [N_TRIG-1:0][SCA_W-1:0]    sca_before_lmu,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_before_deadtime,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_after_deadtime,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_after_reduction,
  output logic [N_TRIG-1:0][SCA_W-1:0]    sca_before_lmu_l,      // latched copies
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_before_deadtime_l,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_after_deadtime_l,
  output logic [N_LMU_OUT-1:0][SCA_W-1:0] sca_after_reduction_l
);
  logic [N_TRIG-1:0]    delayed;
  logic [N_LMU_OUT-1:0] lmu_q, lmu_le, after_dt, after_onoff;
  logic [N_LMU_OUT-1:0][2*(N_TRIG+N_AUX)-1:0] lmu_cfg;
  logic                 ms_fire;

  // ---------------------------------------------- delay and stretch per input
  for (genvar i = 0; i < N_TRIG; i++) begin : g_in
    trig_delay u_delay (
      .clk, .rst_n,
      .din     (trig_in[i]),
      .test_in (lmu_test),
      .mode    (setup.trig_delay_mode[i]),
      .dly     (setup.trig_delay[i]),
      .dout    (delayed[i])
    );
    pulse_stretcher u_stretch (
      .clk, .rst_n,
      .din  (delayed[i]),
      .len  (setup.trig_stretch[i]),
      .mode (setup.trig_restart_mode[i]),
      .dout (trig_shaped[i])
    );
  end

  // ------------------------------------------------------------ logic matrix
  for (genvar j = 0; j < N_LMU_OUT; j++) begin : g_cfg
    assign lmu_cfg[j] = {setup.trig_lmu_aux[j], setup.trig_lmu[j]};
  end

  lmu #(.N_IN(N_TRIG + N_AUX), .N_OUT(N_LMU_OUT)) u_lmu (
    .clk, .rst_n,
    .in      ({aux_in, trig_shaped}),
    .cfg     (lmu_cfg),
    .lmu_not (setup.trig_lmu_not),
    .out     (lmu_out)
  );

  assign lmu_or = |lmu_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lmu_q <= '0;
    else        lmu_q <= lmu_out;
  end

  // ---------------------------- leading edge, dead-time veto, ON/OFF, reduction
  assign lmu_le      = lmu_out & ~lmu_q;
  assign after_dt    = inhibit ? '0 : lmu_le;
  assign after_onoff = after_dt & setup.tpat_enable;

  for (genvar j = 0; j < N_LMU_OUT; j++) begin : g_red
    downscaler u_red (
      .clk, .rst_n,
      .pulse_in  (after_onoff[j]),
      .factor    (setup.trig_red[j]),
      .pulse_out (tpat_red[j])
    );
  end

  // ------------------------------------------------------------ master start
  assign ms_fire = arm & (|tpat_red);

  pulse_stretcher u_sum_out (
    .clk, .rst_n,
    .din  (ms_fire),
    .len  (setup.sum_out_stretch),
    .mode (RESTART_WHEN_PRESENT),
    .dout (master_start)
  );

  // ----------------------------------------------------------------- scalers
  for (genvar j = 0; j < N_LMU_OUT; j++) begin : g_sca
    scaler u_sca_in (
      .clk, .rst_n, .din(trig_shaped[j]), .tick(1'b0), .mode(SCALER_LEADING_EDGE),
      .reset(scaler_reset), .latch(scaler_latch), .count(sca_before_lmu[j]), .latched(sca_before_lmu_l[j]));
    scaler u_sca_lmu (
      .clk, .rst_n, .din(lmu_out[j]), .tick(1'b0), .mode(SCALER_LEADING_EDGE),
      .reset(scaler_reset), .latch(scaler_latch), .count(sca_before_deadtime[j]), .latched(sca_before_deadtime_l[j]));
    scaler u_sca_dt (
      .clk, .rst_n, .din(after_dt[j]), .tick(1'b0), .mode(SCALER_LEADING_EDGE),
      .reset(scaler_reset), .latch(scaler_latch), .count(sca_after_deadtime[j]), .latched(sca_after_deadtime_l[j]));
    scaler u_sca_red (
      .clk, .rst_n, .din(tpat_red[j]), .tick(1'b0), .mode(SCALER_LEADING_EDGE),
      .reset(scaler_reset), .latch(scaler_latch), .count(sca_after_reduction[j]), .latched(sca_after_reduction_l[j]));
  end
endmodule
