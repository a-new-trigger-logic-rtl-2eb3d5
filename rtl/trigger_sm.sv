// trigger_sm: the trigger state machine.
//
// It takes the trigger pattern after reduction from the fast path, pending
// triggers (requests that wait until they are served, used for the time
// calibrator and clock), pulse triggers (taken only if the machine is idle),
// a busy input and the dead time of the read-out trigger module (TRIVA).
// It decides which read-out trigger is sent, sets the internal dead time,
// drives the fast path's 'inhibit' and 'arm', and waits for the read-out
// to finish.
//
// States (display number in brackets):
//   IDLE(1)            arm is high.  A pattern from the fast path -> START
//                      WINDOW; else TRIVA dead time -> WAIT TRIVA; else busy
//                      -> TRIVA DONE; else a pending or a pulse trigger ->
//                      PENDING/PULSE TRIGGER.
//   START WINDOW(2),   patterns arriving while the window is open are OR-ed
//   WINDOW(3)          into the latched pattern; the window lasts
//                      accept_window_len extra cycles.
//   END WINDOW(4)      the internal dead time is set.
//   TRIGGER SEL.(7)    each latched pattern bit requests read-out trigger
//                      tpat_trig[bit]; pending triggers also request.
//   PULSE SEL.(5)      the same for the pending/pulse path.
//   PRIORITY ENC.(8)   priority_encoder picks the winner; a served pending
//                      trigger is cleared; the event counter advances.
//   START SEND(9),     accept_trig (one-hot) and encode_trig (4 bits) are
//   SEND(A)            driven, with accept_pulse high.
//   BUSY START(B),     the machine waits fast_busy_len cycles for the TRIVA
//   BUSY(C)            to raise its own dead time.
//   WAIT TRIVA(D)      waits for the TRIVA dead time to drop.
//   TRIVA DONE(E)      TRIVA dead time again -> WAIT TRIVA; a pending
//                      trigger -> PULSE SELECTION; else once the LMU OR and
//                      busy are low -> IDLE, re-arming the fast path and
//                      clearing all latched values.
//   PENDING/PULSE(F)   a fast-path pattern arriving now -> START WINDOW,
//                      else -> PULSE SELECTION.
// Control pulses can set and clear a software dead time and a software
// busy; they act exactly like the TRIVA dead time and the busy input.
// 'reason' records the transition that was taken (Table of reasons 1..8).
// 'arm' is cleared by the first pattern that makes a master start, so one
// trigger gives one master start.  'inhibit' = internal dead time | TRIVA
// dead time | busy.  'deadtime' = internal dead time | TRIVA dead time
// (each including its software counterpart).
// If a window ends with no read-out trigger mapped, the event is counted in
// a multi counter; when it reaches max_multi_trig (non-zero) the trigger
// multi_trigger is sent instead.
//
// The states, their order, the reasons and the register names follow the
// design description.  Display number 5 for PULSE SELECTION, the exact
// cycle in which each flag is set, the lowest-number-wins priority and the
// multi-trigger reading of max_multi_trig/multi_trigger and the way the
// software dead time and busy pulses act are this design's choices.
module trigger_sm
  import trlo_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  trlo_setup_t           setup,
  input  logic [N_LMU_OUT-1:0]  tpat_red,      // pattern after reduction (strobes)
  input  logic                  lmu_or,
  input  logic [N_RO-1:0]       pend_set,      // set pending trigger k (level, edge-detected)
  input  logic [N_RO-1:0]       pend_clear,    // clear pending trigger k (one-cycle pulse)
  input  logic [N_RO-1:0]       pulse_trig,    // pulse trigger k
  input  logic                  busy_in,
  input  logic                  dt_in,         // dead time from TRIVA
  input  logic                  set_sw_dt,     // software dead time set / clear
  input  logic                  clear_sw_dt,
  input  logic                  set_sw_busy,   // software busy set / clear
  input  logic                  clear_sw_busy,
  output trig_state_e           state,
  output trig_reason_e          reason,
  output logic                  arm,
  output logic                  inhibit,
  output logic                  deadtime,
  output logic                  int_dt,
  output logic                  sw_dt,
  output logic                  sw_busy,
  output logic [N_RO-1:0]       accept_trig,   // high during START SEND / SEND
  output logic [3:0]            encode_trig,   // high during START SEND / SEND
  output logic                  accept_pulse,
  output logic [N_LMU_OUT-1:0]  trig_tpat,     // pattern latched for this event
  output logic [N_RO-1:0]       accepted,      // winner, held until IDLE
  output logic [3:0]            encoded,       // winner number, held until IDLE
  output logic [31:0]           trig_count,
  output logic [N_RO-1:0]       pending
);
  logic [N_RO-1:0]  pend_set_q, pulse_q, request;
  logic [LEN_W-1:0] cnt;
  logic [7:0]       multi_cnt;
  logic             pe_valid;
  logic [N_RO-1:0]  pe_accept;
  logic [3:0]       pe_encoded;
  logic [N_RO-1:0]  tpat_req;
  logic [N_RO-1:0]  served;
  logic             dt, busy;

  // read-out triggers requested by the latched pattern
  always_comb begin
    tpat_req = '0;
    for (int b = 0; b < N_LMU_OUT; b++)
      if (trig_tpat[b]) tpat_req[setup.tpat_trig[b]] = 1'b1;
    tpat_req[0] = 1'b0;
  end

  priority_encoder #(.N(N_RO)) u_pe (
    .req     (request),
    .valid   (pe_valid),
    .accept  (pe_accept),
    .encoded (pe_encoded)
  );

  // external and software dead time / busy act alike
  assign dt           = dt_in | sw_dt;
  assign busy         = busy_in | sw_busy;
  assign served       = (state == TS_PRIORITY_ENCODER && pe_valid) ? pe_accept : '0;
  assign inhibit      = int_dt | dt | busy;
  assign deadtime     = int_dt | dt;
  assign accept_pulse = (state == TS_START_SEND_TRIGGER) || (state == TS_SEND_TRIGGER);
  assign accept_trig  = accept_pulse ? accepted : '0;
  assign encode_trig  = accept_pulse ? encoded  : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= TS_IDLE;
      reason     <= R_NONE;
      arm        <= 1'b1;
      int_dt     <= 1'b0;
      trig_tpat  <= '0;
      request    <= '0;
      accepted   <= '0;
      encoded    <= '0;
      trig_count <= '0;
      pending    <= '0;
      pend_set_q <= '0;
      pulse_q    <= '0;
      cnt        <= '0;
      multi_cnt  <= '0;
      sw_dt      <= 1'b0;
      sw_busy    <= 1'b0;
    end else begin
      // software dead time and busy, set and cleared by control pulses
      if (clear_sw_dt)        sw_dt   <= 1'b0;
      else if (set_sw_dt)     sw_dt   <= 1'b1;
      if (clear_sw_busy)      sw_busy <= 1'b0;
      else if (set_sw_busy)   sw_busy <= 1'b1;

      // pending requests: set on a rising edge, cleared by a clear pulse
      pend_set_q <= pend_set;
      pending    <= (pending | (pend_set & ~pend_set_q)) & ~pend_clear & ~served & ~N_RO'(1);

      // the first pattern seen while armed makes the master start
      if (arm && (tpat_red != '0)) arm <= 1'b0;

      unique case (state)
        TS_IDLE: begin
          if (tpat_red != '0) begin
            trig_tpat <= tpat_red;
            reason    <= R_TPAT;
            state     <= TS_START_WINDOW;
          end else if (dt) begin
            reason <= R_DT_IDLE;
            state  <= TS_WAIT_TRIVA;
          end else if (busy) begin
            reason <= R_BUSY;
            state  <= TS_TRIVA_DONE;
          end else if (pending != '0) begin
            reason <= R_PENDING;
            state  <= TS_PEND_PULSE_TRIG;
          end else if ((pulse_trig & ~N_RO'(1)) != '0) begin
            pulse_q <= pulse_trig & ~N_RO'(1);
            reason  <= R_PULSE;
            state   <= TS_PEND_PULSE_TRIG;
          end
        end
        TS_PEND_PULSE_TRIG: begin
          if (tpat_red != '0) begin
            trig_tpat <= tpat_red;
            reason    <= R_TPAT_PEND;
            state     <= TS_START_WINDOW;
          end else begin
            state <= TS_PULSE_SELECTION;
          end
        end
        TS_START_WINDOW: begin
          trig_tpat <= trig_tpat | tpat_red;
          cnt       <= setup.accept_window_len;
          state     <= TS_WINDOW;
        end
        TS_WINDOW: begin
          trig_tpat <= trig_tpat | tpat_red;
          if (cnt == '0) state <= TS_END_WINDOW;
          else           cnt   <= cnt - 1'b1;
        end
        TS_END_WINDOW: begin
          int_dt <= 1'b1;
          state  <= TS_TRIGGER_SELECTION;
        end
        TS_TRIGGER_SELECTION: begin
          request <= tpat_req | pending | pulse_q;
          state   <= TS_PRIORITY_ENCODER;
        end
        TS_PULSE_SELECTION: begin
          int_dt  <= 1'b1;
          request <= pending | pulse_q;
          state   <= TS_PRIORITY_ENCODER;
        end
        TS_PRIORITY_ENCODER: begin
          pulse_q <= '0;
          if (pe_valid) begin
            accepted   <= pe_accept;
            encoded    <= pe_encoded;
            trig_count <= trig_count + 1'b1;
            multi_cnt  <= '0;
            state      <= TS_START_SEND_TRIGGER;
          end else if (setup.max_multi_trig != '0 && setup.multi_trigger != '0 &&
                       multi_cnt + 1'b1 >= setup.max_multi_trig) begin
            accepted   <= N_RO'(1) << setup.multi_trigger;
            encoded    <= setup.multi_trigger;
            trig_count <= trig_count + 1'b1;
            multi_cnt  <= '0;
            state      <= TS_START_SEND_TRIGGER;
          end else begin
            multi_cnt <= multi_cnt + 1'b1;
            state     <= TS_TRIVA_DONE;
          end
        end
        TS_START_SEND_TRIGGER: state <= TS_SEND_TRIGGER;
        TS_SEND_TRIGGER:       state <= TS_BUSY_START;
        TS_BUSY_START: begin
          cnt   <= setup.fast_busy_len;
          state <= TS_BUSY;
        end
        TS_BUSY: begin
          if (cnt == '0) state <= TS_WAIT_TRIVA;
          else           cnt   <= cnt - 1'b1;
        end
        TS_WAIT_TRIVA: begin
          if (!dt) state <= TS_TRIVA_DONE;
        end
        TS_TRIVA_DONE: begin
          if (dt) begin
            reason <= R_DT_DONE;
            state  <= TS_WAIT_TRIVA;
          end else if (pending != '0) begin
            reason <= R_PENDING_DONE;
            state  <= TS_PULSE_SELECTION;
          end else if (!lmu_or && !busy) begin
            state     <= TS_IDLE;
            arm       <= 1'b1;
            int_dt    <= 1'b0;
            trig_tpat <= '0;
            request   <= '0;
            accepted  <= '0;
            encoded   <= '0;
          end
        end
        default: state <= TS_IDLE;
      endcase
    end
  end

  // a trigger is only ever sent while the internal dead time is set
  a_send_in_dt: assert property (@(posedge clk) disable iff (!rst_n)
    accept_pulse |-> int_dt);
  // exactly one read-out trigger is sent at a time
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    accept_pulse |-> $onehot(accept_trig));
endmodule
