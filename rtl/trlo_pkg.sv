// trlo_pkg: types and constants shared by the trigger-logic modules.
//
// The trigger logic runs on a single 100 MHz clock, so every length below
// (delays, stretch lengths, window and busy lengths, pulser periods) counts
// 10 ns clock cycles.  This package holds:
//   * the sizes of the trigger system: 16 trigger inputs, 4 auxiliary LMU
//     inputs, 16 LMU outputs, 16 read-out trigger numbers (1..15, 0 = none);
//   * the mode encodings (delay mode, stretcher restart mode, scaler mode,
//     output direct mode);
//   * the trigger state machine state and reason codes, using the numbers the
//     front-panel display shows;
//   * the source and destination index map of the signal multiplexer;
//   * the setup-register record (trlo_setup_t) and the one-shot control
//     pulses (trlo_pulse_t) that a register interface would drive; the
//     pulse names follow the list of control pulses of the design.
// The counts, state numbers, reason numbers and index order follow the
// design description; field widths inside the records are this design's
// choice, since the registers there are simply 32-bit words.
package trlo_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_TRIG    = 16;  // trigger (ECL) inputs of the fast path
  localparam int unsigned N_AUX     = 4;   // auxiliary LMU inputs (spill on, pile-up, POS, tracer)
  localparam int unsigned N_LMU_OUT = 16;  // LMU outputs = trigger pattern bits
  localparam int unsigned N_RO      = 16;  // read-out trigger numbers 0..15 (0 = none)
  localparam int unsigned DLY_W     = 8;   // delay register width (cycles)
  localparam int unsigned STR_W     = 8;   // stretch register width (cycles)
  localparam int unsigned LEN_W     = 16;  // window / busy length width (cycles)
  localparam int unsigned SCA_W     = 32;  // scaler width
  localparam int unsigned N_FRONT   = 26;  // front-panel outputs: 16 ECL, 8 ECL IO, 2 LEMO

  // ------------------------------------------------ multiplexer sources
  localparam int unsigned SRC_ECL_IN       = 0;   // 16
  localparam int unsigned SRC_ECL_IO_IN    = 16;  // 8
  localparam int unsigned SRC_LEMO_IN      = 24;  // 2
  localparam int unsigned SRC_WIRED_ZERO   = 26;
  localparam int unsigned SRC_WIRED_ONE    = 27;
  localparam int unsigned SRC_PRNG_LFSR    = 28;  // 2
  localparam int unsigned SRC_PULSER       = 30;  // 5
  localparam int unsigned SRC_LMU_OUT      = 35;  // 8
  localparam int unsigned SRC_GATE_DELAY   = 43;  // 8
  localparam int unsigned SRC_EDGE_GATE    = 51;  // 2
  localparam int unsigned SRC_DOWNSCALE    = 53;  // 2
  localparam int unsigned SRC_ALL_OR       = 55;  // 4
  localparam int unsigned SRC_COINCIDENCE  = 59;  // 2
  localparam int unsigned SRC_ACCEPT_TRIG  = 61;  // 16
  localparam int unsigned SRC_ENCODED_TRIG = 77;  // 4
  localparam int unsigned SRC_MASTER_START = 81;
  localparam int unsigned SRC_DEADTIME     = 82;
  localparam int unsigned SRC_ACCEPT_PULSE = 83;
  localparam int unsigned SRC_LMU_OUT_OR   = 84;
  localparam int unsigned N_SRC            = 85;
  localparam int unsigned SRC_W            = 7;

  // ------------------------------------------- multiplexer destinations
  localparam int unsigned DST_ECL_OUT         = 0;    // 16
  localparam int unsigned DST_ECL_IO_OUT      = 16;   // 8
  localparam int unsigned DST_LEMO_OUT        = 24;   // 2
  localparam int unsigned DST_FRONT_LED       = 26;   // 6
  localparam int unsigned DST_LMU_IN          = 32;   // 8
  localparam int unsigned DST_GATE_DELAY      = 40;   // 8
  localparam int unsigned DST_EDGE_GATE_START = 48;   // 2
  localparam int unsigned DST_EDGE_GATE_STOP  = 50;   // 2
  localparam int unsigned DST_DOWNSCALE       = 52;   // 2
  localparam int unsigned DST_SCALER          = 54;   // 8
  localparam int unsigned DST_SC_LATCH        = 62;   // 2
  localparam int unsigned DST_TIMER_LATCH     = 64;   // 4
  localparam int unsigned DST_PTN_LATCH       = 68;   // 2
  localparam int unsigned DST_TRACER          = 70;   // 2
  localparam int unsigned DST_TRIG_LMU_AUX    = 72;   // 4
  localparam int unsigned DST_TRIG_LMU_TEST   = 76;
  localparam int unsigned DST_TRIG_PEND       = 77;   // 16
  localparam int unsigned DST_TRIG_PULSE      = 93;   // 16
  localparam int unsigned DST_DEADTIME_IN     = 109;  // 2
  localparam int unsigned DST_BUSY_IN         = 111;  // 1
  localparam int unsigned N_DST               = 112;

  // ------------------------------------------------------------- modes
  typedef enum logic [1:0] {
    DELAY_ZERO       = 2'd0,   // no delay
    DELAY_ONE        = 2'd1,   // one clock cycle
    DELAY_LINE       = 2'd2,   // programmable delay line
    DELAY_TEST_INPUT = 2'd3    // channel replaced by the LMU test signal
  } delay_mode_e;

  typedef enum logic [1:0] {
    RESTART_LEADING_EDGE  = 2'd0,  // (re)start on every leading edge
    RESTART_TRAILING_EDGE = 2'd1,  // (re)start on every trailing edge
    RESTART_LEAD_IF_INACT = 2'd2,  // start on a leading edge only when idle
    RESTART_WHEN_PRESENT  = 2'd3   // (re)start in every cycle the input is high
  } restart_mode_e;

  typedef enum logic [1:0] {
    SCALER_LEADING_EDGE  = 2'd0,   // count leading edges
    SCALER_TRAILING_EDGE = 2'd1,   // count trailing edges
    SCALER_DURATION_CLK  = 2'd2,   // count clock cycles the input is high
    SCALER_DURATION_TICK = 2'd3    // count timer ticks the input is high
  } scaler_mode_e;

  typedef enum logic {
    LATCH_LEADING_EDGE  = 1'b0,
    LATCH_TRAILING_EDGE = 1'b1
  } latch_mode_e;

  typedef enum logic [1:0] {
    DIRECT_LOGIC           = 2'd0,  // output = multiplexer destination
    DIRECT_DIRECT          = 2'd1,  // output = raw front-panel input, unclocked
    DIRECT_LOGIC_OR_DIRECT = 2'd2,
    DIRECT_LOGIC_AND_DIRECT= 2'd3
  } direct_mode_e;

  // ------------------------------------- trigger state machine (display codes)
  typedef enum logic [3:0] {
    TS_IDLE               = 4'h1,
    TS_START_WINDOW       = 4'h2,
    TS_WINDOW             = 4'h3,
    TS_END_WINDOW         = 4'h4,
    TS_PULSE_SELECTION    = 4'h5,
    TS_TRIGGER_SELECTION  = 4'h7,
    TS_PRIORITY_ENCODER   = 4'h8,
    TS_START_SEND_TRIGGER = 4'h9,
    TS_SEND_TRIGGER       = 4'hA,
    TS_BUSY_START         = 4'hB,
    TS_BUSY               = 4'hC,
    TS_WAIT_TRIVA         = 4'hD,
    TS_TRIVA_DONE         = 4'hE,
    TS_PEND_PULSE_TRIG    = 4'hF
  } trig_state_e;

  typedef enum logic [3:0] {
    R_NONE              = 4'd0,
    R_TPAT              = 4'd1,  // IDLE -> START WINDOW
    R_PENDING           = 4'd2,  // IDLE -> PENDING/PULSE
    R_PULSE             = 4'd3,  // IDLE -> PENDING/PULSE
    R_DT_IDLE           = 4'd4,  // IDLE -> WAIT TRIVA
    R_BUSY              = 4'd5,  // IDLE -> TRIVA DONE
    R_DT_DONE           = 4'd6,  // TRIVA DONE -> WAIT TRIVA
    R_PENDING_DONE      = 4'd7,  // TRIVA DONE -> PULSE SELECTION
    R_TPAT_PEND         = 4'd8   // PENDING/PULSE -> START WINDOW
  } trig_reason_e;

  // ------------------------------------------------------ setup registers
  typedef struct packed {
    // signal multiplexer and front-panel outputs
    logic [N_DST-1:0][SRC_W-1:0]   mux;
    logic [N_FRONT-1:0][4:0]       direct_mux;       // raw input (0..25) per output
    direct_mode_e [N_FRONT-1:0]    direct_mode;
    logic [N_FRONT-1:0]            sum_out_mask;     // outputs that also carry the master start
    logic [N_SRC-1:0]              pulse_mux_src_mask;   // sources hit by the MUX_SOURCES pulse
    logic [N_DST-1:0]              pulse_mux_dest_mask;  // destinations hit by the MUX_DESTS pulse
    // general-purpose logic functions
    scaler_mode_e [7:0]            scaler_mode;
    latch_mode_e  [3:0]            latch_mode;       // timer latches
    logic [3:0][N_SRC-1:0]         all_or_mask;
    logic [4:0][31:0]              period;           // pulsers
    logic [7:0][15:0]              lmu;              // general 8x8 logic matrix
    logic [7:0]                    lmu_not;
    logic [1:0][N_SRC-1:0]         coinc_mask;
    logic [1:0][SRC_W-1:0]         coinc_level;
    logic [1:0][3:0]               downscale;
    logic [7:0][DLY_W-1:0]         delay;
    logic [7:0][STR_W-1:0]         stretch;
    restart_mode_e [7:0]           restart_mode;
    // fast path
    logic [N_TRIG-1:0][DLY_W-1:0]  trig_delay;
    delay_mode_e [N_TRIG-1:0]      trig_delay_mode;
    logic [N_TRIG-1:0][STR_W-1:0]  trig_stretch;
    restart_mode_e [N_TRIG-1:0]    trig_restart_mode;
    logic [N_LMU_OUT-1:0][2*N_TRIG-1:0] trig_lmu;    // per output: {anti,coinc} pair per input
    logic [N_LMU_OUT-1:0][2*N_AUX-1:0]  trig_lmu_aux;
    logic [N_LMU_OUT-1:0]          trig_lmu_not;
    logic [N_LMU_OUT-1:0][3:0]     trig_red;         // reduction 2^n
    logic [N_LMU_OUT-1:0]          tpat_enable;      // channel ON/OFF
    logic [N_LMU_OUT-1:0][3:0]     tpat_trig;        // read-out trigger of each tpat bit
    logic [LEN_W-1:0]              accept_window_len;
    logic [LEN_W-1:0]              fast_busy_len;
    logic [7:0]                    max_multi_trig;
    logic [3:0]                    multi_trigger;
    logic [STR_W-1:0]              sum_out_stretch;
    logic [31:0]                   timer_period;     // tick period for DURATION_TICK scalers
    // tracer
    logic [7:0]                    tracer_len;       // cycles captured per request
  } trlo_setup_t;

  // One-cycle control pulses, as written by the register interface.
  typedef struct packed {
    logic              scaler_reset;      // general scalers
    logic              scaler_latch;
    logic              trig_scaler_reset; // fast-path scalers
    logic              trig_scaler_latch;
    logic              timer_reset;
    logic              timer_latch;
    logic [1:0]        ptn_latch;         // pattern latches
    logic [1:0]        edge_gate_start;
    logic [1:0]        edge_gate_stop;
    logic              mux_sources;       // one-cycle pulse on the masked sources
    logic              mux_dests;         // one-cycle pulse on the masked destinations
    logic              set_int_dt;        // software dead time
    logic              clear_int_dt;
    logic              set_int_busy;      // software busy
    logic              clear_int_busy;
    logic [N_RO-1:0]   trig_pending;      // set pending triggers
    logic [N_RO-1:0]   trig_clear_pending;
    logic              tracer_start;
    logic              tracer_stop;
    logic              tracer_clear;
  } trlo_pulse_t;

endpackage
