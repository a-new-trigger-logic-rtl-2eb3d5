// tracer: soft scope for aligning the trigger inputs.
//
// It records when each shaped trigger input changes, so the relative timing
// of the detector signals can be read out and the input delays set.  The
// traced pattern is written every cycle into a small history ring of PRE
// entries; the record is taken from the ring's oldest entry, i.e. the
// pattern PRE cycles ago.  After a start request the tracer waits for any
// live input to rise, then for 'len' cycles (at most 255) writes every
// change of the delayed pattern into a compact buffer, so a block begins
// PRE-2 cycles before the rise that triggered it.
// One capture is a block of 32-bit words:
//   {2'b00, time[29:0]}             time of the block's first pattern sample
//   {2'b01, dt[11:0], pattern[17:0]} the delayed pattern when the block
//                                    starts (dt = 0), then one word per
//                                    change, dt = cycles since that word
//   {2'b11, xor[29:0]}              checksum: XOR of the block's words
// After a block the tracer returns to START and captures the next one as
// long as a whole block (len+4 words) still fits.  'stop' returns to IDLE
// keeping the data; 'clear' returns to IDLE and resets the addresses.
// rd_addr/rd_data is a synchronous read port for the register interface
// (one cycle).
//
// The state sequence IDLE, START, INITIATE FILL, ACTIVE, COINCIDENCE,
// COMPACTING FIRST, COMPACTING, COMPACTED, the history ring, the control
// counter, the timestamp-counter-pattern-checksum content, the length of up
// to 255 cycles and the start/stop/clear requests follow the design
// description.  The word formats, the ring and buffer depths and the use of
// XOR as checksum are this design's choices.  PRE = 0 removes the ring.
module tracer #(
  parameter int unsigned PW    = 18,     // at most 18
  parameter int unsigned PRE   = 16,     // history cycles kept ahead of the trigger
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] pattern,
  input  logic          start,
  input  logic          stop,
  input  logic          clear,
  input  logic [7:0]    len,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data,
  output logic [AW:0]   words,
  output logic [2:0]    tstate
);
  typedef enum logic [2:0] {
    T_IDLE, T_START, T_INIT_FILL, T_ACTIVE,
    T_COINCIDENCE, T_COMPACT_FIRST, T_COMPACTING, T_COMPACTED
  } tracer_state_e;

  tracer_state_e st;
  logic [31:0]   mem [DEPTH];
  logic [PW-1:0] pat_q;
  logic [29:0]   now;
  logic [11:0]   ctrl_cnt;
  logic [29:0]   csum;
  logic          we;
  logic [31:0]   wdata;
  logic [AW:0]   need;
  logic [17:0]   pat18;
  logic [PW-1:0] live_q;   // live pattern one cycle ago, for the trigger
  logic [PW-1:0] pat_d;    // pattern PRE cycles ago, for the record

  assign tstate = st;
  assign pat18  = 18'(pat_d);

  // history ring: written every cycle, the oldest entry is read out
  if (PRE == 0) begin : g_no_hist
    assign pat_d = pattern;
  end else begin : g_hist
    localparam int unsigned HW = (PRE > 1) ? $clog2(PRE) : 1;
    logic [PW-1:0] ring [PRE];
    logic [HW-1:0] wp;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp <= '0;
        for (int k = 0; k < PRE; k++) ring[k] <= '0;
      end else begin
        ring[wp] <= pattern;
        wp       <= (wp == HW'(PRE - 1)) ? '0 : wp + 1'b1;
      end
    end
    assign pat_d = ring[wp];
  end
  assign need   = (AW+1)'(len) + (AW+1)'(4);

  // write-word selection
  always_comb begin
    we    = 1'b0;
    wdata = '0;
    unique case (st)
      T_COINCIDENCE:   begin we = 1'b1; wdata = {2'b00, now - 30'(PRE)}; end
      T_COMPACT_FIRST: begin we = 1'b1; wdata = {2'b01, 12'd0, pat18}; end
      T_COMPACTING:    begin we = (pat_d != pat_q); wdata = {2'b01, ctrl_cnt, pat18}; end
      T_COMPACTED:     begin we = 1'b1; wdata = {2'b11, csum}; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (we && !words[AW]) mem[words[AW-1:0]] <= wdata;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= T_IDLE;
      pat_q    <= '0;
      live_q   <= '0;
      now      <= '0;
      ctrl_cnt <= '0;
      csum     <= '0;
      words    <= '0;
    end else begin
      now   <= now + 1'b1;
      pat_q  <= pat_d;
      live_q <= pattern;
      if (we) begin
        words <= words + 1'b1;
        if (st != T_COMPACTED) csum <= csum ^ wdata[29:0];
      end
      if (clear) begin
        st    <= T_IDLE;
        words <= '0;
      end else if (stop) begin
        st <= T_IDLE;
      end else begin
        unique case (st)
          T_IDLE:      if (start) st <= T_START;
          T_START: begin
            ctrl_cnt <= '0;
            csum     <= '0;
            if ((AW+1)'(DEPTH) - words < need) st <= T_IDLE;
            else                               st <= T_INIT_FILL;
          end
          T_INIT_FILL: if (ctrl_cnt == '0) st <= T_ACTIVE;
          T_ACTIVE:    if ((pattern & ~live_q) != '0) st <= T_COINCIDENCE;
          T_COINCIDENCE: st <= T_COMPACT_FIRST;
          T_COMPACT_FIRST: begin
            ctrl_cnt <= 12'd1;
            st       <= T_COMPACTING;
          end
          T_COMPACTING: begin
            if (ctrl_cnt >= 12'(len)) st <= T_COMPACTED;
            else                      ctrl_cnt <= ctrl_cnt + 1'b1;
          end
          T_COMPACTED: st <= T_START;
          default:     st <= T_IDLE;
        endcase
      end
    end
  end
endmodule
