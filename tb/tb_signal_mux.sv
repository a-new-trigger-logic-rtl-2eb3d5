// tb_signal_mux: random sources and random select registers; every
// destination must show its selected source two clocks later.  Pulses
// injected into a source and into a destination must appear two and one
// clocks later.  The front outputs are checked in all four direct modes
// (with the raw input path unclocked) and with the master start OR-ed in by
// sum_out_mask.
module tb_signal_mux;
  import trlo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_SRC-1:0] src = '0;
  logic [N_DST-1:0][SRC_W-1:0] sel;
  logic [N_SRC-1:0] src_pulse = '0;
  logic [N_DST-1:0] dest_pulse = '0;
  logic [N_FRONT-1:0] raw_in = '0;
  logic [N_FRONT-1:0][4:0] direct_mux;
  direct_mode_e [N_FRONT-1:0] direct_mode;
  logic [N_FRONT-1:0] sum_out_mask = '0;
  logic master_start = 1'b0;
  logic [N_DST-1:0] dest;
  logic [N_FRONT-1:0] front_out;
  logic [N_SRC-1:0] hist [0:2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  signal_mux dut (.clk, .rst_n, .src, .sel, .src_pulse, .dest_pulse, .raw_in, .direct_mux, .direct_mode,
                  .sum_out_mask, .master_start, .dest, .front_out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < N_DST; d++) sel[d] = SRC_W'($urandom_range(0, N_SRC - 1));
    for (int o = 0; o < N_FRONT; o++) begin
      direct_mux[o]  = 5'($urandom_range(0, N_FRONT - 1));
      direct_mode[o] = DIRECT_LOGIC;
    end
    hist[0] = '0; hist[1] = '0; hist[2] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      #1;
      src = {$urandom, $urandom, $urandom};
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = src;
      #1;
      if (n >= 2) begin
        logic [N_DST-1:0] expv;
        for (int d = 0; d < N_DST; d++) expv[d] = hist[1][sel[d]];
        checks++;
        if (dest !== expv) begin failures++; $display("cycle %0d: dest mismatch", n); end
      end
      if (n % 50 == 49)
        for (int d = 0; d < N_DST; d++) sel[d] = SRC_W'($urandom_range(0, N_SRC - 1));
    end
    // pulse injection: a source pulse appears two cycles later at every
    // destination selecting it, a destination pulse one cycle later
    #1 src = '0;
    for (int d = 0; d < N_DST; d++) sel[d] = SRC_W'(SRC_WIRED_ZERO);
    sel[7] = SRC_W'(SRC_PULSER + 2);
    sel[90] = SRC_W'(SRC_PULSER + 2);
    repeat (3) @(posedge clk);
    #1 src_pulse = '0; src_pulse[SRC_PULSER + 2] = 1'b1;
    dest_pulse = '0; dest_pulse[40] = 1'b1;
    @(posedge clk); #1 src_pulse = '0; dest_pulse = '0;
    checks++;
    if (dest != (N_DST'(1) << 40)) begin failures++; $display("destination pulse not seen after one cycle"); end
    @(posedge clk); #1;
    checks++;
    if (dest != ((N_DST'(1) << 7) | (N_DST'(1) << 90))) begin failures++; $display("source pulse not seen after two cycles"); end
    @(posedge clk); #1;
    checks++;
    if (dest != '0) begin failures++; $display("pulses last one cycle"); end

    // direct modes, combinational from raw_in
    for (int n = 0; n < 200; n++) begin
      for (int o = 0; o < N_FRONT; o++) direct_mode[o] = direct_mode_e'($urandom_range(0, 3));
      raw_in = N_FRONT'($urandom);
      sum_out_mask = N_FRONT'($urandom) & N_FRONT'($urandom);
      master_start = $urandom_range(0, 1);
      #1;
      for (int o = 0; o < N_FRONT; o++) begin
        logic l, dr, e;
        l  = dest[o];
        dr = raw_in[direct_mux[o]];
        case (direct_mode[o])
          DIRECT_LOGIC:           e = l;
          DIRECT_DIRECT:          e = dr;
          DIRECT_LOGIC_OR_DIRECT: e = l | dr;
          default:                e = l & dr;
        endcase
        e = e | (sum_out_mask[o] & master_start);
        checks++;
        if (front_out[o] !== e) begin failures++; $display("output %0d mode %0d wrong", o, direct_mode[o]); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
