// tb_tracer: starts a capture, makes two inputs change at known times and
// reads the block back: time-stamp word, first pattern (dt 0), one word per
// change with the right dt, checksum word equal to the XOR of the block.
// A second tracer with a 4-cycle history ring sees the same inputs and
// must show the same changes 4 cycles later, starting with the quiet
// pattern before the rise.  Then fills the small buffer until a start is
// refused, and clears it.
module tb_tracer;
  localparam int PW = 4, DEPTH = 32, AW = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [PW-1:0] pattern = '0;
  logic start = 1'b0, stop = 1'b0, clear = 1'b0;
  logic [7:0] len = 8'd12;
  logic [AW-1:0] rd_addr = '0;
  logic [31:0] rd_data;
  logic [AW:0] words;
  logic [2:0] tstate;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [31:0] rd_data_h;
  logic [AW:0] words_h;
  logic [2:0] tstate_h;

  tracer #(.PW(PW), .PRE(0), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .pattern, .start, .stop, .clear, .len, .rd_addr, .rd_data, .words, .tstate);

  tracer #(.PW(PW), .PRE(4), .DEPTH(DEPTH)) dut_h (
    .clk, .rst_n, .pattern, .start, .stop, .clear, .len, .rd_addr, .rd_data(rd_data_h),
    .words(words_h), .tstate(tstate_h));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic pulse(ref logic s);
    #1 s = 1'b1;
    @(posedge clk);
    #1 s = 1'b0;
  endtask

  task automatic read_word(int a, output logic [31:0] w, output logic [31:0] wh);
    #1 rd_addr = AW'(a);
    @(posedge clk); #1;
    w = rd_data;
    wh = rd_data_h;
  endtask

  // one capture: rise of bit 0 at cycle 0, bit 1 at +5, bit 0 falls at +9
  task automatic capture();
    #1 pattern = 4'b0001;
    repeat (5) @(posedge clk);
    #1 pattern = 4'b0011;
    repeat (4) @(posedge clk);
    #1 pattern = 4'b0010;
    repeat (20) @(posedge clk);
    #1 pattern = 4'b0000;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    logic [31:0] w [6], wh [6];
    logic [29:0] x;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    pulse(start);
    repeat (5) @(posedge clk);
    capture();
    chk(words == 5, $sformatf("one block of 5 words (got %0d)", words));
    chk(words_h == 6, $sformatf("history block of 6 words (got %0d)", words_h));
    for (int a = 0; a < 6; a++) read_word(a, w[a], wh[a]);
    chk(w[0][31:30] == 2'b00, "time-stamp word first");
    chk(w[1] == {2'b01, 12'd0, 14'd0, 4'b0001}, "first pattern, dt 0");
    chk(w[2] == {2'b01, 12'd3, 14'd0, 4'b0011}, "second input at dt 3");
    chk(w[3] == {2'b01, 12'd7, 14'd0, 4'b0010}, "first input falls at dt 7");
    x = w[0][29:0] ^ w[1][29:0] ^ w[2][29:0] ^ w[3][29:0];
    chk(w[4] == {2'b11, x}, "checksum word");
    chk(wh[0][31:30] == 2'b00 && wh[0][29:0] == w[0][29:0] - 30'd4, "history block starts 4 cycles earlier");
    chk(wh[1] == {2'b01, 12'd0, 14'd0, 4'b0000}, "history: quiet pattern before the rise");
    chk(wh[2] == {2'b01, 12'd2, 14'd0, 4'b0001}, "history: rise at dt 2");
    chk(wh[3] == {2'b01, 12'd7, 14'd0, 4'b0011}, "history: second input at dt 7");
    chk(wh[4] == {2'b01, 12'd11, 14'd0, 4'b0010}, "history: first input falls at dt 11");
    x = wh[0][29:0] ^ wh[1][29:0] ^ wh[2][29:0] ^ wh[3][29:0] ^ wh[4][29:0];
    chk(wh[5] == {2'b11, x}, "history checksum word");
    // the tracer re-arms by itself: more captures until the buffer is full
    for (int k = 0; k < 6; k++) capture();
    chk(words == 20, $sformatf("four blocks of len+4 fit in 32 words (got %0d)", words));
    chk(tstate == 3'd0, "start refused when a block no longer fits");
    // clear
    pulse(clear);
    chk(words == 0 && tstate == 3'd0, "clear resets the addresses");
    pulse(start);
    repeat (3) @(posedge clk);
    pulse(stop);
    capture();
    chk(words == 0, "stop ends the capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
