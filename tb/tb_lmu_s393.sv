// tb_lmu_s393: the trigger logic matrix loaded with the matrix of the 2010
// campaign (8 on-spill and 7 off-spill/calibration outputs over 16 detector
// inputs and the auxiliary input "spill on").
//
// The on-spill outputs require spill on, the beam detector (input 1) and,
// depending on the output, further detectors; the off-spill outputs
// require spill on and input 1 to be ABSENT and one cosmic/calibration
// detector to be present.  The testbench writes the matrix into the
// register layout of the lmu ({anti,coinc} per input), drives random
// input patterns (each input present with probability 1/2, spill on with
// probability 1/2) and compares every output, one clock later, with the
// Boolean expression of the corresponding matrix row written out by hand.
module tb_lmu_s393;
  localparam int N_IN = 20, N_OUT = 16;
  localparam int AUX1 = 16;  // input index of "spill on"
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_IN-1:0] in = '0;
  logic [N_OUT-1:0][2*N_IN-1:0] cfg;
  logic [N_OUT-1:0] lmu_not, out;
  int checks = 0, failures = 0;
  int fired [N_OUT];

  always #5 clk = ~clk;

  lmu #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.clk, .rst_n, .in, .cfg, .lmu_not, .out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // detector numbers are 1-based as in the experiment's input list
  function automatic void coinc(int o, int det);
    cfg[o-1][2*(det-1)] = 1'b1;
  endfunction
  function automatic void anti(int o, int det);
    cfg[o-1][2*(det-1)+1] = 1'b1;
  endfunction

  function automatic logic d(logic [N_IN-1:0] v, int det);
    return v[det-1];
  endfunction

  function automatic logic [N_OUT-1:0] expected(logic [N_IN-1:0] v);
    logic [N_OUT-1:0] e;
    logic s, b;
    s = v[AUX1];
    b = d(v, 1);
    e = '0;
    e[0]  = s & b;                               // good beam
    e[1]  = s & b & d(v, 5);                     // fragment
    e[2]  = s & b & d(v, 5) & d(v, 9);           // CB OR
    e[3]  = s & b & d(v, 5) & d(v, 11);          // CB SUM
    e[4]  = s & b & d(v, 5) & d(v, 7);           // proton
    e[5]  = s & b;                               // CB pile-up
    e[6]  = s & b & d(v, 14);                    // PIX
    e[7]  = s & b & d(v, 3) & d(v, 5);           // neutron
    e[8]  = ~s & ~b & d(v, 12);                  // CB muon
    e[9]  = ~s & ~b & d(v, 4);                   // LAND cosmic
    e[10] = ~s & ~b & d(v, 6);                   // TFW cosmic
    e[11] = ~s & ~b & d(v, 10);                  // CB gamma
    e[12] = ~s & ~b & d(v, 8);                   // DTF cosmic
    e[13] = ~s & ~b & d(v, 15);                  // NTF cosmic
    e[14] = ~s & ~b & d(v, 16);                  // CB L+R muon
    return e;
  endfunction

  initial begin
    logic [N_OUT-1:0] e;
    cfg = '0;
    lmu_not = 16'h7FFF;                          // outputs 1..15 in use
    for (int o = 1; o <= 8; o++) begin coinc(o, 1); coinc(o, 17); end
    coinc(2, 5);
    coinc(3, 5); coinc(3, 9);
    coinc(4, 5); coinc(4, 11);
    coinc(5, 5); coinc(5, 7);
    coinc(7, 14);
    coinc(8, 3); coinc(8, 5);
    for (int o = 9; o <= 15; o++) begin anti(o, 1); anti(o, 17); end
    coinc(9, 12); coinc(10, 4); coinc(11, 6); coinc(12, 10);
    coinc(13, 8); coinc(14, 15); coinc(15, 16);
    foreach (fired[k]) fired[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      #1;
      in = N_IN'($urandom);
      // make the many-input rows fire now and then
      if (n % 4 == 0) in = in | N_IN'(32'h1_0000 | 32'h1 | 32'h10);
      e = expected(in);
      @(posedge clk); #1;
      checks++;
      if (out !== e) begin
        failures++;
        $display("inputs %b: out %b expected %b", in, out, e);
      end
      for (int k = 0; k < N_OUT; k++) if (out[k]) fired[k]++;
    end
    for (int k = 0; k < 15; k++) begin
      checks++;
      if (fired[k] == 0) begin failures++; $display("output %0d never fired", k + 1); end
    end
    checks++;
    if (fired[15] != 0) begin failures++; $display("unused output 16 fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
