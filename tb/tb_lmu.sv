// tb_lmu: the logic matrix against the truth table of one matrix cell,
// written out independently here: an input violates its requirement when it
// is present under an anticoincidence (10) or absent under a coincidence
// (01); the output is the OR of the violations XOR-ed with lmu_not.  Random
// matrices and inputs, output checked one clock later; plus two directed
// cases (pure coincidence, coincidence with veto).
module tb_lmu;
  localparam int NI = 20, NO = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NI-1:0] in = '0;
  logic [NO-1:0][2*NI-1:0] cfg = '0;
  logic [NO-1:0] lmu_not = '0, out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lmu #(.N_IN(NI), .N_OUT(NO)) dut (.clk, .rst_n, .in, .cfg, .lmu_not, .out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_out(logic [NI-1:0] i, logic [2*NI-1:0] c, logic n);
    logic v = 1'b0;
    for (int k = 0; k < NI; k++) begin
      logic [1:0] pair = {c[2*k+1], c[2*k]};  // {anti, coinc}
      if (pair == 2'b10 && i[k])  v = 1'b1;
      if (pair == 2'b01 && !i[k]) v = 1'b1;
      if (pair == 2'b11)          v = 1'b1;   // contradictory entry never passes
    end
    return v ^ n;
  endfunction

  task automatic apply_and_check(string what);
    logic [NO-1:0] expv;
    for (int j = 0; j < NO; j++) expv[j] = ref_out(in, cfg[j], lmu_not[j]);
    @(posedge clk); #1;
    checks++;
    if (out !== expv) begin
      failures++;
      $display("%s: out=%h expected %h", what, out, expv);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // directed: output 0 = in0 & in1, output 1 = in2 & !in3, others off
    cfg = '0;
    lmu_not = 16'h0003;
    cfg[0][1:0] = 2'b01; cfg[0][3:2] = 2'b01;
    cfg[1][5:4] = 2'b01; cfg[1][7:6] = 2'b10;
    in = 20'b0011; apply_and_check("and");
    checks++; if (out[0] !== 1'b1) begin failures++; $display("in0&in1 did not fire"); end
    in = 20'b0001; apply_and_check("and-miss");
    checks++; if (out[0] !== 1'b0) begin failures++; $display("in0 alone fired"); end
    in = 20'b0100; apply_and_check("veto-free");
    checks++; if (out[1] !== 1'b1) begin failures++; $display("in2 without veto did not fire"); end
    in = 20'b1100; apply_and_check("veto");
    checks++; if (out[1] !== 1'b0) begin failures++; $display("veto did not block"); end
    checks++; if (out[15:2] !== '0) begin failures++; $display("switched-off outputs fired"); end
    // random
    for (int n = 0; n < 500; n++) begin
      for (int j = 0; j < NO; j++) begin
        for (int k = 0; k < NI; k++) begin
          int r;
          r = $urandom_range(0, 9);
          {cfg[j][2*k+1], cfg[j][2*k]} = (r < 7) ? 2'b00 : (r < 9) ? 2'b01 : 2'b10;
        end
      end
      lmu_not = NO'($urandom);
      in = NI'($urandom);
      apply_and_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
