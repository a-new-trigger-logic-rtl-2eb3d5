// tb_logic_functions: random sources and masks; masked ORs and
// multiplicity coincidences compared one clock later with values counted in
// the testbench.
module tb_logic_functions;
  import trlo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_SRC-1:0] src = '0;
  logic [3:0][N_SRC-1:0] all_or_mask;
  logic [1:0][N_SRC-1:0] coinc_mask;
  logic [1:0][SRC_W-1:0] coinc_level;
  logic [3:0] all_or;
  logic [1:0] coinc;
  int checks = 0, failures = 0, hits = 0;

  always #5 clk = ~clk;

  logic_functions dut (.clk, .rst_n, .src, .all_or_mask, .coinc_mask, .coinc_level, .all_or, .coinc);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      logic [3:0] eo;
      logic [1:0] ec;
      #1;
      src = {$urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom};
      for (int k = 0; k < 4; k++)
        all_or_mask[k] = {$urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom};
      for (int k = 0; k < 2; k++) begin
        coinc_mask[k]  = {$urandom, $urandom, $urandom};
        coinc_level[k] = SRC_W'($urandom_range(0, 14));
      end
      for (int k = 0; k < 4; k++) begin
        eo[k] = 1'b0;
        for (int s = 0; s < N_SRC; s++) if (src[s] && all_or_mask[k][s]) eo[k] = 1'b1;
      end
      for (int k = 0; k < 2; k++) begin
        int c;
        c = 0;
        for (int s = 0; s < N_SRC; s++) if (src[s] && coinc_mask[k][s]) c++;
        ec[k] = (coinc_level[k] != 0) && (c >= coinc_level[k]);
        if (ec[k]) hits++;
      end
      @(posedge clk); #1;
      checks++;
      if (all_or !== eo || coinc !== ec) begin
        failures++;
        $display("n=%0d: or=%b/%b coinc=%b/%b", n, all_or, eo, coinc, ec);
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("no coincidence exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
