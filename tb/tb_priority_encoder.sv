// tb_priority_encoder: random request words; the winner must be the lowest
// requested trigger number above 0, given one-hot and in binary.
module tb_priority_encoder;
  logic [15:0] req, accept;
  logic valid;
  logic [3:0] encoded;
  int checks = 0, failures = 0;

  priority_encoder #(.N(16)) dut (.req, .valid, .accept, .encoded);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int win;
      win = 0;
      req = (n < 17) ? 16'(n == 0 ? 0 : (1 << (n - 1))) : 16'($urandom) & 16'($urandom);
      for (int k = 15; k >= 1; k--) if (req[k]) win = k;
      #1;
      checks++;
      if (valid !== (win != 0) || (win != 0 && (encoded !== 4'(win) || accept !== 16'(1 << win)))
          || (win == 0 && accept !== '0)) begin
        failures++;
        $display("req=%h: valid=%b enc=%0d acc=%h expected %0d", req, valid, encoded, accept, win);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
