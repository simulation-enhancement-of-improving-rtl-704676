// tb_fsm_monitor: random one-hot words with 0..4 random bit flips. Expected
// flag: the count of zeros in {0, word} is odd. Checks done arrives exactly 10
// cycles after start, that start is ignored while busy, and that words with
// an even number of flips pass unflagged.
module tb_fsm_monitor;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done, err;
  logic [7:0] word = '0;
  int checks = 0, failures = 0;
  int n_flag = 0, n_missed = 0;

  fsm_monitor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] w;
      int flips, zeros, lat;
      logic exp_err;
      w = 8'(1 << ($urandom % 8));
      flips = $urandom % 5;
      for (int f = 0; f < flips; f++) w[$urandom % 8] ^= 1'b1;
      zeros = 1;
      for (int i = 0; i < 8; i++) if (!w[i]) zeros++;
      exp_err = zeros % 2;
      @(negedge clk);
      start = 1; word = w;
      @(negedge clk);
      start = 1; word = ~w;     // ignored: the monitor is busy
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy"); end
      @(negedge clk);
      start = 0;
      lat = 2;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 10 || err !== exp_err) begin
        failures++;
        $display("FAIL w=%b lat=%0d err=%b exp=%b", w, lat, err, exp_err);
      end
      if (exp_err) n_flag++;
      else if (w != 8'(1 << 0) && $countones(w) != 1) n_missed++;
      @(negedge clk);
      checks++;
      if (busy || done) begin failures++; $display("FAIL not idle after done"); end
    end
    checks++;
    if (n_flag == 0 || n_missed == 0) begin failures++; $display("FAIL coverage"); end
    $display("flagged=%0d even-flip words passed=%0d", n_flag, n_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
