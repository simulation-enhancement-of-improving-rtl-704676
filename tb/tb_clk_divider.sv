// tb_clk_divider: with a 16 MHz system clock (62.5 ns), checks that
// frequency_k ticks exactly every 2^k cycles (frequency_3 = 2 MHz every 8
// cycles, frequency_4 = 1 MHz every 16) and that the square-wave outputs
// toggle every 2^(k-1) cycles.
module tb_clk_divider;
  logic clk = 0, rst_n = 0;
  logic [3:0] freq_o, tick_o;
  int checks = 0, failures = 0;
  int last_tick [4];
  int ntick [4];
  int last_edge [4];
  logic [3:0] prev_freq;

  clk_divider #(.N_FREQ(4)) dut (.*);

  always begin #31.25 clk = ~clk; end

  initial begin
    for (int k = 0; k < 4; k++) begin last_tick[k] = -1; ntick[k] = 0; last_edge[k] = -1; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev_freq = freq_o;
    for (int cyc = 0; cyc < 256; cyc++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        if (tick_o[k]) begin
          ntick[k]++;
          if (last_tick[k] >= 0) begin
            checks++;
            if (cyc - last_tick[k] != (2 << k)) begin
              failures++;
              $display("FAIL freq_%0d tick spacing %0d", k + 1, cyc - last_tick[k]);
            end
          end
          last_tick[k] = cyc;
        end
        if (freq_o[k] != prev_freq[k]) begin
          if (last_edge[k] >= 0) begin
            checks++;
            if (cyc - last_edge[k] != (1 << k)) begin
              failures++;
              $display("FAIL freq_%0d half period %0d", k + 1, cyc - last_edge[k]);
            end
          end
          last_edge[k] = cyc;
        end
      end
      prev_freq = freq_o;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (ntick[k] != 256 / (2 << k)) begin
        failures++;
        $display("FAIL freq_%0d ticks %0d", k + 1, ntick[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
