// tb_glitch_workloads: the three evaluated scenarios, run on the complete
// design at its default sizes with a 16 MHz system clock.
//   A  glitches at frequency_3: circuit and capture at the system clock,
//      single-bit glitches; the glitches must arrive every 500 ns (2 MHz) and
//      every hit word must come back corrected to the captured state.
//   B  the same at frequency_4: glitches every 1000 ns (1 MHz).
//   C  adjacent-bit errors: every double-adjacent (positions p, p+1) and
//      triple-adjacent (p..p+2) pattern is injected into a captured word and
//      the decoder's verdict is compared with the syndrome arithmetic
//      (syndrome = XOR of the flipped positions; 1..12 corrected there,
//      13..15 detected only, 0 unseen). The table of outcomes is printed.
module tb_glitch_workloads;
  import hd_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  logic a = 0, b = 0, c = 0, d = 0, y;
  logic [2:0] cut_state;
  logic [3:0] freq_o;
  freq_sel_t cut_freq_sel = 3'd0, glitch_freq_sel = 3'd3;
  glitch_mode_t glitch_mode = GL_NONE;
  logic [3:0] glitch_pos = 4'd1;
  logic glitch_hit;
  code_t glitch_pattern;
  logic trig_arm = 0;
  logic [2:0] trig_value = '0, trig_mask = '0;
  logic trig_fired, trig_triggered, trig_done;
  logic trace_wr, trace_wrapped;
  logic [5:0] trace_waddr, chk_addr;
  logic chk_valid, chk_onehot_ok;
  logic [2:0] chk_state;
  dec_status_t chk_status;
  syn_t chk_syndrome;
  logic [3:0] chk_corr_pos;
  logic fsm_busy, fsm_done, fsm_err;
  logic err_clear = 0, err_re = 0;
  logic [3:0] err_raddr = '0;
  err_rec_t err_rec;
  logic err_rvalid, err_overflow;
  logic [4:0] err_count;
  logic host_re = 0;
  logic [5:0] host_addr = '0;
  logic host_valid, host_onehot_ok;
  code_t host_code;
  logic [2:0] host_state;
  dec_status_t host_status;
  syn_t host_syndrome;
  logic [4:0] host_pins;
  logic [15:0] n_checked, n_corrected, n_detected, n_fsm_err;

  hamming_trace_debug_top dut (.*);

  always #31.25 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  logic [2:0] st_q [$];   // states of words written, not yet checked

  // Run with periodic glitches; check spacing and correction.
  task automatic periodic(freq_sel_t gsel, realtime period);
    realtime last;
    int hits;
    cut_freq_sel = 0; glitch_freq_sel = gsel; glitch_mode = GL_SINGLE;
    last = -1.0; hits = 0;
    for (int n = 0; n < 400; n++) begin
      {a, b, c, d} = 4'($urandom);
      glitch_pos = 4'(1 + $urandom % 12);
      #1;
      if (chk_valid) begin
        logic [2:0] s;
        s = st_q.pop_front();
        chk(chk_state == s && chk_onehot_ok, "word restored");
        if (chk_status == DEC_CORRECTED) hits++;
      end
      if (trace_wr) st_q.push_back(cut_state);
      if (glitch_hit) begin
        if (last >= 0) chk($realtime - last == period, "glitch period");
        last = $realtime;
      end
      @(negedge clk);
    end
    $display("glitch period %0.0f ns: %0d words corrected", period, hits);
    chk(hits >= 400 / int'(period / 62.5) - 2, "glitch count");
  endtask

  initial begin
    int n_det, n_alias, n_unseen, n_ok;
    repeat (3) @(negedge clk);
    rst_n = 1;
    #1;
    periodic(3'd3, 500.0);
    periodic(3'd4, 1000.0);

    // C: adjacent-error sweep
    $display("pattern  first  syndrome  verdict");
    n_det = 0; n_alias = 0; n_unseen = 0; n_ok = 0;
    cut_freq_sel = 4; glitch_freq_sel = 4;
    for (int w = 2; w <= 3; w++) begin
      for (int p = 1; p + w - 1 <= 12; p++) begin
        int syn;
        logic [2:0] st;
        bit got;
        glitch_mode = (w == 2) ? GL_DOUBLE : GL_TRIPLE;
        glitch_pos = 4'(p);
        syn = 0;
        for (int q = p; q < p + w; q++) syn ^= q;
        got = 0;
        for (int n = 0; n < 80 && !got; n++) begin
          @(negedge clk);
          {a, b, c, d} = 4'($urandom);
          #1;
          if (glitch_hit) begin
            st = cut_state;
            repeat (2) @(negedge clk);
            #1;
            chk(chk_valid && chk_syndrome == 4'(syn), "adjacent syndrome");
            if (syn == 0) begin
              chk(chk_status == DEC_OK, "unseen class"); n_unseen++;
              $display("  %0d-adj   %2d     %b      not seen", w, p, chk_syndrome);
            end else if (syn <= 12) begin
              chk(chk_status == DEC_CORRECTED && chk_corr_pos == 4'(syn), "aliased class");
              if (chk_state == st && chk_onehot_ok) n_ok++; else n_alias++;
              $display("  %0d-adj   %2d     %b      'corrected' at %0d, state %s", w, p,
                       chk_syndrome, syn, (chk_state == st && chk_onehot_ok) ? "right" : "wrong");
            end else begin
              chk(chk_status == DEC_DETECTED, "detected class"); n_det++;
              $display("  %0d-adj   %2d     %b      detected, not corrected", w, p, chk_syndrome);
            end
            got = 1;
          end
        end
        chk(got, "pattern injected");
      end
    end
    $display("adjacent patterns: detected=%0d wrong-correction=%0d harmless=%0d unseen=%0d",
             n_det, n_alias, n_ok, n_unseen);
    chk(n_det + n_alias + n_ok + n_unseen == 21, "all 21 patterns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
