// tb_hamming_trace_debug_top: end-to-end test of the Hamming-protected trace
// buffer at its default sizes (64-word trace buffer, 16-record error memory,
// 32 post-trigger samples).
//
// The testbench keeps its own models of everything it checks: the clock
// divider ticks (from a cycle counter), the user circuit (written in the
// benchmark's G-names), the glitch arm/hit rule and glitch masks, the code
// (brute-force from the parity-check matrix), the decoder's syndrome classes,
// the FSM's zero-count parity, the trigger window, the error log and the
// buffer contents. It runs these phases:
//   1  circuit at the system clock, no glitches (buffer wraps)
//   2  circuit at frequency_1, single-bit glitches at frequency_3 (2 MHz)
//   3  circuit at frequency_2, double-adjacent glitches at frequency_4
//      (1 MHz), including the pair 7/8 that lands in the detect-only class
//   4  circuit at frequency_4, single and double glitches, every word scanned
//      by the FSM monitor (odd flips flagged, even flips missed)
//   5  triple-adjacent glitches at frequency_3
//   6  trigger armed, fires, 32 more samples, capture stops
//   7  host dump of the whole buffer and of the error memory
// Each mechanism is counted; one that never happens counts as a failure.
module tb_hamming_trace_debug_top;
  import hd_pkg::*;

  localparam int TD = 64, ED = 16, POST = 32;

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

  always #31.25 clk = ~clk;   // 16 MHz system clock

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------ reference code
  localparam logic [1:12] H [4] = '{12'b000000011111, 12'b000111100001,
                                    12'b011001100110, 12'b101010101010};
  localparam int DPOS [8] = '{12, 11, 10, 9, 7, 6, 5, 3};

  function automatic logic [1:12] ref_code(logic [7:0] dv);
    logic [1:12] cw;
    for (int p = 0; p < 16; p++) begin
      logic ok;
      cw = '0;
      for (int i = 0; i < 8; i++) cw[DPOS[i]] = dv[i];
      cw[1] = p[0]; cw[2] = p[1]; cw[4] = p[2]; cw[8] = p[3];
      ok = 1'b1;
      for (int r = 0; r < 4; r++) if (^(cw & H[r])) ok = 1'b0;
      if (ok) return cw;
    end
    return '1;
  endfunction

  typedef struct {
    logic [5:0]  addr;
    logic [2:0]  state;
    logic [1:12] mask;
    logic        post_trig;
    logic [4:0]  pins;
  } sample_t;

  typedef struct {
    logic [3:0]  syn;
    dec_status_t st;
    logic [2:0]  idx;
    logic        ok1;
    logic [7:0]  raw;
  } verdict_t;

  function automatic verdict_t judge(sample_t s);
    verdict_t v;
    logic [1:12] rx, fx;
    logic [7:0] dv;
    int syn, ones;
    rx = ref_code(8'(1 << s.state)) ^ s.mask;
    syn = 0;
    for (int j = 1; j <= 12; j++) if (s.mask[j]) syn ^= j;   // syndrome of the error alone
    fx = rx;
    if (syn == 0) v.st = DEC_OK;
    else if (syn <= 12) begin v.st = DEC_CORRECTED; fx[syn] = ~fx[syn]; end
    else v.st = DEC_DETECTED;
    for (int i = 0; i < 8; i++) begin dv[i] = fx[DPOS[i]]; v.raw[i] = rx[DPOS[i]]; end
    v.syn = 4'(syn);
    v.idx = 0; ones = 0;
    for (int i = 0; i < 8; i++) if (dv[i]) begin v.idx = 3'(i); ones++; end
    v.ok1 = (ones == 1);
    return v;
  endfunction

  // ------------------------------------------------------------- models
  int unsigned cnt_m = 0;              // divider counter
  logic g5 = 0, g6 = 0, g7 = 0;        // Q0, Q2, Q1
  logic armed_g = 0;
  logic trig_armed_m = 0, trig_trig_m = 0, capture_m = 1;
  int post_m = 0;
  int waddr_m = 0, nwrites = 0;
  sample_t buf_m [TD];
  sample_t pend [$];                   // written, not yet checked
  sample_t pend2 [$];
  logic fsm_exp [$];
  err_rec_t log_m [$];
  int n_chk_m = 0, n_corr_m = 0, n_det_m = 0, n_fsm_m = 0;

  // mechanism counters
  int m_wrap = 0, m_corr = 0, m_detect = 0, m_miscorrect = 0, m_fsm_flag = 0,
      m_fsm_miss = 0, m_fsm_skip = 0, m_glitch_f3 = 0, m_glitch_f4 = 0, m_triple = 0,
      m_trig = 0, m_stop = 0, m_overflow = 0, m_host = 0, m_errread = 0;

  function automatic logic tick_of(freq_sel_t sel, int unsigned cnt);
    int k;
    if (sel == 0) return 1'b1;
    k = (sel > 4) ? 4 : int'(sel);
    return (cnt % (1 << k)) == (1 << k) - 1;
  endfunction

  function automatic logic [1:12] mask_of(glitch_mode_t m, logic [3:0] p);
    logic [1:12] mk = '0;
    for (int k = 0; k < int'(m); k++) if (int'(p) + k <= 12) mk[int'(p) + k] = 1'b1;
    return mk;
  endfunction

  // one system-clock cycle: inputs are already applied; observe and advance models
  task automatic step();
    logic cut_tick, g_tick, wr, hit;
    logic [1:12] mk;
    logic g14, g8, g12, g13, g15, g16, g9, g11, g10;
    #1;
    cut_tick = tick_of(cut_freq_sel, cnt_m);
    g_tick   = tick_of(glitch_freq_sel, cnt_m);
    // circuit
    chk(cut_state == {g6, g7, g5}, "circuit state");
    g14 = !d; g12 = !(b || g7); g8 = g14 && g6; g15 = g12 || g8; g16 = c || g8;
    g9 = !(g16 && g15); g11 = !(g5 || g9); g10 = !(g14 || g11); g13 = !(a || g12);
    chk(y == !g11, "circuit output");
    // capture and glitch
    wr = cut_tick && capture_m;
    chk(trace_wr == wr, "trace write");
    mk = mask_of(glitch_mode, glitch_pos);
    hit = armed_g && wr && (mk != '0);
    chk(glitch_hit == hit && glitch_pattern == mk, "glitch");
    if (hit && glitch_freq_sel == 3) m_glitch_f3++;
    if (hit && glitch_freq_sel == 4) m_glitch_f4++;
    if (hit && glitch_mode == GL_TRIPLE) m_triple++;
    if (wr) begin
      sample_t s;
      chk(trace_waddr == 6'(waddr_m), "write address");
      s.addr = 6'(waddr_m); s.state = {g6, g7, g5}; s.mask = hit ? mk : '0;
      s.post_trig = trig_trig_m;
      s.pins = {a, b, c, d, !g11};
      buf_m[waddr_m] = s;
      pend.push_back(s);
      waddr_m = (waddr_m + 1) % TD;
      nwrites++;
      if (nwrites == TD + 1) m_wrap++;
    end
    // live check, two cycles after the write
    if (chk_valid) begin
      sample_t s;
      verdict_t v;
      s = pend2.pop_front();
      v = judge(s);
      chk(chk_addr == s.addr && chk_syndrome == v.syn && chk_status == v.st, "check verdict");
      chk(chk_state == v.idx && chk_onehot_ok == v.ok1, "check state");
      if (v.st == DEC_OK && v.ok1) chk(chk_state == s.state, "clean word state");
      if (s.mask != '0 && $countones(s.mask) == 1) chk(chk_state == s.state, "single corrected");
      n_chk_m++;
      if (v.st == DEC_CORRECTED) begin
        n_corr_m++;
        if (v.idx == s.state && v.ok1) m_corr++; else m_miscorrect++;
      end
      if (v.st == DEC_DETECTED) begin n_det_m++; m_detect++; end
      if (v.st != DEC_OK || !v.ok1) begin
        err_rec_t r;
        r.addr = 8'(s.addr); r.syndrome = v.syn; r.status = v.st; r.onehot_ok = v.ok1;
        r.post_trig = trig_trig_m;
        if (log_m.size() < ED) log_m.push_back(r); else m_overflow++;
      end
      if (!fsm_busy) begin
        int zeros = 1;
        for (int i = 0; i < 8; i++) if (!v.raw[i]) zeros++;
        fsm_exp.push_back(zeros % 2 == 1);
        if (zeros % 2 == 1) m_fsm_flag++;
        else if (s.mask != '0) begin
          logic [7:0] clean;
          for (int i = 0; i < 8; i++) clean[i] = ref_code(8'(1 << s.state))[DPOS[i]];
          if (clean != v.raw) m_fsm_miss++;
        end
      end else m_fsm_skip++;
    end
    if (fsm_done) begin
      logic e;
      chk(fsm_exp.size() > 0, "fsm result expected");
      if (fsm_exp.size() > 0) begin
        e = fsm_exp.pop_front();
        chk(fsm_err == e, "fsm verdict");
        if (e) n_fsm_m++;
      end
    end
    // trigger model
    chk(trig_fired == (trig_armed_m && !trig_trig_m && cut_tick &&
                       ((cut_state & trig_mask) == (trig_value & trig_mask))), "trigger fire");
    @(posedge clk);
    // advance models to the state after this edge
    while (pend.size() > 0 && pend2.size() < 64) begin
      // words become checkable one cycle after they are written
      pend2.push_back(pend.pop_front());
    end
    if (trig_arm) begin
      trig_armed_m = 1; trig_trig_m = 0; capture_m = 1; post_m = 0;
    end else if (trig_fired) begin
      trig_trig_m = 1; m_trig++;
    end else if (trig_trig_m && capture_m && cut_tick) begin
      post_m++;
      if (post_m == POST) begin capture_m = 0; m_stop++; end
    end
    if (hit) armed_g = g_tick;
    else if (g_tick) armed_g = 1;
    else if (glitch_mode == GL_NONE) armed_g = 0;
    if (cut_tick) begin g5 = g10; g6 = g11; g7 = g13; end
    cnt_m++;
    @(negedge clk);
  endtask

  task automatic run(int cycles, bit rand_pos, logic [3:0] fixed_pos);
    for (int n = 0; n < cycles; n++) begin
      {a, b, c, d} = 4'($urandom);
      glitch_pos = rand_pos ? 4'(1 + $urandom % 12) : fixed_pos;
      step();
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1: system clock, no glitches
    cut_freq_sel = 0; glitch_mode = GL_NONE;
    run(100, 1, 1);
    // 2: frequency_1 circuit, single glitches at frequency_3
    cut_freq_sel = 1; glitch_freq_sel = 3; glitch_mode = GL_SINGLE;
    run(300, 1, 1);
    // 3: frequency_2 circuit, double-adjacent glitches at frequency_4
    cut_freq_sel = 2; glitch_freq_sel = 4; glitch_mode = GL_DOUBLE;
    run(200, 0, 4'd7);
    run(200, 1, 1);
    // 4: frequency_4 circuit, every word scanned by the FSM
    cut_freq_sel = 4; glitch_freq_sel = 4; glitch_mode = GL_SINGLE;
    run(400, 1, 1);
    glitch_mode = GL_DOUBLE;
    run(400, 1, 1);
    // 5: triple-adjacent glitches at frequency_3
    cut_freq_sel = 3; glitch_freq_sel = 3; glitch_mode = GL_TRIPLE;
    run(300, 1, 1);
    // 6: trigger on Q0 = 0
    glitch_mode = GL_NONE; cut_freq_sel = 1;
    trig_value = 3'b000; trig_mask = 3'b001; trig_arm = 1;
    run(1, 1, 1);
    trig_arm = 0;
    run(400, 1, 1);
    chk(trig_done && !trig_fired, "trigger done");
    run(20, 1, 1);
    // 7: host dump of the buffer and of the error memory
    for (int i = 0; i < TD; i++) begin
      verdict_t v;
      host_re = 1; host_addr = 6'(i);
      @(negedge clk);
      host_re = 0;
      v = judge(buf_m[i]);
      chk(host_valid && host_syndrome == v.syn && host_status == v.st &&
          host_state == v.idx && host_onehot_ok == v.ok1, "host dump");
      chk(host_code == (ref_code(8'(1 << buf_m[i].state)) ^ buf_m[i].mask), "host raw word");
      chk(host_pins == buf_m[i].pins, "host pin trace");
      m_host++;
    end
    chk(err_count == 5'(log_m.size()) && err_overflow == (m_overflow > 0), "error count");
    for (int i = 0; i < log_m.size(); i++) begin
      err_re = 1; err_raddr = 4'(i);
      @(negedge clk);
      err_re = 0;
      chk(err_rvalid && err_rec == log_m[i], "error record");
      m_errread++;
    end
    repeat (12) @(negedge clk);
    chk(n_checked == 16'(n_chk_m) && n_corrected == 16'(n_corr_m) &&
        n_detected == 16'(n_det_m) && n_fsm_err == 16'(n_fsm_m), "event counters");
    err_clear = 1;
    @(negedge clk);
    err_clear = 0;
    chk(err_count == 0 && !err_overflow, "error memory cleared");

    $display("mechanisms: wrap=%0d corrected=%0d detected_only=%0d miscorrected=%0d",
             m_wrap, m_corr, m_detect, m_miscorrect);
    $display("  glitch@f3=%0d glitch@f4=%0d triple=%0d fsm_flag=%0d fsm_miss=%0d fsm_skip=%0d",
             m_glitch_f3, m_glitch_f4, m_triple, m_fsm_flag, m_fsm_miss, m_fsm_skip);
    $display("  trigger=%0d stop=%0d errmem_overflow=%0d host_reads=%0d err_reads=%0d",
             m_trig, m_stop, m_overflow, m_host, m_errread);
    chk(m_wrap > 0, "mechanism: buffer wrap");
    chk(m_corr > 0, "mechanism: single-error correction");
    chk(m_detect > 0, "mechanism: detect-only syndrome");
    chk(m_miscorrect > 0, "mechanism: adjacent error aliased to a single error");
    chk(m_glitch_f3 > 0 && m_glitch_f4 > 0, "mechanism: glitches at frequency_3 and frequency_4");
    chk(m_triple > 0, "mechanism: triple-adjacent glitch");
    chk(m_fsm_flag > 0 && m_fsm_miss > 0 && m_fsm_skip > 0, "mechanism: FSM flag, miss and skip");
    chk(m_trig == 1 && m_stop == 1, "mechanism: trigger and capture stop");
    chk(m_overflow > 0, "mechanism: error memory overflow");
    chk(m_host == TD && m_errread == ED, "mechanism: readout");
    chk(n_chk_m > 0 && pend.size() + pend2.size() == 0, "all words checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
