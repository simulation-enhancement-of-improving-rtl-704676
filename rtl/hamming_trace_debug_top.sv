// hamming_trace_debug_top: Hamming-protected debug trace buffer.
//
// A user circuit (cut_s27) runs on a divided clock. At every step of the
// circuit its three flip-flop outputs are traced: a 3:8 decoder makes them a
// one-hot byte, a Hamming (12,8) encoder adds four check bits, and the
// 12-bit codeword is written into a circular trace buffer. A glitch injector
// between encoder and buffer flips one, two or three adjacent codeword bits at
// a selectable divided frequency, standing in for faults in the buffer.
// Every word written is read back at once (buffer port A) and checked twice:
//   - the Hamming decoder computes the syndrome, corrects a single error,
//     flags syndromes 1101..1111 as detected-only, and an 8:3 encoder turns
//     the corrected byte back into the 3-bit circuit state (chk_*);
//   - the FSM monitor scans the raw data bits serially and flags words with
//     an odd number of flipped data bits (detection only, fsm_*).
// Each word the decoder finds damaged (non-zero syndrome or a byte that is
// not one-hot after decoding) is logged in the error memory. A trigger unit
// stops capture POST_SAMPLES samples after a value/mask match on the traced
// state, and a host can dump the buffer through port B, which has its own
// decoder and 8:3 encoder (host_*). A second trace buffer, written at the
// same address, keeps the circuit's pins {A, B, C, D, Y} of each sample
// unprotected, so a dump shows inputs and output next to the state
// (host_pins).
//
// Timing (system clock clk, asynchronous active-low reset rst_n):
//   cycle t    : cut_tick (the selected divided-clock enable) is high; the
//                present state is encoded, glitched if armed, and written
//                (trace_wr) when the trigger allows capture; the circuit then
//                steps.
//   cycle t+2  : chk_valid, with the decoded word; an error record is written
//                in the same cycle.
//   t+2 .. t+11: the FSM monitor scans the word (if it was idle); fsm_done
//                pulses at the end with fsm_err.
//   host read  : host_valid one clock after host_re.
// Frequency selects: 0 = system clock, k = frequency_k = clk / 2^k (k=1..4);
// values above 4 select frequency_4.
// The chain decoder -> encoder -> (errors) -> decoder -> 8:3 encoder, the
// circuit, the clock divider, the separate error memory and the FSM monitor
// follow the original description; where the buffer sits in that chain, the read-back
// check, the trigger condition, the error record, the counters and the host
// port are this design's choices. Some outputs of the reused sub-blocks
// (corrected codewords, correction positions, the pin buffer's port A) are
// left unconnected here on purpose; lint lists them as unused.
module hamming_trace_debug_top
  import hd_pkg::*;
#(
  parameter int unsigned TRACE_DEPTH  = 64,
  parameter int unsigned ERR_DEPTH    = 16,
  parameter int unsigned POST_SAMPLES = 32,
  localparam int unsigned TAW         = $clog2(TRACE_DEPTH),
  localparam int unsigned EAW         = $clog2(ERR_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // circuit under debug
  input  logic            a,
  input  logic            b,
  input  logic            c,
  input  logic            d,
  output logic            y,
  output logic [2:0]      cut_state,
  // clock divider
  output logic [3:0]      freq_o,
  input  freq_sel_t       cut_freq_sel,
  // glitch injection
  input  freq_sel_t       glitch_freq_sel,
  input  glitch_mode_t    glitch_mode,
  input  logic [3:0]      glitch_pos,
  output logic            glitch_hit,
  output code_t           glitch_pattern,
  // trigger
  input  logic            trig_arm,
  input  logic [2:0]      trig_value,
  input  logic [2:0]      trig_mask,
  output logic            trig_fired,
  output logic            trig_triggered,
  output logic            trig_done,
  // trace capture
  output logic            trace_wr,
  output logic [TAW-1:0]  trace_waddr,
  output logic            trace_wrapped,
  // live check of every captured word
  output logic            chk_valid,
  output logic [TAW-1:0]  chk_addr,
  output logic [2:0]      chk_state,
  output logic            chk_onehot_ok,
  output dec_status_t     chk_status,
  output syn_t            chk_syndrome,
  output logic [3:0]      chk_corr_pos,
  // FSM monitor
  output logic            fsm_busy,
  output logic            fsm_done,
  output logic            fsm_err,
  // error memory
  input  logic            err_clear,
  input  logic            err_re,
  input  logic [EAW-1:0]  err_raddr,
  output err_rec_t        err_rec,
  output logic            err_rvalid,
  output logic [EAW:0]    err_count,
  output logic            err_overflow,
  // host dump of the trace buffer
  input  logic            host_re,
  input  logic [TAW-1:0]  host_addr,
  output logic            host_valid,
  output code_t           host_code,
  output logic [2:0]      host_state,
  output logic            host_onehot_ok,
  output dec_status_t     host_status,
  output syn_t            host_syndrome,
  output logic [4:0]      host_pins,
  // event counters (saturating)
  output logic [15:0]     n_checked,
  output logic [15:0]     n_corrected,
  output logic [15:0]     n_detected,
  output logic [15:0]     n_fsm_err
);
  // ---------------------------------------------------------------- clocks
  logic [3:0] tick;

  clk_divider #(.N_FREQ(4)) u_div (
    .clk, .rst_n, .freq_o, .tick_o(tick)
  );

  function automatic logic pick_tick(freq_sel_t sel, logic [3:0] t);
    if (sel == 3'd0)      return 1'b1;
    else if (sel > 3'd4)  return t[3];
    else                  return t[2'(sel - 3'd1)];
  endfunction

  logic cut_tick, glitch_tick;
  assign cut_tick    = pick_tick(cut_freq_sel, tick);
  assign glitch_tick = pick_tick(glitch_freq_sel, tick);

  // ------------------------------------------------------ circuit under debug
  cut_s27 u_cut (
    .clk, .rst_n, .en(cut_tick), .a, .b, .c, .d, .y, .state(cut_state)
  );

  // ---------------------------------------------------------------- trigger
  logic capture;

  trigger_unit #(.W(3), .POST_SAMPLES(POST_SAMPLES)) u_trig (
    .clk, .rst_n, .arm(trig_arm), .value(trig_value), .mask(trig_mask),
    .sample_en(cut_tick), .sample(cut_state),
    .capture, .fired(trig_fired), .triggered(trig_triggered), .done(trig_done)
  );

  assign trace_wr = cut_tick && capture;

  // ------------------------------------------- encode path into the buffer
  data_t onehot;
  code_t code, code_glitched;

  dec3to8     u_dec38 (.sel(cut_state), .onehot);
  hamming_enc u_enc   (.data(onehot), .code);

  glitch_injector u_glitch (
    .clk, .rst_n, .tick(glitch_tick), .mode(glitch_mode), .pos(glitch_pos),
    .wr(trace_wr), .code_in(code), .code_out(code_glitched),
    .pattern(glitch_pattern), .hit(glitch_hit)
  );

  // ----------------------------------------------------------- trace buffer
  logic [TAW-1:0] last_addr;
  logic           wr_d;
  logic [CODE_W-1:0] rdata_a, rdata_b;
  logic           rvalid_a;

  trace_buffer #(.WIDTH(CODE_W), .DEPTH(TRACE_DEPTH)) u_tbuf (
    .clk, .rst_n,
    .we(trace_wr), .wdata(code_glitched), .waddr(trace_waddr),
    .last_addr, .wrapped(trace_wrapped),
    .re_a(wr_d), .raddr_a(last_addr), .rdata_a, .rvalid_a,
    .re_b(host_re), .raddr_b(host_addr), .rdata_b, .rvalid_b(host_valid)
  );

  // pin trace: {A, B, C, D, Y} of every captured sample, same addressing
  logic [TAW-1:0] pins_waddr, pins_last;
  logic           pins_wrapped, pins_rvalid_a, pins_rvalid_b;
  logic [4:0]     pins_rdata_a;

  trace_buffer #(.WIDTH(5), .DEPTH(TRACE_DEPTH)) u_pinbuf (
    .clk, .rst_n,
    .we(trace_wr), .wdata({a, b, c, d, y}), .waddr(pins_waddr),
    .last_addr(pins_last), .wrapped(pins_wrapped),
    .re_a(1'b0), .raddr_a('0), .rdata_a(pins_rdata_a), .rvalid_a(pins_rvalid_a),
    .re_b(host_re), .raddr_b(host_addr), .rdata_b(host_pins), .rvalid_b(pins_rvalid_b)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_d     <= 1'b0;
      chk_addr <= '0;
    end else begin
      wr_d <= trace_wr;
      if (wr_d) chk_addr <= last_addr;
    end
  end

  // ------------------------------------------------ live check of port A
  code_t chk_code;
  data_t chk_data, chk_raw_data;
  code_t chk_fixed;

  assign chk_code = code_t'(rdata_a);
  assign chk_valid = rvalid_a;

  hamming_dec u_chk_dec (
    .code_in(chk_code), .data(chk_data), .code_fixed(chk_fixed),
    .syndrome(chk_syndrome), .status(chk_status), .corr_pos(chk_corr_pos)
  );

  logic chk_any;
  enc8to3 u_chk_enc (.onehot(chk_data), .idx(chk_state), .valid(chk_any),
                     .onehot_ok(chk_onehot_ok));

  always_comb begin
    for (int unsigned i = 0; i < DATA_W; i++) chk_raw_data[i] = chk_code[data_pos(i)];
  end

  // --------------------------------------------------------- FSM monitor
  fsm_monitor u_fsm (
    .clk, .rst_n, .start(chk_valid), .word(chk_raw_data),
    .busy(fsm_busy), .done(fsm_done), .err(fsm_err)
  );

  // -------------------------------------------------------- error memory
  logic     chk_bad;
  err_rec_t rec_w;
  logic [$bits(err_rec_t)-1:0] rrec;

  assign chk_bad = chk_valid && ((chk_status != DEC_OK) || !chk_onehot_ok);

  always_comb begin
    rec_w.addr      = 8'(chk_addr);
    rec_w.syndrome  = chk_syndrome;
    rec_w.status    = chk_status;
    rec_w.onehot_ok = chk_onehot_ok;
    rec_w.post_trig = trig_triggered;
  end

  error_memory #(.REC_W($bits(err_rec_t)), .DEPTH(ERR_DEPTH)) u_errmem (
    .clk, .rst_n, .clear(err_clear), .we(chk_bad), .wrec(rec_w),
    .re(err_re), .raddr(err_raddr), .rrec, .rvalid(err_rvalid),
    .count(err_count), .overflow(err_overflow)
  );

  assign err_rec = err_rec_t'(rrec);

  // ------------------------------------------------------ host read port B
  data_t host_data;
  code_t host_fixed;
  logic [3:0] host_corr_pos;
  logic host_any;

  assign host_code = code_t'(rdata_b);

  hamming_dec u_host_dec (
    .code_in(host_code), .data(host_data), .code_fixed(host_fixed),
    .syndrome(host_syndrome), .status(host_status), .corr_pos(host_corr_pos)
  );

  enc8to3 u_host_enc (.onehot(host_data), .idx(host_state), .valid(host_any),
                      .onehot_ok(host_onehot_ok));

  // ------------------------------------------------------------ counters
  function automatic logic [15:0] sat_inc(logic [15:0] v);
    return (v == 16'hFFFF) ? v : v + 16'd1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_checked   <= '0;
      n_corrected <= '0;
      n_detected  <= '0;
      n_fsm_err   <= '0;
    end else begin
      if (chk_valid) n_checked <= sat_inc(n_checked);
      if (chk_valid && chk_status == DEC_CORRECTED) n_corrected <= sat_inc(n_corrected);
      if (chk_valid && chk_status == DEC_DETECTED)  n_detected  <= sat_inc(n_detected);
      if (fsm_done && fsm_err) n_fsm_err <= sat_inc(n_fsm_err);
    end
  end

  initial begin
    assert (TRACE_DEPTH <= 256) else $error("error records hold 8-bit trace addresses");
  end
endmodule
