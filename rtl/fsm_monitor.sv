// fsm_monitor: detection-only error monitor built on a two-state FSM.
//
// The machine has states S1 and S2. An input bit 0 moves it to the other
// state and an input bit 1 keeps it where it is, so it is in S1 after an even
// number of zeros and in S2 after an odd number; S1 is the accepting state.
// The monitor uses it to check a trace word bit-serially: a clean trace word
// is one-hot, so its eight bits hold seven zeros. The monitor starts the FSM
// in S1, feeds one leading 0 and then the eight word bits (MSB first), and
// accepts the word if the FSM ends in S1 (an even count of zeros). Any odd
// number of flipped bits leaves it in S2, which flags an error; an even
// number goes unseen, and nothing is corrected.
// Timing: start is taken only when idle (busy = 0). The 9 bits take 9
// clocks; done pulses for one clock in the 10th cycle after start, with err
// valid in that cycle. The state diagram (two states, 0 toggles, 1 holds, S1
// accepting) is the original description's; the leading 0 and the bit order are this
// design's choice.
module fsm_monitor (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] word,
  output logic       busy,
  output logic       done,
  output logic       err
);
  typedef enum logic { S1 = 1'b0, S2 = 1'b1 } state_t;

  state_t     state;
  logic [8:0] shreg;
  logic [3:0] remaining;

  assign busy = (remaining != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S1;
      shreg     <= '0;
      remaining <= '0;
      done      <= 1'b0;
      err       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        state     <= S1;
        shreg     <= {1'b0, word};
        remaining <= 4'd9;
      end else if (busy) begin
        // 0 toggles the state, 1 keeps it
        if (!shreg[8]) state <= (state == S1) ? S2 : S1;
        shreg     <= {shreg[7:0], 1'b0};
        remaining <= remaining - 1'b1;
        if (remaining == 4'd1) begin
          done <= 1'b1;
          err  <= shreg[8] ? (state == S2) : (state == S1);
        end
      end
    end
  end

  // done is a one-cycle pulse at the end of a scan, never while scanning
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
endmodule
