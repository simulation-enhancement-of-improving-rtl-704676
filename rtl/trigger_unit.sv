// trigger_unit: decides when the trace buffer stops recording.
//
// While armed, it compares each sample (sample_en = 1) with a trigger value
// under a mask: (sample & mask) == (value & mask). On the first match it
// records the trigger and lets POST_SAMPLES more samples be captured, then
// drops capture so the buffer keeps the window around the event. capture is
// high while recording is allowed; it is set again by arm (a one-cycle
// pulse), which also clears the trigger. fired pulses in the cycle the
// condition matches; triggered stays high until the next arm; done goes high
// when capture stops. The mask/value condition and the post-trigger count
// are this design's choice; the original description only names a trigger unit whose
// conditions the designer adjusts. Reset (rst_n, asynchronous) leaves the
// unit unarmed with capture on, so the buffer records freely.
module trigger_unit #(
  parameter int unsigned W            = 3,
  parameter int unsigned POST_SAMPLES = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         arm,
  input  logic [W-1:0] value,
  input  logic [W-1:0] mask,
  input  logic         sample_en,
  input  logic [W-1:0] sample,
  output logic         capture,
  output logic         fired,
  output logic         triggered,
  output logic         done
);
  logic                         armed;
  logic [$clog2(POST_SAMPLES+1)-1:0] post_cnt;

  assign fired = armed && !triggered && sample_en && ((sample & mask) == (value & mask));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed     <= 1'b0;
      triggered <= 1'b0;
      done      <= 1'b0;
      capture   <= 1'b1;
      post_cnt  <= '0;
    end else if (arm) begin
      armed     <= 1'b1;
      triggered <= 1'b0;
      done      <= 1'b0;
      capture   <= 1'b1;
      post_cnt  <= '0;
    end else if (fired) begin
      triggered <= 1'b1;
      if (POST_SAMPLES == 0) begin
        capture <= 1'b0;
        done    <= 1'b1;
      end
    end else if (triggered && !done && sample_en) begin
      post_cnt <= post_cnt + 1'b1;
      if (post_cnt == $bits(post_cnt)'(POST_SAMPLES - 1)) begin
        capture <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  // capture only stops after the trigger has fired
  a_stop_after_trigger: assert property (@(posedge clk) disable iff (!rst_n) !capture |-> triggered && done);
endmodule
