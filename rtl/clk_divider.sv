// clk_divider: derives the four divided frequencies from the system clock.
//
// A free-running binary counter divides the system clock; frequency_k is the
// counter's bit k-1, i.e. system clock / 2^k for k = 1..N_FREQ. With the
// default 16 MHz system clock this gives frequency_1..4 = 8, 4, 2 and 1 MHz,
// so that frequency_3 is 2 MHz and frequency_4 is 1 MHz as in the
// evaluated glitch runs. The divided waveforms are output as square waves
// (freq_o) for observation, and, for use inside the single-clock design, as
// one-cycle enables (tick_o[k-1] is high in the system-clock cycle in which
// frequency_k completes a period, once every 2^k cycles). The divide-by-two
// chain and the 16 MHz system clock are this design's choice; the two named
// frequencies are the original description's.
module clk_divider #(
  parameter int unsigned N_FREQ = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [N_FREQ-1:0] freq_o,
  output logic [N_FREQ-1:0] tick_o
);
  logic [N_FREQ-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign freq_o = cnt;

  // frequency_k completes a period when the low k counter bits are all ones.
  always_comb begin
    logic all_ones;
    all_ones = 1'b1;
    for (int unsigned k = 0; k < N_FREQ; k++) begin
      all_ones  = all_ones & cnt[k];
      tick_o[k] = all_ones;
    end
  end
endmodule
