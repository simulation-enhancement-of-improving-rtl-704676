// glitch_injector: source of the SEC-DAED-TAED test errors.
//
// Flips bits of the codeword on its way into the trace buffer, to emulate
// glitches hitting the buffer. mode selects one bit, two adjacent bits or
// three adjacent bits, starting at code position pos (1..12); bits that would
// fall beyond position 12 are dropped. Glitches arrive at a divided frequency:
// a one-cycle tick (from the clock divider, chosen by the top) arms the
// injector, and the next word written (wr = 1) is corrupted, which disarms
// it. Without a tick in between, later words pass unchanged. hit is high in
// the cycle a word is corrupted, pattern shows the mask applied.
// The original description shows only a "SEC-DAED-TAED errors" source and names the glitch
// frequencies; the arm-then-hit scheme and the mode/pos controls are this
// design's choice. Registers are reset by rst_n (asynchronous).
module glitch_injector
  import hd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  glitch_mode_t mode,
  input  logic [3:0]   pos,
  input  logic         wr,
  input  code_t        code_in,
  output code_t        code_out,
  output code_t        pattern,
  output logic         hit
);
  logic armed;

  always_comb begin
    int unsigned nbits;
    case (mode)
      GL_SINGLE: nbits = 1;
      GL_DOUBLE: nbits = 2;
      GL_TRIPLE: nbits = 3;
      default:   nbits = 0;
    endcase
    pattern = '0;
    for (int unsigned j = 1; j <= CODE_W; j++) begin
      if (j >= 32'(pos) && j < 32'(pos) + nbits) pattern[j] = 1'b1;
    end
  end

  assign hit      = armed && wr && (pattern != '0);
  assign code_out = hit ? (code_in ^ pattern) : code_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             armed <= 1'b0;
    else if (hit)           armed <= tick;
    else if (tick)          armed <= 1'b1;
    else if (mode == GL_NONE) armed <= 1'b0;
  end

  // a glitch only ever lands on a word that is being written
  a_hit_on_write: assert property (@(posedge clk) disable iff (!rst_n) hit |-> wr && armed);
endmodule
