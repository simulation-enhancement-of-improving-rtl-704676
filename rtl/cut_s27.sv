// cut_s27: the user circuit under debug (the traced circuit).
//
// A small synchronous sequential circuit with four inputs A, B, C, D, three
// D flip-flops Q0, Q1, Q2 and one output Y. Its structure is the ISCAS-89
// benchmark s27, which the traced-circuit drawing follows:
//   nD   = ~D
//   n12  = ~(B | Q1)
//   n13  = ~(A | n12)        -> next Q1
//   n8   = nD & Q2
//   n15  = n12 | n8
//   n16  = C | n8
//   n9   = ~(n16 & n15)
//   n11  = ~(Q0 | n9)        -> next Q2
//   n10  = ~(nD | n11)       -> next Q0
//   Y    = ~n11
// The port names and the flip-flop names follow the drawing; the gate
// functions and the mapping D/B/A/C onto the benchmark inputs G0/G1/G2/G3 are
// taken from the published s27 netlist, not read off the drawing.
// Timing: the flip-flops load on a rising clk edge when en is high (en is the
// divided-clock enable); rst_n clears them asynchronously. Y is combinational
// from the inputs and the state. state = {Q2, Q1, Q0}.
module cut_s27 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic       d,
  output logic       y,
  output logic [2:0] state
);
  logic q0, q1, q2;
  logic n_d, n8, n9, n10, n11, n12, n13, n15, n16;

  always_comb begin
    n_d = ~d;
    n12 = ~(b | q1);
    n13 = ~(a | n12);
    n8  = n_d & q2;
    n15 = n12 | n8;
    n16 = c | n8;
    n9  = ~(n16 & n15);
    n11 = ~(q0 | n9);
    n10 = ~(n_d | n11);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q0 <= 1'b0;
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else if (en) begin
      q0 <= n10;
      q1 <= n13;
      q2 <= n11;
    end
  end

  assign y     = ~n11;
  assign state = {q2, q1, q0};
endmodule
