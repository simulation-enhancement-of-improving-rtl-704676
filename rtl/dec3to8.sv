// dec3to8: 3:8 decoder of the three traced circuit signals.
//
// Turns the 3-bit traced state into a one-hot byte: bit sel of onehot is set,
// all others clear. Purely combinational. The one-hot form is what the
// Hamming encoder protects; the 8:3 encoder after the decoder undoes it.
module dec3to8 (
  input  logic [2:0] sel,
  output logic [7:0] onehot
);
  always_comb begin
    onehot = '0;
    onehot[sel] = 1'b1;
  end
endmodule
