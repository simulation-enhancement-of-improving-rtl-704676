// enc8to3: 8:3 encoder that returns the decoded byte to the 3-bit trace value.
//
// Outputs the index of the highest set bit of the byte (a priority encoder,
// so that a byte left with more than one bit set still maps to one value),
// valid = at least one bit set, and onehot_ok = exactly one bit set, which
// tells a clean trace word from a damaged one. Purely combinational. The
// priority order and the two flags are this design's choice; the original description
// names only the 8:3 encoder.
module enc8to3 (
  input  logic [7:0] onehot,
  output logic [2:0] idx,
  output logic       valid,
  output logic       onehot_ok
);
  always_comb begin
    idx = '0;
    for (int i = 0; i < 8; i++) begin
      if (onehot[i]) idx = 3'(i);
    end
    valid     = |onehot;
    onehot_ok = valid && ((onehot & (onehot - 8'd1)) == 8'd0);
  end
endmodule
