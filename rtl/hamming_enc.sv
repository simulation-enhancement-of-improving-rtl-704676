// hamming_enc: Hamming (12,8) encoder.
//
// Places the eight data bits at the non-power-of-two positions (d[7] at
// position 3 ... d[0] at position 12) and computes the check bits at
// positions 1, 2, 4 and 8: check bit 2^r is the XOR of every position whose
// binary number has bit r set (1,3,5,7,9,11 / 2,3,6,7,10,11 / 4-7,12 / 8-12).
// The resulting word has a zero syndrome under the lexicographic H matrix.
// Example: data 01011100 gives codeword 100010101100. Purely combinational.
module hamming_enc
  import hd_pkg::*;
(
  input  data_t data,
  output code_t code
);
  always_comb begin
    code = '0;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      code[data_pos(i)] = data[i];
    end
    for (int unsigned r = 0; r < SYN_W; r++) begin
      logic p;
      p = 1'b0;
      for (int unsigned j = 1; j <= CODE_W; j++) begin
        if (j[r] && (j != (1 << r))) p ^= code[j];
      end
      code[1 << r] = p;
    end
  end
endmodule
