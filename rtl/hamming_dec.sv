// hamming_dec: Hamming (12,8) decoder with the original description's syndrome classes.
//
// The syndrome is the received word multiplied by the transposed H matrix:
// the XOR of the position numbers of all bits that are set. Its meaning:
//   0000           no error; data passed through.
//   0001 .. 1100   a single error at position = syndrome; that bit is
//                  flipped back before the data bits are extracted.
//   1101 .. 1111   an adjacent multi-bit error that can be detected but not
//                  corrected; the data bits are passed on uncorrected.
// This is the classification the original description gives. Note what the plain
// lexicographic H implies: two adjacent flipped bits give the XOR of their
// positions, which is 1, 3, 7 or 15, so most adjacent pairs look like a
// single error and are "corrected" at a wrong position; only the pair 7/8
// reaches the detect-only class. The decoder does exactly what the original description's
// table says and no more.
// Purely combinational. corr_pos is the corrected position (0 if none).
module hamming_dec
  import hd_pkg::*;
(
  input  code_t       code_in,
  output data_t       data,
  output code_t       code_fixed,
  output syn_t        syndrome,
  output dec_status_t status,
  output logic [3:0]  corr_pos
);
  always_comb begin
    syndrome = '0;
    for (int unsigned j = 1; j <= CODE_W; j++) begin
      if (code_in[j]) syndrome ^= SYN_W'(j);
    end

    code_fixed = code_in;
    corr_pos   = '0;
    if (syndrome == '0) begin
      status = DEC_OK;
    end else if (syndrome <= SYN_W'(CODE_W)) begin
      status   = DEC_CORRECTED;
      corr_pos = syndrome;
      code_fixed[syndrome] = ~code_in[syndrome];
    end else begin
      status = DEC_DETECTED;
    end

    for (int unsigned i = 0; i < DATA_W; i++) begin
      data[i] = code_fixed[data_pos(i)];
    end
  end
endmodule
