// tb_hamming_dec: checks the decoder against the worked example (clean word
// -> syndrome 0000; fifth bit flipped -> syndrome 0101 and corrected), then
// for every data byte: the clean word, every single-bit error (corrected
// back), and every adjacent double and triple error, whose syndrome is the
// XOR of the flipped positions and whose class follows the table
// 0 = no error, 1..12 = corrected at that position, 13..15 = detected only.
// Reference codewords come from the matrix H, not from the encoder.
module tb_hamming_dec;
  import hd_pkg::*;
  code_t       code_in, code_fixed;
  data_t       data;
  syn_t        syndrome;
  dec_status_t status;
  logic [3:0]  corr_pos;
  int checks = 0, failures = 0;
  int n_single = 0, n_detect = 0;

  hamming_dec dut (.*);

  localparam logic [1:12] H [4] = '{12'b000000011111, 12'b000111100001,
                                    12'b011001100110, 12'b101010101010};
  localparam int DPOS [8] = '{12, 11, 10, 9, 7, 6, 5, 3};

  function automatic logic [1:12] ref_code(logic [7:0] dv);
    logic [1:12] cw;
    for (int p = 0; p < 16; p++) begin
      logic ok;
      cw = '0;
      for (int i = 0; i < 8; i++) cw[DPOS[i]] = dv[i];
      cw[1] = p[0]; cw[2] = p[1]; cw[4] = p[2]; cw[8] = p[3];
      ok = 1'b1;
      for (int r = 0; r < 4; r++) if (^(cw & H[r])) ok = 1'b0;
      if (ok) return cw;
    end
    return '1;
  endfunction

  function automatic logic [7:0] data_of(logic [1:12] cw);
    logic [7:0] dv;
    for (int i = 0; i < 8; i++) dv[i] = cw[DPOS[i]];
    return dv;
  endfunction

  task automatic expect_word(logic [1:12] rx, logic [3:0] syn, dec_status_t st,
                             logic [1:12] fixed, string what);
    code_in = rx;
    #1;
    checks++;
    if (syndrome !== syn || status !== st || code_fixed !== fixed ||
        data !== data_of(fixed)) begin
      failures++;
      $display("FAIL %s rx=%b syn=%b/%b st=%0d/%0d fixed=%b/%b", what, rx, syndrome, syn,
               status, st, code_fixed, fixed);
    end
  endtask

  initial begin
    expect_word(12'b100010101100, 4'b0000, DEC_OK, 12'b100010101100, "example clean");
    expect_word(12'b100000101100, 4'b0101, DEC_CORRECTED, 12'b100010101100, "example bit 5");
    checks++;
    if (data !== 8'b01011100 || corr_pos !== 4'd5) begin
      failures++;
      $display("FAIL example data=%b corr_pos=%0d", data, corr_pos);
    end
    for (int v = 0; v < 256; v++) begin
      logic [1:12] cw;
      cw = ref_code(8'(v));
      expect_word(cw, 4'd0, DEC_OK, cw, "clean");
      for (int j = 1; j <= 12; j++) begin
        logic [1:12] e;
        e = '0; e[j] = 1'b1;
        expect_word(cw ^ e, 4'(j), DEC_CORRECTED, cw, "single");
        n_single++;
      end
      for (int w = 2; w <= 3; w++) begin
        for (int j = 1; j + w - 1 <= 12; j++) begin
          logic [1:12] e, fx;
          int syn;
          dec_status_t st;
          e = '0; syn = 0;
          for (int q = j; q < j + w; q++) begin e[q] = 1'b1; syn ^= q; end
          fx = cw ^ e;
          if (syn == 0) st = DEC_OK;
          else if (syn <= 12) begin st = DEC_CORRECTED; fx[syn] = ~fx[syn]; end
          else begin st = DEC_DETECTED; n_detect++; end
          expect_word(cw ^ e, 4'(syn), st, fx, "adjacent");
        end
      end
    end
    checks++;
    if (n_detect == 0) begin failures++; $display("FAIL detect-only class never reached"); end
    $display("single=%0d detected-only=%0d", n_single, n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
