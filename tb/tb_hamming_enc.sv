// tb_hamming_enc: checks the (12,8) encoder against the worked example
// (data 01011100 -> codeword 100010101100) and, for all 256 data bytes,
// against a brute-force reference: the check bits are the only choice of
// positions 1,2,4,8 for which every row of the parity-check matrix H sums to
// zero, and the data bits appear unchanged at positions 3,5,6,7,9..12.
module tb_hamming_enc;
  import hd_pkg::*;
  data_t data;
  code_t code;
  int checks = 0, failures = 0;

  hamming_enc dut (.*);

  // rows of H, column 1 on the left: {s8, s4, s2, s1}
  localparam logic [1:12] H [4] = '{12'b000000011111, 12'b000111100001,
                                    12'b011001100110, 12'b101010101010};
  localparam int DPOS [8] = '{12, 11, 10, 9, 7, 6, 5, 3};  // DPOS[i] = position of d[i]

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

  initial begin
    data = 8'b01011100;
    #1;
    checks++;
    if (code !== 12'b100010101100) begin
      failures++;
      $display("FAIL example code=%b", code);
    end
    for (int v = 0; v < 256; v++) begin
      data = 8'(v);
      #1;
      checks++;
      if (code !== ref_code(8'(v))) begin
        failures++;
        $display("FAIL data=%b code=%b exp=%b", data, code, ref_code(8'(v)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
