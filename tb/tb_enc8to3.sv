// tb_enc8to3: exhaustive check of the 8:3 encoder over all 256 bytes:
// index of the highest set bit, any-bit-set, and exactly-one-bit-set.
module tb_enc8to3;
  logic [7:0] onehot;
  logic [2:0] idx;
  logic valid, onehot_ok;
  int checks = 0, failures = 0;

  enc8to3 dut (.*);

  initial begin
    for (int v = 0; v < 256; v++) begin
      int hi, ones;
      onehot = 8'(v);
      hi = 0; ones = 0;
      for (int i = 0; i < 8; i++) if (v & (1 << i)) begin hi = i; ones++; end
      #1;
      checks++;
      if (idx !== 3'(hi) || valid !== (ones > 0) || onehot_ok !== (ones == 1)) begin
        failures++;
        $display("FAIL v=%b idx=%0d valid=%b ok=%b", onehot, idx, valid, onehot_ok);
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
