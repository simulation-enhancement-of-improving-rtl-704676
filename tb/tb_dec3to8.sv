// tb_dec3to8: exhaustive check of the 3:8 decoder.
module tb_dec3to8;
  logic [2:0] sel;
  logic [7:0] onehot;
  int checks = 0, failures = 0;

  dec3to8 dut (.*);

  initial begin
    for (int i = 0; i < 8; i++) begin
      sel = 3'(i);
      #1;
      checks++;
      if (onehot !== 8'(1 << i)) begin
        failures++;
        $display("FAIL sel=%0d onehot=%b", i, onehot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
