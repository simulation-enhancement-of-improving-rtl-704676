// tb_cut_s27: checks the traced circuit against a reference model written in
// the benchmark's own signal names (G0..G17). Random inputs, random enable,
// reset in the middle; state and Y are compared after every clock.
module tb_cut_s27;
  logic clk = 0, rst_n = 0, en = 0;
  logic a, b, c, d, y;
  logic [2:0] state;
  int checks = 0, failures = 0;

  cut_s27 dut (.*);

  always #5 clk = ~clk;

  // reference: G0=D, G1=B, G2=A, G3=C, G5=Q0, G6=Q2, G7=Q1, G17=Y
  logic g5, g6, g7;
  function automatic logic [3:0] ref_next(logic g0, g1, g2, g3, logic s5, s6, s7);
    logic g14, g8, g12, g13, g15, g16, g9, g11, g10, g17;
    g14 = !g0;
    g12 = !(g1 || s7);
    g8  = g14 && s6;
    g15 = g12 || g8;
    g16 = g3 || g8;
    g9  = !(g16 && g15);
    g11 = !(s5 || g9);
    g10 = !(g14 || g11);
    g13 = !(g2 || g12);
    g17 = !g11;
    return {g17, g10, g11, g13};  // {Y, next G5, next G6, next G7}
  endfunction

  initial begin
    {a, b, c, d} = '0;
    g5 = 0; g6 = 0; g7 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] r;
      @(negedge clk);
      {a, b, c, d} = 4'($urandom);
      en = ($urandom % 4) != 0;
      if (n == 1000) rst_n = 0;
      if (n == 1002) rst_n = 1;
      #1;
      r = ref_next(d, b, a, c, g5, g6, g7);
      checks++;
      if (y !== r[3]) begin
        failures++;
        $display("FAIL n=%0d y=%b exp=%b", n, y, r[3]);
      end
      @(posedge clk); #1;
      if (!rst_n) begin g5 = 0; g6 = 0; g7 = 0; end
      else if (en) begin g5 = r[2]; g6 = r[1]; g7 = r[0]; end
      checks++;
      if (state !== {g6, g7, g5}) begin
        failures++;
        $display("FAIL n=%0d state=%b exp=%b", n, state, {g6, g7, g5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
