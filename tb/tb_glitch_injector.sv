// tb_glitch_injector: random words, ticks, modes and positions; a reference
// model of the arm-then-hit rule predicts which write is corrupted and with
// which mask (one, two or three adjacent bits from pos, clipped at 12).
module tb_glitch_injector;
  import hd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tick = 0, wr = 0, hit;
  glitch_mode_t mode = GL_NONE;
  logic [3:0] pos = 4'd1;
  code_t code_in = '0, code_out, pattern;
  int checks = 0, failures = 0;
  int hits [4] = '{0, 0, 0, 0};

  glitch_injector dut (.*);

  always #5 clk = ~clk;

  logic armed_ref = 0;

  function automatic code_t ref_mask(glitch_mode_t m, logic [3:0] p);
    code_t mk;
    int n;
    n = int'(m);
    mk = '0;
    for (int k = 0; k < n; k++) if (int'(p) + k >= 1 && int'(p) + k <= 12) mk[int'(p) + k] = 1'b1;
    return mk;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic exp_hit;
      code_t exp_mask;
      @(negedge clk);
      tick    = ($urandom % 5) == 0;
      wr      = ($urandom % 3) == 0;
      if (n % 500 == 0) mode = glitch_mode_t'(n / 500 % 4);
      pos     = 4'(1 + $urandom % 12);
      code_in = code_t'($urandom);
      #1;
      exp_mask = ref_mask(mode, pos);
      exp_hit  = armed_ref && wr && (exp_mask != '0);
      checks++;
      if (hit !== exp_hit || code_out !== (exp_hit ? code_in ^ exp_mask : code_in) ||
          pattern !== exp_mask) begin
        failures++;
        $display("FAIL n=%0d mode=%0d pos=%0d hit=%b/%b out=%b pat=%b/%b", n, mode, pos,
                 hit, exp_hit, code_out, pattern, exp_mask);
      end
      if (exp_hit) hits[int'(mode)]++;
      if (exp_hit)          armed_ref = tick;
      else if (tick)        armed_ref = 1'b1;
      else if (mode == GL_NONE) armed_ref = 1'b0;
    end
    for (int m = 1; m < 4; m++) begin
      checks++;
      if (hits[m] == 0) begin failures++; $display("FAIL mode %0d never hit", m); end
    end
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
