// tb_trigger_unit: free capture after reset, arm, a masked match, exactly
// POST_SAMPLES further samples with capture high, then capture low; re-arm
// restarts. Samples arrive on a random enable.
module tb_trigger_unit;
  localparam int W = 3, POST = 5;
  logic clk = 0, rst_n = 0;
  logic arm = 0, sample_en = 0;
  logic [W-1:0] value = 3'b101, mask = 3'b101, sample = '0;
  logic capture, fired, triggered, done;
  int checks = 0, failures = 0;

  trigger_unit #(.W(W), .POST_SAMPLES(POST)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(logic [W-1:0] s);
    @(negedge clk);
    sample_en = 1; sample = s;
    #1;
  endtask

  task automatic idle(int n);
    repeat (n) begin @(negedge clk); sample_en = 0; end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // not armed: a matching sample does not fire
    send(3'b101); chk(!fired && capture, "unarmed");
    idle(1);
    for (int round = 0; round < 2; round++) begin
      @(negedge clk); sample_en = 0; arm = 1;
      @(negedge clk); arm = 0;
      chk(capture && !triggered && !done, "armed state");
      send(3'b100); chk(!fired, "mismatch bit 0");
      send(3'b001); chk(!fired, "mismatch bit 2");
      idle(2);
      send(3'b111); chk(fired && capture, "masked match fires");   // bit 1 masked out
      for (int k = 0; k < POST; k++) begin
        idle($urandom % 3);
        send(3'b101);
        chk(capture && !fired, "post-trigger sample captured");
      end
      @(negedge clk); sample_en = 0; #1;
      chk(!capture && done && triggered, "capture stopped");
      send(3'b101); chk(!capture && !fired, "stays stopped");
      idle(1);
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
