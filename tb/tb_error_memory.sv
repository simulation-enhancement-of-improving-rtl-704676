// tb_error_memory: stores more records than it holds; checks count, that the
// first DEPTH records are kept in order, the overflow flag, the one-clock
// read latency and clear.
module tb_error_memory;
  localparam int RW = 16, D = 8, AW = 3;
  logic clk = 0, rst_n = 0;
  logic clear = 0, we = 0, re = 0, rvalid, overflow;
  logic [RW-1:0] wrec = '0, rrec;
  logic [AW-1:0] raddr = '0;
  logic [AW:0] count;
  int checks = 0, failures = 0;
  logic [RW-1:0] sent [12];

  error_memory #(.REC_W(RW), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      chk(count == 0 && !overflow, "empty");
      for (int i = 0; i < 12; i++) begin
        @(negedge clk);
        sent[i] = RW'($urandom);
        we = 1; wrec = sent[i];
        @(negedge clk);
        we = 0;
        chk(count == ((i + 1 > D) ? D : i + 1), "count");
        chk(overflow == (i + 1 > D), "overflow");
      end
      for (int i = 0; i < D; i++) begin
        @(negedge clk);
        re = 1; raddr = AW'(i);
        @(negedge clk);
        re = 0;
        chk(rvalid && rrec == sent[i], "record kept in order");
      end
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
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
