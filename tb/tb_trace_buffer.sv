// tb_trace_buffer: writes 2.5 buffers' worth of random words (with gaps),
// checks the write pointer, last address and wrap flag, reads every word
// back through both ports (one-clock read latency) and checks that the buffer
// holds the most recent DEPTH samples.
module tb_trace_buffer;
  localparam int W = 12, D = 16, AW = 4;
  logic clk = 0, rst_n = 0;
  logic we = 0, re_a = 0, re_b = 0;
  logic [W-1:0] wdata = '0, rdata_a, rdata_b;
  logic [AW-1:0] waddr, last_addr, raddr_a = '0, raddr_b = '0;
  logic wrapped, rvalid_a, rvalid_b;
  int checks = 0, failures = 0;
  logic [W-1:0] model [D];
  int nwr = 0;

  trace_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (nwr < 40) begin
      @(negedge clk);
      chk(waddr == AW'(nwr % D), "write pointer");
      chk(wrapped == (nwr >= D), "wrap flag");
      we = ($urandom % 4) != 0;
      wdata = W'($urandom);
      if (we) begin
        model[nwr % D] = wdata;
        @(negedge clk);
        chk(last_addr == AW'(nwr % D), "last address");
        nwr++;
        we = 0;
      end else begin
        we = 0;
      end
    end
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      re_a = 1; raddr_a = AW'(i);
      re_b = 1; raddr_b = AW'(D - 1 - i);
      @(negedge clk);
      re_a = 0; re_b = 0;
      chk(rvalid_a && rdata_a == model[i], "port A data");
      chk(rvalid_b && rdata_b == model[D - 1 - i], "port B data");
      @(negedge clk);
      chk(!rvalid_a && !rvalid_b, "valid drops");
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
