// error_memory: separate memory that keeps a record of every detected error.
//
// Each write (we = 1) stores one record: the trace-buffer address of the
// damaged word, its syndrome, the decoder's verdict and the FSM monitor's
// flag. Records are kept in arrival order from address 0; when the memory is
// full, further records are dropped and overflow is set, so the first
// DEPTH errors after reset or clear are preserved for analysis. count is the
// number of records stored. A synchronous read port returns record raddr one
// clock after re, with rvalid. clear (synchronous) empties it. The record
// layout, the depth and the keep-first policy are this design's choice; the original
// description says only that detected and corrected faults go to a separate
// memory.
module error_memory #(
  parameter int unsigned REC_W = 16,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             we,
  input  logic [REC_W-1:0] wrec,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [REC_W-1:0] rrec,
  output logic             rvalid,
  output logic [AW:0]      count,
  output logic             overflow
);
  logic [REC_W-1:0] mem [DEPTH];
  logic             full;

  assign full = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (we && !full && !clear) mem[count[AW-1:0]] <= wrec;
    if (re) rrec <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
      rvalid   <= 1'b0;
    end else begin
      rvalid <= re;
      if (clear) begin
        count    <= '0;
        overflow <= 1'b0;
      end else if (we) begin
        if (full) overflow <= 1'b1;
        else      count    <= count + 1'b1;
      end
    end
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
  a_overflow_full: assert property (@(posedge clk) disable iff (!rst_n) overflow |-> full);
endmodule
