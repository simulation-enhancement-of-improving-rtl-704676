// trace_buffer: on-chip memory that records the history of traced words.
//
// A circular buffer of DEPTH words of WIDTH bits. Each write (we = 1) stores
// wdata at the write pointer and advances it, wrapping at DEPTH, so the
// buffer always holds the most recent DEPTH samples; wrapped goes high once
// the pointer has wrapped at least once. last_addr is the address of the most
// recent write. Two synchronous read ports: port A and port B each return
// mem[addr] one clock after their enable, with a matching valid flag, so a
// checker can read back the word just written while a host dumps the buffer.
// Reading the address written in the same cycle returns the old contents.
// DEPTH is this design's choice; the original description says only that the history is
// of limited size. Pointer and flags are reset by rst_n; the storage is not.
module trace_buffer #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [AW-1:0]    waddr,
  output logic [AW-1:0]    last_addr,
  output logic             wrapped,
  input  logic             re_a,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  output logic             rvalid_a,
  input  logic             re_b,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b,
  output logic             rvalid_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re_a) rdata_a <= mem[raddr_a];
    if (re_b) rdata_b <= mem[raddr_b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr     <= '0;
      last_addr <= '0;
      wrapped   <= 1'b0;
      rvalid_a  <= 1'b0;
      rvalid_b  <= 1'b0;
    end else begin
      rvalid_a <= re_a;
      rvalid_b <= re_b;
      if (we) begin
        last_addr <= waddr;
        if (waddr == AW'(DEPTH - 1)) begin
          waddr   <= '0;
          wrapped <= 1'b1;
        end else begin
          waddr <= waddr + 1'b1;
        end
      end
    end
  end
endmodule
