// sync_fifo: the 128-byte FIFO of the receive and of the transmit section.
//
// A circular buffer of DEPTH words of WIDTH bits with show-ahead read: `rdata`
// is the oldest word whenever `empty` is low, and `rd` drops it. `wr` stores
// `wdata` at the tail. Writing when full and reading when empty are protocol
// errors and are asserted against; the users check `full`/`empty` first.
// `clr` flushes the contents. `count` gives the occupancy. The 128-byte depth is
// the document's figure for IEEE 802.11 at up to 11 Mbit/s; the single-clock
// organisation is this design's choice (the network side runs on bit strobes).
// The assertions are disabled during reset with `disable iff (!rst_n)`, which
// makes a linter see `rst_n` used both as an asynchronous reset and in a
// clocked expression; that use is in the checks only, not in the logic.
module sync_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     wr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rd,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else if (clr) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else begin
      if (wr && !full) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (rd && !empty) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      case ({wr && !full, rd && !empty})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assign rdata = mem[rptr];
  assign full  = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign empty = (count == '0);

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd && empty));
endmodule
