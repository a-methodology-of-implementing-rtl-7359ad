// rx_dma_engine: receive DMA engine.
//
// `start` loads the buffer address and clears the byte count. While `run` is
// high and the receive FIFO holds data, it writes the FIFO head to memory, one
// byte per request/acknowledge on the receive memory data path (`mem_req`,
// `mem_addr`, `mem_wdata` held until `mem_ack`), popping the FIFO and advancing
// the address in the acknowledge cycle. `idle` is high when no write is
// outstanding; `count` is the number of bytes written since `start`. Moving
// data from the FIFO to memory without the processor follows the document; the
// byte-wide request/acknowledge port is this design's choice.
module rx_dma_engine #(
  parameter int unsigned AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base_addr,
  input  logic          run,
  input  logic          fifo_empty,
  input  logic [7:0]    fifo_rdata,
  output logic          fifo_rd,
  output logic          mem_req,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  input  logic          mem_ack,
  output logic          idle,
  output logic [15:0]   count
);
  assign fifo_rd   = mem_req && mem_ack;
  assign mem_wdata = fifo_rdata;
  assign idle      = !mem_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_req <= 1'b0; mem_addr <= '0; count <= '0;
    end else if (start) begin
      mem_req <= 1'b0; mem_addr <= base_addr; count <= '0;
    end else if (mem_req) begin
      if (mem_ack) begin
        mem_req  <= 1'b0;
        mem_addr <= mem_addr + 1'b1;
        count    <= count + 1'b1;
      end
    end else if (run && !fifo_empty) begin
      mem_req <= 1'b1;
    end
  end
endmodule
