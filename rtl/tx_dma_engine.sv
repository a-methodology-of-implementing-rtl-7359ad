// tx_dma_engine: transmit DMA engine.
//
// On `start` it takes a memory byte address and a byte count and then reads
// the block, one byte per request/acknowledge on the transmit memory data path
// (`mem_req` held with `mem_addr` until `mem_ack`, `mem_rdata` valid with the
// acknowledge), writing each byte into the transmit FIFO in the acknowledge
// cycle. A read is only requested while the FIFO has room. `done` pulses when
// the count is reached; `busy` is high in between. Moving data from memory to
// the FIFO without the processor follows the document; the byte-wide
// request/acknowledge port is this design's choice.
module tx_dma_engine #(
  parameter int unsigned AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base_addr,
  input  logic [15:0]   length,
  input  logic          fifo_full,
  output logic          fifo_wr,
  output logic [7:0]    fifo_wdata,
  output logic          mem_req,
  output logic [AW-1:0] mem_addr,
  input  logic          mem_ack,
  input  logic [7:0]    mem_rdata,
  output logic          busy,
  output logic          done
);
  logic [15:0] left;

  assign busy       = (left != '0);
  assign fifo_wr    = mem_req && mem_ack;
  assign fifo_wdata = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; mem_addr <= '0; mem_req <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        mem_addr <= base_addr;
        left     <= length;
        if (length == '0) done <= 1'b1;
      end else if (mem_req) begin
        if (mem_ack) begin
          mem_req  <= 1'b0;
          mem_addr <= mem_addr + 1'b1;
          left     <= left - 1'b1;
          if (left == 16'd1) done <= 1'b1;
        end
      end else if (busy && !fifo_full) begin
        mem_req <= 1'b1;
      end
    end
  end
endmodule
