// tx_dma_ctrl: transmit DMA engine control state machine.
//
// On the processor's `go` command it latches the programmed address and length,
// starts the transmit DMA engine, waits for the engine to finish and then
// pulses `done` (the transmit DMA event). `busy` covers the whole transfer; a
// command while busy is ignored. The document gives this machine the job of
// transferring a block from memory to the transmit FIFO; the command/done
// protocol is this design's choice.
module tx_dma_ctrl #(
  parameter int unsigned AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   len,
  input  logic          eng_done,
  output logic          eng_start,
  output logic [AW-1:0] eng_addr,
  output logic [15:0]   eng_len,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {IDLE, START, WAIT} state_e;
  state_e state;

  assign busy      = (state != IDLE);
  assign eng_start = (state == START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; eng_addr <= '0; eng_len <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (go) begin
          eng_addr <= addr; eng_len <= len; state <= START;
        end
        START: state <= WAIT;
        WAIT: if (eng_done) begin
          done <= 1'b1; state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
