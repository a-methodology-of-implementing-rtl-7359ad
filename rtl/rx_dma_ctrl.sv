// rx_dma_ctrl: receive DMA engine control state machine.
//
// With receive DMA enabled, a Start of Frame event starts the receive DMA
// engine at the programmed buffer address and lets it run, so the FIFO is
// drained to memory while the frame is still arriving. Once the receive state
// machine reports the end of the frame (`rx_done`) and the FIFO is empty with
// no write outstanding, `done` pulses (the receive DMA event) and the machine
// waits for the next frame. The document gives this machine the job of
// transferring a block of data to memory; one frame per buffer and the
// start/stop conditions are this design's choices.
module rx_dma_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic dma_en,
  input  logic sof,
  input  logic rx_done,
  input  logic fifo_empty,
  input  logic eng_idle,
  output logic eng_start,
  output logic eng_run,
  output logic busy,
  output logic done
);
  typedef enum logic [1:0] {IDLE, RUN, DRAIN} state_e;
  state_e state;

  assign eng_start = (state == IDLE) && dma_en && sof;
  assign eng_run   = (state != IDLE);
  assign busy      = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE:  if (eng_start) state <= RUN;
        RUN:   if (rx_done) state <= DRAIN;
        DRAIN: if (fifo_empty && eng_idle) begin
          done <= 1'b1; state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
