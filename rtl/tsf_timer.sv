// tsf_timer: timing synchronisation function (TSF) timer.
//
// A 64-bit counter of microseconds, the protocol-defined time base of IEEE
// 802.11. A prescaler divides the system clock (CLK_MHZ) down to one tick per
// microsecond. The processor can overwrite either half (`wr_lo`/`wr_hi` with
// `wdata`), which restarts the prescaler. `cmp` is a compare value: `match`
// pulses for one cycle when the counter steps onto it, which is the TSF event
// passed to the events section. The document names the TSF register as the
// register for synchronising network events; the microsecond unit is IEEE
// 802.11's and the compare event is this design's choice.
module tsf_timer #(
  parameter int unsigned CLK_MHZ = 44
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_lo,
  input  logic        wr_hi,
  input  logic [31:0] wdata,
  input  logic [63:0] cmp,
  output logic [63:0] tsf,
  output logic        match
);
  localparam int unsigned PW = (CLK_MHZ > 1) ? $clog2(CLK_MHZ) : 1;
  logic [PW-1:0] pre;
  logic          tick;

  assign tick = (pre == PW'(CLK_MHZ - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; tsf <= '0; match <= 1'b0;
    end else begin
      match <= 1'b0;
      if (wr_lo || wr_hi) begin
        pre <= '0;
        if (wr_lo) tsf[31:0]  <= wdata;
        if (wr_hi) tsf[63:32] <= wdata;
      end else begin
        pre <= tick ? '0 : pre + 1'b1;
        if (tick) begin
          tsf <= tsf + 64'd1;
          if (tsf + 64'd1 == cmp) match <= 1'b1;
        end
      end
    end
  end
endmodule
