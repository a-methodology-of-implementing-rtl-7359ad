// events: the events section.
//
// Brings the PHY's level signals into the system clock domain (two flip-flops
// each) and turns their edges into one-cycle event pulses for the state
// machines: rising/falling edge of `rx_frame` = Start/End of Frame, rising/
// falling edge of `tx_ready` = Start/End of Transmission, falling edge of `cca`
// (channel busy) = channel clear. `cca_busy` is the synchronised level.
// These network events and the internal ones (`int_ev`, one pulse per event
// from the TSF timer, the DMA and the state machines) are collected, by the
// numbering of mac_pkg::event_e, in the event register `ev_status`: a bit is
// set by its event and cleared by a one in `ev_clr` from the processor. `irq`
// is high while any unmasked bit is set. Pulses appear two clock edges after a
// PHY edge, then latch one edge later. Which events exist follows the document;
// synchronisers, edge polarity and the write-one-to-clear register are this
// design's choices.
module events
  import mac_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rx_frame,
  input  logic                  tx_ready,
  input  logic                  cca,
  input  logic [NUM_EVENTS-1:0] int_ev,
  input  logic [NUM_EVENTS-1:0] ev_clr,
  input  logic [NUM_EVENTS-1:0] ev_mask,
  output logic                  sof,
  output logic                  eof,
  output logic                  sot,
  output logic                  eot,
  output logic                  cca_clear,
  output logic                  cca_busy,
  output logic [NUM_EVENTS-1:0] ev_status,
  output logic                  irq
);
  logic [2:0] rxf_s, txr_s, cca_s;   // [0],[1] synchroniser, [2] previous
  logic [NUM_EVENTS-1:0] net_ev, all_ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxf_s <= '0; txr_s <= '0; cca_s <= '0;
    end else begin
      rxf_s <= {rxf_s[1:0], rx_frame};
      txr_s <= {txr_s[1:0], tx_ready};
      cca_s <= {cca_s[1:0], cca};
    end
  end

  always_comb begin
    sof       =  rxf_s[1] && !rxf_s[2];
    eof       = !rxf_s[1] &&  rxf_s[2];
    sot       =  txr_s[1] && !txr_s[2];
    eot       = !txr_s[1] &&  txr_s[2];
    cca_clear = !cca_s[1] &&  cca_s[2];
    cca_busy  =  cca_s[1];
    net_ev = '0;
    net_ev[EV_SOF]       = sof;
    net_ev[EV_EOF]       = eof;
    net_ev[EV_SOT]       = sot;
    net_ev[EV_EOT]       = eot;
    net_ev[EV_CCA_CLEAR] = cca_clear;
    all_ev = net_ev | int_ev;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ev_status <= '0;
    else        ev_status <= (ev_status & ~ev_clr) | all_ev;
  end

  assign irq = |(ev_status & ev_mask);
endmodule
