// tb_events: self-checking test of the events section.
//
// Toggles the PHY level inputs and checks that each edge gives exactly one
// pulse on the matching event output two to three clocks later, that the
// event register latches network and internal events, that write-one-to-clear
// clears only the written bits, and that irq follows the mask.
module tb_events;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, rx_frame = 0, tx_ready = 0, cca = 0;
  logic [NUM_EVENTS-1:0] int_ev = 0, ev_clr = 0, ev_mask = 0, ev_status;
  logic sof, eof, sot, eot, cca_clear, cca_busy, irq;
  int checks = 0, failures = 0;
  int n_sof = 0, n_eof = 0, n_sot = 0, n_eot = 0, n_cc = 0;

  events dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_sof += int'(sof); n_eof += int'(eof); n_sot += int'(sot); n_eot += int'(eot); n_cc += int'(cca_clear);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // wait for a pulse on the selected output within 4 clocks
  task automatic expect_pulse(input int which, input string s);
    int seen = 0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      case (which)
        0: seen += int'(sof); 1: seen += int'(eof); 2: seen += int'(sot);
        3: seen += int'(eot); default: seen += int'(cca_clear);
      endcase
    end
    check(seen == 1, $sformatf("%s pulses %0d", s, seen));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    rx_frame = 1; expect_pulse(0, "sof");
    rx_frame = 0; expect_pulse(1, "eof");
    tx_ready = 1; expect_pulse(2, "sot");
    tx_ready = 0; expect_pulse(3, "eot");
    cca = 1; repeat (4) @(negedge clk);
    check(cca_busy, "cca busy level");
    cca = 0; expect_pulse(4, "cca clear");
    check(n_sof == 1 && n_eof == 1 && n_sot == 1 && n_eot == 1 && n_cc == 1, "single pulses");
    check(ev_status[EV_SOF] && ev_status[EV_EOF] && ev_status[EV_SOT] && ev_status[EV_EOT] &&
          ev_status[EV_CCA_CLEAR], "network events latched");
    int_ev[EV_TX_UNDER] = 1; @(negedge clk); int_ev = '0;
    check(ev_status[EV_TX_UNDER], "internal event latched");
    check(!irq, "no irq when masked");
    ev_mask[EV_TX_UNDER] = 1; #1;
    check(irq, "irq when unmasked");
    ev_clr[EV_TX_UNDER] = 1; @(negedge clk); ev_clr = '0;
    check(!ev_status[EV_TX_UNDER] && ev_status[EV_SOF] && !irq, "write one to clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
