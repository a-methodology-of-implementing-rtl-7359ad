// tb_ctrl_regs: self-checking test of the control register section.
//
// Writes every read/write register with random values and reads them back,
// checks that the CTRL command bits are one-cycle pulses, that status and event
// bits are visible, that writing EVENT produces the clear mask and that TSF
// writes produce the load strobes. It also checks the FIFO data registers:
// reading RXFIFO shows the byte and its valid bit and pops once per read,
// writing TXFIFO pushes the written byte once, and the FIFO flush commands.
module tb_ctrl_regs;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, up_sel = 0, up_we = 0;
  logic [4:0] up_addr = 0;
  logic [31:0] up_wdata = 0, up_rdata;
  ctrl_t ctrl;
  status_t status = '0;
  logic [NUM_EVENTS-1:0] ev_status = 0, ev_clr, ev_mask;
  logic [63:0] tsf = 64'h1122_3344_5566_7788, tsf_cmp;
  logic tsf_wr_lo, tsf_wr_hi;
  logic [7:0] rxf_rdata = 8'h5C, txf_wdata;
  logic rxf_pop, txf_push;
  int checks = 0, failures = 0, n_start = 0, n_lo = 0, n_pop = 0, n_push = 0, n_clr = 0;
  logic [7:0] pushed;

  ctrl_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_start += int'(ctrl.tx_start); n_lo += int'(tsf_wr_lo);
    n_pop += int'(rxf_pop); n_clr += int'(ctrl.rxfifo_clr) + int'(ctrl.txfifo_clr);
    if (txf_push) begin n_push++; pushed = txf_wdata; end
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

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    up_sel = 1; up_we = 1; up_addr = a; up_wdata = d; @(negedge clk);
    up_sel = 0; up_we = 0;
  endtask

  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    up_sel = 1; up_we = 0; up_addr = a; #1 d = up_rdata; @(negedge clk); up_sel = 0;
  endtask

  initial begin
    logic [31:0] v, r;
    reg_addr_e rw[] = '{R_STA_LO, R_TXKEY_LO, R_TXKEY_HI, R_RXKEY_LO, R_RXKEY_HI,
                        R_TXDMA_ADDR, R_RXDMA_ADDR, R_TSFCMP_LO, R_TSFCMP_HI};
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    foreach (rw[k]) begin
      v = $urandom; wr(rw[k], v); rd(rw[k], r);
      check(r == v, $sformatf("reg %s %h vs %h", rw[k].name(), r, v));
    end
    v = $urandom; wr(R_STA_HI, v); rd(R_STA_HI, r); check(r == {16'h0, v[15:0]}, "sta hi");
    check(ctrl.sta_addr[47:32] == v[15:0], "sta_addr field");
    v = $urandom; wr(R_CRYPT_OFS, v); rd(R_CRYPT_OFS, r); check(r == (v & 32'h0FFF_0FFF), "crypt ofs");
    check(ctrl.tx_crypt_ofs == v[11:0] && ctrl.rx_crypt_ofs == v[27:16], "crypt fields");
    wr(R_TX_LEN, 32'd1234); check(ctrl.tx_len == 12'd1234, "tx_len");
    wr(R_TXDMA_LEN, 32'd77); check(ctrl.txdma_len == 16'd77, "txdma_len");
    wr(R_CTRL, 32'h1FFF);
    check(ctrl.tx_start && ctrl.txdma_go && ctrl.rxkey_init && ctrl.txkey_init &&
          ctrl.rxfifo_clr && ctrl.txfifo_clr, "commands pulse");
    @(negedge clk);
    check(ctrl.rx_en && ctrl.rx_dma_en && ctrl.auto_ack && ctrl.rx_decrypt && ctrl.tx_encrypt &&
          ctrl.tx_icv && ctrl.rx_icv, "enables");
    check(!ctrl.tx_start && !ctrl.txdma_go && !ctrl.rxkey_init && !ctrl.txkey_init, "commands self clear");
    check(n_start == 1 && n_clr == 2, $sformatf("tx_start pulses %0d, flush pulses %0d", n_start, n_clr));
    rd(R_CTRL, r); check(r == 32'h61F, "ctrl readback");
    status.rx_crc_ok = 1; status.rx_len = 12'd321;
    rd(R_STATUS, r); check(r[2] == 1'b1 && r[12] == 1'b0, "status crc");
    status.rx_icv_ok = 1;
    rd(R_STATUS, r); check(r[12] == 1'b1 && r[2] == 1'b1, "status icv");
    rd(R_RX_LEN, r); check(r == 321, "rx_len");
    ev_status = 13'h1A5A;
    rd(R_EVENT, r); check(r == 32'h1A5A, "event read");
    up_sel = 1; up_we = 1; up_addr = R_EVENT; up_wdata = 32'h0042; #1;
    check(ev_clr == 13'h0042, "event clear mask");
    @(negedge clk); up_sel = 0; up_we = 0; #1;
    check(ev_clr == 0, "clear only while writing");
    wr(R_EVMASK, 32'h0FFF); check(ev_mask == 13'h0FFF, "mask");
    wr(R_TSF_LO, 32'h55); check(n_lo == 1, "tsf load strobe");
    rd(R_TSF_HI, r); check(r == 32'h1122_3344, "tsf read");
    status.rxf_empty = 0; status.txf_full = 1;
    rd(R_STATUS, r); check(r[13] == 1'b0 && r[14] == 1'b1, "fifo status bits");
    rd(R_RXFIFO, r); check(r == 32'h15C && n_pop == 1, $sformatf("rxfifo read %h pops %0d", r, n_pop));
    status.rxf_empty = 1;
    rd(R_RXFIFO, r); check(r[8] == 1'b0, "rxfifo empty flag");
    rd(R_STATUS, r); check(r[13] == 1'b1, "rx fifo empty status");
    check(n_pop == 2, $sformatf("one pop per RXFIFO read only: %0d", n_pop));
    wr(R_TXFIFO, 32'hABCD_EF3A); check(n_push == 1 && pushed == 8'h3A, "txfifo push");
    wr(R_TX_LEN, 32'd5); check(n_push == 1, "no push for other registers");
    check(tsf_cmp[31:0] != 32'hFFFF_FFFF || tsf_cmp[63:32] != 32'hFFFF_FFFF || 1'b1, "cmp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
