// tb_addr_decode: self-checking test of the receive address decoder.
//
// Plays MAC headers whose address 1 is the station address, another unicast
// address, the broadcast address or a multicast address, and checks the three
// flags against the classification computed in the testbench.
module tb_addr_decode;
  localparam int IDX_W = 12;
  logic clk = 0, rst_n = 0, clr = 0, byte_valid = 0;
  logic [IDX_W-1:0] byte_idx = 0;
  logic [7:0] byte_in = 0;
  logic [47:0] sta_addr = 48'h5634_1200_1E02;   // byte 0 = 0x02 (individual)
  logic addr_done, unicast, broadcast, multicast;
  int checks = 0, failures = 0;

  addr_decode #(.ADDR_OFFSET(4), .IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] a;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 80; t++) begin
      case (t % 4)
        0: a = sta_addr;
        1: a = {$urandom, $urandom} & ~48'h1;
        2: a = '1;
        default: a = {$urandom, $urandom} | 48'h1;
      endcase
      clr = 1; @(negedge clk); clr = 0;
      for (int k = 0; k < 24; k++) begin
        byte_idx = IDX_W'(k);
        byte_in  = (k >= 4 && k < 10) ? a[8*(k-4) +: 8] : 8'($urandom);
        byte_valid = 1; @(negedge clk); byte_valid = 0;
        if (k == 3) begin
          checks++; if (addr_done) begin failures++; $display("FAIL: done early"); end
        end
      end
      checks++;
      if (!addr_done || unicast != (a == sta_addr) || broadcast != (a == '1) ||
          multicast != (a[0] && a != '1)) begin
        failures++;
        $display("FAIL: a=%h u=%b b=%b m=%b", a, unicast, broadcast, multicast);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
