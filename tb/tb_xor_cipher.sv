// tb_xor_cipher: self-checking test of the parallel XOR function.
//
// Checks that with the enable set the output is data XOR keystream, that
// applying it twice restores the data (encrypt then decrypt), and that with the
// enable clear the data passes unchanged.
module tb_xor_cipher;
  logic [7:0] din, ks, dout, back;
  logic en;
  int checks = 0, failures = 0;

  xor_cipher dut  (.din, .ks, .en, .dout);
  xor_cipher dut2 (.din(dout), .ks, .en, .dout(back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      din = 8'($urandom); ks = 8'($urandom); en = 1'($urandom);
      #1;
      checks++;
      if (dout !== (en ? (din ^ ks) : din)) begin
        failures++; $display("FAIL: %h %h %b -> %h", din, ks, en, dout);
      end
      checks++;
      if (back !== din) begin failures++; $display("FAIL: round trip %h -> %h", din, back); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
