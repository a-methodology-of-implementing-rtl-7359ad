// net_clk_sync: brings a PHY bit clock and its data line into the system clock.
//
// The PHY's bit clock and data are each passed through two flip-flops. A rising
// edge of the synchronised clock gives a one-cycle `bit_en` strobe, and
// `data_s` is the data as it was at that edge (it went through the same delay).
// The data must be stable around the PHY clock's rising edge (the PHY changes
// it on the falling edge), and the system clock must run at least four times
// the bit rate. The strobe follows the PHY edge by two to three system clocks.
// Running the network side on strobes of one system clock is this design's
// choice; the document lets a state machine use either clock.
module net_clk_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic net_clk,
  input  logic net_data,
  output logic bit_en,
  output logic data_s
);
  logic [2:0] c_s;
  logic [1:0] d_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_s <= '0; d_s <= '0;
    end else begin
      c_s <= {c_s[1:0], net_clk};
      d_s <= {d_s[0], net_data};
    end
  end

  assign bit_en = c_s[1] && !c_s[2];
  assign data_s = d_s[1];
endmodule
