// tx_shift_reg: parallel-to-serial shift register of the transmitter.
//
// `load` takes a byte while the register is empty (`need` high); its LSB appears
// on `dout` at once. Each `bit_en` strobe marks the bit on `dout` as taken by the
// PHY and moves to the next one; after eight strobes `need` rises again. The
// loader has the time until the next strobe to supply the following byte.
// `busy` is high while bits remain. Bit order (LSB first) follows IEEE 802.11;
// the document only places the register between parallel and serial functions.
module tx_shift_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       load,
  input  logic [7:0] din,
  input  logic       bit_en,
  output logic       dout,
  output logic       busy,
  output logic       need
);
  logic [7:0] sr;
  logic [3:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; left <= '0;
    end else if (clr) begin
      left <= '0;
    end else if (load && left == 4'd0) begin
      sr <= din; left <= 4'd8;
    end else if (bit_en && left != 4'd0) begin
      sr <= {1'b0, sr[7:1]}; left <= left - 4'd1;
    end
  end

  assign dout = sr[0];
  assign busy = (left != 4'd0);
  assign need = (left == 4'd0);
endmodule
