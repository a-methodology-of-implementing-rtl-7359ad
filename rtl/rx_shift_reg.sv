// rx_shift_reg: serial-to-parallel shift register of the receiver.
//
// Takes one bit per `bit_en` strobe, least significant bit first, and after
// eight bits presents the byte on `byte_out` with a one-cycle `byte_valid`
// pulse (in the cycle after the eighth strobe). `clr` (Start of Frame) resets
// the bit counter so bytes align with the frame. The document places the shift
// register between the bit-serial and the parallel functions; LSB-first order
// and the realignment input are this design's (IEEE 802.11) choices.
module rx_shift_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       bit_en,
  input  logic       din,
  output logic [7:0] byte_out,
  output logic       byte_valid
);
  logic [7:0] sr;
  logic [2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; cnt <= '0; byte_out <= '0; byte_valid <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      if (clr) begin
        cnt <= '0;
      end else if (bit_en) begin
        sr  <= {din, sr[7:1]};
        cnt <= cnt + 3'd1;
        if (cnt == 3'd7) begin
          byte_out   <= {din, sr[7:1]};
          byte_valid <= 1'b1;
        end
      end
    end
  end
endmodule
