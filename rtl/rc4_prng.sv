// rc4_prng: pseudo-random number generator state machine (WEP keystream).
//
// Generates the bytes that the XOR function combines with frame data. The
// generator is RC4, the cipher behind IEEE 802.11 WEP. A one-cycle `init`
// takes the seed `key` (KEY_BYTES bytes, byte 0 in bits 7:0; for WEP the
// 24-bit IV followed by the secret key) and runs the key schedule: one cycle to
// set S[i]=i, then 256 cycles of j += S[i] + key[i mod KEY_BYTES], swap. The
// generator then prepares the first keystream byte (two cycles: swap, then
// output lookup) and raises `ready` with the byte on `ks`. A `next` pulse while
// `ready` consumes it; the following byte is ready two cycles later. `init` at
// any time restarts the schedule. The state array is held in flip-flops so one
// schedule step fits in one clock. The document gives only a key-fed
// pseudo-random generator run by a state machine; RC4, the timing and the seed
// length are this design's choices.
module rc4_prng #(
  parameter int unsigned KEY_BYTES = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic [8*KEY_BYTES-1:0] key,
  input  logic                   next,
  output logic [7:0]             ks,
  output logic                   ready
);
  typedef enum logic [2:0] {S_IDLE, S_FILL, S_KSA, S_SWAP, S_OUT, S_READY} state_e;
  state_e state;

  logic [7:0] s [256];
  logic [7:0] i, j;
  logic [8*KEY_BYTES-1:0] key_q;
  logic [$clog2(KEY_BYTES+1)-1:0] kidx;

  logic [7:0] si, j_ksa, j_gen, i_gen;
  logic [7:0] key_byte;

  always_comb begin
    key_byte = key_q[8*kidx +: 8];
    si       = s[i];
    j_ksa    = j + si + key_byte;
    i_gen    = i + 8'd1;
    j_gen    = j + s[i_gen];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; i <= '0; j <= '0; kidx <= '0; ks <= '0; key_q <= '0;
      for (int k = 0; k < 256; k++) s[k] <= 8'(k);
    end else if (init) begin
      key_q <= key;
      state <= S_FILL;
    end else begin
      case (state)
        S_IDLE: ;
        S_FILL: begin
          for (int k = 0; k < 256; k++) s[k] <= 8'(k);
          i <= '0; j <= '0; kidx <= '0;
          state <= S_KSA;
        end
        S_KSA: begin
          s[i]     <= s[j_ksa];
          s[j_ksa] <= si;
          j        <= j_ksa;
          kidx     <= (kidx == ($clog2(KEY_BYTES+1))'(KEY_BYTES - 1)) ? '0 : kidx + 1'b1;
          i        <= i + 8'd1;
          if (i == 8'd255) begin
            i <= '0; j <= '0;
            state <= S_SWAP;
          end
        end
        S_SWAP: begin        // i = i+1; j = j+S[i]; swap
          i          <= i_gen;
          j          <= j_gen;
          s[i_gen]   <= s[j_gen];
          s[j_gen]   <= s[i_gen];
          state      <= S_OUT;
        end
        S_OUT: begin         // output S[S[i]+S[j]]
          ks    <= s[8'(s[i] + s[j])];
          state <= S_READY;
        end
        S_READY: if (next) state <= S_SWAP;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_READY);
endmodule
