// aes128_core: AES-128 block cipher (FIPS-197), encryption only, one round per
// clock with the round keys expanded on the fly.
//
// The ld clock loads the state with plaintext XOR key (the initial AddRoundKey)
// and keeps the key as round key 0. Each of the next 10 clocks derives the next
// round key from the current one (RotWord, SubWord, round constant) and applies
// one round (SubBytes, ShiftRows, MixColumns except in round 10, AddRoundKey) to
// the state. The clock after round 10 registers ct and raises done: 12 clocks
// from the ld clock to done, the 12 cycles per encryption of the platform the
// design reproduces. done and ct hold until the next ld. rst is synchronous.
//
// Interface: key, pt and ct are 128 bits with the first byte of the FIPS-197
// byte sequence in bits [127:120]. Only the function (AES-128 encryption), the
// port set (key, plaintext, ciphertext, ld, done, rst) and the cycle count come
// from the platform's description; the iterative one-round-per-clock structure
// with a computed S-box is this design's own choice.
module aes128_core #(
  parameter int unsigned ROUNDS = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic [127:0] ct,
  output logic         done
);

  import aes_pkg::*;

  localparam int unsigned RW = $clog2(ROUNDS + 2);

  logic [127:0]  state_q;
  logic [127:0]  rk_q;
  logic [7:0]    rcon_q;
  logic [RW-1:0] rnd_q;      // number of the round done in this clock
  logic          running_q;

  logic [127:0] rk_next;
  logic [127:0] sr;
  logic [127:0] round_out;

  always_comb begin
    rk_next   = next_round_key(rk_q, rcon_q);
    sr        = shift_rows(sub_bytes(state_q));
    round_out = ((rnd_q == RW'(ROUNDS)) ? sr : mix_columns(sr)) ^ rk_next;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= '0;
      rk_q      <= '0;
      rcon_q    <= '0;
      rnd_q     <= '0;
      running_q <= 1'b0;
      ct        <= '0;
      done      <= 1'b0;
    end else if (ld) begin
      state_q   <= pt ^ key;
      rk_q      <= key;
      rcon_q    <= 8'h01;
      rnd_q     <= RW'(1);
      running_q <= 1'b1;
      done      <= 1'b0;
    end else if (running_q) begin
      if (rnd_q <= RW'(ROUNDS)) begin
        state_q <= round_out;
        rk_q    <= rk_next;
        rcon_q  <= xtime(rcon_q);
        rnd_q   <= rnd_q + RW'(1);
      end else begin
        ct        <= state_q;
        done      <= 1'b1;
        running_q <= 1'b0;
      end
    end
  end

endmodule
