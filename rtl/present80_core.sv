// present80_core: PRESENT-80 block cipher, encryption only, one round per clock.
//
// PRESENT is a substitution-permutation network on a 64-bit block with an
// 80-bit key and 31 rounds. Each round XORs the round key (the top 64 bits of the
// key register) into the state, passes the state through 16 copies of a 4-bit
// S-box and then through a fixed bit permutation (bit i moves to 16*i mod 63,
// bit 63 stays). The key register is updated in the same clock: rotated left by
// 61 bits, its top nibble passed through the S-box, and the 5-bit round counter
// XORed into bits [19:15]. A last key XOR after round 31 gives the ciphertext.
//
// Interface: pulse ld for one clock with pt and key valid. The state and key
// registers load in that clock, the 31 rounds follow in the next 31 clocks, and
// the clock after them registers ct and raises done: 33 clocks from the ld clock
// to done, which is the hardware cost of 33 cycles per encryption the platform
// was measured with. done and ct hold until the next ld. rst is synchronous.
//
// The round structure (key mixing by XOR, S-box layer, permutation layer, key
// schedule of a 61-bit rotation, one S-box and a round counter) follows the
// cipher's published structure; the S-box values and the permutation are those of
// the PRESENT specification. Loading in the ld clock and registering the output
// in an extra clock is this design's choice, made to match 33 cycles.
module present80_core #(
  parameter int unsigned ROUNDS = 31
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ld,
  input  logic [79:0] key,
  input  logic [63:0] pt,
  output logic [63:0] ct,
  output logic        done
);

  localparam int unsigned RCW = $clog2(ROUNDS + 2);

  logic [63:0]    state_q;
  logic [79:0]    key_q;
  logic [RCW-1:0] rc_q;       // round number of the round done in this clock
  logic           running_q;

  function automatic logic [3:0] sbox4(logic [3:0] x);
    case (x)
      4'h0: return 4'hC;  4'h1: return 4'h5;  4'h2: return 4'h6;  4'h3: return 4'hB;
      4'h4: return 4'h9;  4'h5: return 4'h0;  4'h6: return 4'hA;  4'h7: return 4'hD;
      4'h8: return 4'h3;  4'h9: return 4'hE;  4'hA: return 4'hF;  4'hB: return 4'h8;
      4'hC: return 4'h4;  4'hD: return 4'h7;  4'hE: return 4'h1;  default: return 4'h2;
    endcase
  endfunction

  function automatic logic [63:0] s_layer(logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 16; i++) r[4*i +: 4] = sbox4(s[4*i +: 4]);
    return r;
  endfunction

  function automatic logic [63:0] p_layer(logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 63; i++) r[(16*i) % 63] = s[i];
    r[63] = s[63];
    return r;
  endfunction

  function automatic logic [79:0] key_update(logic [79:0] k, logic [4:0] rc);
    logic [79:0] r;
    r = {k[18:0], k[79:19]};            // rotate left by 61
    r[79:76] = sbox4(r[79:76]);
    r[19:15] = r[19:15] ^ rc;
    return r;
  endfunction

  logic [63:0] round_out;
  logic [79:0] key_next;

  always_comb begin
    round_out = p_layer(s_layer(state_q ^ key_q[79:16]));
    key_next  = key_update(key_q, rc_q[4:0]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= '0;
      key_q     <= '0;
      rc_q      <= '0;
      running_q <= 1'b0;
      ct        <= '0;
      done      <= 1'b0;
    end else if (ld) begin
      state_q   <= pt;
      key_q     <= key;
      rc_q      <= RCW'(1);
      running_q <= 1'b1;
      done      <= 1'b0;
    end else if (running_q) begin
      if (rc_q <= RCW'(ROUNDS)) begin
        state_q <= round_out;
        key_q   <= key_next;
        rc_q    <= rc_q + RCW'(1);
      end else begin
        ct        <= state_q ^ key_q[79:16];
        done      <= 1'b1;
        running_q <= 1'b0;
      end
    end
  end

endmodule
