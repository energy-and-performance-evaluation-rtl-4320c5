// crypto_pkg: constants shared by the crypto coprocessor, its control shell and
// the platform: which cipher a coprocessor carries, the register map of the
// shell and the command set ("instruction set") its decoder understands.
//
// Register map, offsets from the coprocessor base address (default 0x8000_0000):
//   0x0 instructions  write: a command for the decoder; read: the last command
//   0x4 data_out      read: the word the last CT or STATUS command selected
//   0x8 data_in       write: the word the next KEY or PT command moves inward
// Command word: [31:28] opcode, [3:0] word index (word 0 = least significant
// 32 bits of the key, plaintext or ciphertext). The three registers and their
// offsets are the original platform's; the command encoding and the status bits
// are this design's own.
package crypto_pkg;

  typedef enum logic [0:0] {
    CIPHER_AES     = 1'b0,  // AES-128: 128-bit key, 128-bit block
    CIPHER_PRESENT = 1'b1   // PRESENT-80: 80-bit key, 64-bit block
  } cipher_e;

  // Register indices (address offset / 4).
  localparam int unsigned REG_INSTR    = 0;
  localparam int unsigned REG_DATA_OUT = 1;
  localparam int unsigned REG_DATA_IN  = 2;
  localparam int unsigned NUM_REGS     = 3;

  typedef enum logic [3:0] {
    OP_NOP    = 4'h0,  // do nothing
    OP_KEY    = 4'h1,  // key word[idx]       <= data_in
    OP_PT     = 4'h2,  // plaintext word[idx] <= data_in
    OP_START  = 4'h3,  // start one encryption of the loaded plaintext and key
    OP_CT     = 4'h4,  // data_out <= ciphertext word[idx]
    OP_STATUS = 4'h5   // data_out <= status word, then clear the error flag
  } opcode_e;

  // Status word bits.
  localparam int unsigned ST_DONE = 0;  // a result is ready
  localparam int unsigned ST_BUSY = 1;  // an encryption is running
  localparam int unsigned ST_ERR  = 2;  // an illegal command was seen

  function automatic logic [31:0] make_cmd(opcode_e op, logic [3:0] idx);
    return {op, 24'h0, idx};
  endfunction

  function automatic int unsigned key_width(cipher_e c);
    return (c == CIPHER_AES) ? 128 : 80;
  endfunction

  function automatic int unsigned block_width(cipher_e c);
    return (c == CIPHER_AES) ? 128 : 64;
  endfunction

endpackage
