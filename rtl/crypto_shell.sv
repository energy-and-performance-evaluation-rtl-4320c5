// crypto_shell: control shell around a block-cipher core.
//
// The processor reaches the core through three memory-mapped 32-bit registers
// (see crypto_pkg): instructions, data_out and data_in. The bus is only 32 bits
// wide, so the shell holds the key and the plaintext in registers that are
// filled one 32-bit word at a time (serial to parallel) and hands out the
// ciphertext one word at a time (parallel to serial). A small decoder executes
// each word written to the instructions register as a command:
//   KEY idx / PT idx  copy data_in into key / plaintext word idx
//   START             pulse ld to the core in the next clock (error if busy)
//   CT idx            copy ciphertext word idx into data_out
//   STATUS            copy {err, busy, done} into data_out, clear err
// A word index beyond the key, plaintext or ciphertext, an unknown opcode, or
// START while busy set the err flag and change nothing else.
//
// Interface: wr_ce/rd_ce are one-clock register strobes from the bus interface,
// rdata is the combinational read-back of the register rd_ce selects. ld is
// registered, one clock after the START write. busy is high from the clock after
// START up to the clock in which the core raises done; in that clock the status
// word already reads done. The three registers, the serial/parallel conversion and a
// decoder for commands from a software driver follow the platform's
// description; the command encoding and the status word are this design's own.
module crypto_shell
  import crypto_pkg::*;
#(
  parameter int unsigned KEY_W = 128,
  parameter int unsigned BLK_W = 128
) (
  input  logic                clk,
  input  logic                rst,
  // register side of the bus interface
  input  logic [NUM_REGS-1:0] wr_ce,
  input  logic [NUM_REGS-1:0] rd_ce,
  input  logic [31:0]         wdata,
  output logic [31:0]         rdata,
  // core side
  output logic [KEY_W-1:0]    key,
  output logic [BLK_W-1:0]    pt,
  output logic                ld,
  input  logic [BLK_W-1:0]    ct,
  input  logic                done
);

  localparam int unsigned KW = (KEY_W + 31) / 32;  // key words
  localparam int unsigned BW = (BLK_W + 31) / 32;  // block words

  logic [31:0]      instr_q;
  logic [31:0]      data_in_q;
  logic [31:0]      data_out_q;
  logic [32*KW-1:0] key_q;
  logic [32*BW-1:0] pt_q;
  logic             busy_q;
  logic             busy;     // busy_q, dropped already in the clock done arrives
  logic             err_q;

  opcode_e     op;
  logic [3:0]  idx;
  logic [32*BW-1:0] ct_wide;

  always_comb begin
    op      = opcode_e'(wdata[31:28]);
    idx     = wdata[3:0];
    ct_wide = (32*BW)'(ct);
    busy    = busy_q && !(done && !ld);
    key     = key_q[KEY_W-1:0];
    pt      = pt_q[BLK_W-1:0];
    rdata   = 32'h0;
    if (rd_ce[REG_INSTR])    rdata = instr_q;
    if (rd_ce[REG_DATA_OUT]) rdata = data_out_q;
    if (rd_ce[REG_DATA_IN])  rdata = data_in_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      instr_q    <= '0;
      data_in_q  <= '0;
      data_out_q <= '0;
      key_q      <= '0;
      pt_q       <= '0;
      busy_q     <= 1'b0;
      err_q      <= 1'b0;
      ld         <= 1'b0;
    end else begin
      ld <= 1'b0;
      if (busy_q && done && !ld) busy_q <= 1'b0;
      if (wr_ce[REG_DATA_IN]) data_in_q <= wdata;
      if (wr_ce[REG_INSTR]) begin
        instr_q <= wdata;
        case (op)
          OP_NOP: ;
          OP_KEY:
            if (32'(idx) < KW) key_q[32*idx +: 32] <= data_in_q;
            else               err_q <= 1'b1;
          OP_PT:
            if (32'(idx) < BW) pt_q[32*idx +: 32] <= data_in_q;
            else               err_q <= 1'b1;
          OP_START:
            if (!busy) begin
              ld     <= 1'b1;
              busy_q <= 1'b1;
            end else begin
              err_q <= 1'b1;
            end
          OP_CT:
            if (32'(idx) < BW) data_out_q <= ct_wide[32*idx +: 32];
            else               err_q <= 1'b1;
          OP_STATUS: begin
            data_out_q <= 32'({err_q, busy, done && !busy});
            err_q      <= 1'b0;
          end
          default: err_q <= 1'b1;
        endcase
      end
    end
  end

endmodule
