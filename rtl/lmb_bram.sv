// lmb_bram: true dual-port on-chip block RAM holding the processor's program
// and data, 32-bit words with byte write enables.
//
// Port A serves the instruction LMB, port B the data LMB. Each port reads and
// writes synchronously: with en high the addressed word is read (read-first:
// the value before a write in the same clock) and the bytes with we set are
// written at the clock edge; rdata holds the result from the clock after.
// When both ports write the same byte in the same clock, port B's value is kept.
// The default DEPTH of 256 words is the platform's 8 Kb of block RAM; the
// port arrangement and the write behaviour are this design's choice. The
// contents are not initialised.
module lmb_bram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A
  input  logic          a_en,
  input  logic [3:0]    a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B
  input  logic          b_en,
  input  logic [3:0]    b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      for (int i = 0; i < 4; i++)
        if (b_we[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
    end
  end

endmodule
