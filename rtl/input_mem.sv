// input_mem: on-chip memory holding the outline program of one character.
//
// The host writes the program 16 bits at a time through one port (byte
// 2k in bits [7:0], byte 2k+1 in bits [15:8]); the control logic reads it
// one byte at a time through the other port. This mirrors a dual-ported
// BlockRAM used with different widths on its two sides, which halves the
// time to load a character. The default size, 512 bytes, is one 4 Kbit
// BlockRAM; the number of BlockRAMs used is this design's choice.
//
// Timing: a write takes effect at the clock edge where wr_en is high; a
// read returns rd_data one cycle after rd_addr is presented (synchronous
// read, as in a BlockRAM). The contents are not reset.
module input_mem #(
  parameter int unsigned BYTES = 512
) (
  input  logic                       clk,
  // host side, 16-bit words
  input  logic                       wr_en,
  input  logic [$clog2(BYTES)-2:0]   wr_addr,   // word address
  input  logic [15:0]                wr_data,
  // control side, bytes
  input  logic [$clog2(BYTES)-1:0]   rd_addr,   // byte address
  output logic [7:0]                 rd_data
);

  logic [15:0] mem [BYTES/2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  logic [15:0] word_q;
  logic        hi_q;
  always_ff @(posedge clk) begin
    word_q <= mem[rd_addr[$clog2(BYTES)-1:1]];
    hi_q   <= rd_addr[0];
  end

  assign rd_data = hi_q ? word_q[15:8] : word_q[7:0];

endmodule
