// ext_sram_model: behavioural model of the external image SRAM on the
// co-processor card (not synthesizable design content, testbench only).
// 2^ADDR_W bytes, one access per cycle: a write stores wdata at the clock
// edge; a read returns the byte on rdata in the following cycle. The
// array starts cleared, as the host would leave it before a character.
module ext_sram_model
  import font_pkg::*;
(
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
    rdata = '0;
  end

  always @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
    if (en && !we) rdata <= mem[addr];
  end
endmodule
