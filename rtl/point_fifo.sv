// point_fifo: FIFO of curve points between the Bezier flattener and the
// line renderer.
//
// The flattener writes the end point of every flat curve piece here; the
// control logic pops them one at a time and draws a line from the current
// point to each. The buffer lets the flattener keep subdividing while a
// line is drawn, and stalls it (in_ready low) when full. Depth is this
// design's choice.
//
// Interface: valid/ready on both sides; a word moves when both are high.
// The head is shown on out_pt while out_valid is high (first-word
// fall-through). A word written into an empty FIFO is visible the next
// cycle. Synchronous, active-low asynchronous reset empties it.
module point_fifo
  import font_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  point_t in_pt,
  output logic   out_valid,
  input  logic   out_ready,
  output point_t out_pt,
  output logic   full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  point_t          mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic [AW:0]     count;

  logic do_wr, do_rd;
  assign full      = (count == (AW+1)'(DEPTH));
  assign in_ready  = !full;
  assign out_valid = (count != '0);
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;
  assign out_pt    = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_pt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
