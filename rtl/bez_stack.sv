// bez_stack: on-chip last-in first-out store for the recursive Bezier
// subdivision ("stack space").
//
// Each time a curve is split, one half is pushed here while the other is
// worked on; when a piece is flat the next pending half is popped. The
// store is a plain memory with a pointer, as it would be in a BlockRAM.
// Width and depth are parameters; the defaults fit a curve of four
// 12-bit points plus a 4-bit depth tag, 16 entries deep (this design's
// choice).
//
// Timing: push writes push_data at the clock edge. pop reads the top
// entry; pop_data holds it from the next cycle on (synchronous read).
// Push and pop in the same cycle are not supported. A push when full or
// a pop when empty is ignored and flagged by an assertion.
module bez_stack #(
  parameter int unsigned WIDTH = 100,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] pop_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));

  always_ff @(posedge clk) begin
    if (push && !full) mem[count[$clog2(DEPTH)-1:0]] <= push_data;
    if (pop && !empty) pop_data <= mem[$clog2(DEPTH)'(count - 1'b1)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else if (push && !full) count <= count + 1'b1;
    else if (pop && !empty) count <= count - 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("bez_stack: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("bez_stack: pop while empty");
  assert property (@(posedge clk) disable iff (!rst_n) !(push && pop))
    else $error("bez_stack: push and pop in one cycle");

endmodule
