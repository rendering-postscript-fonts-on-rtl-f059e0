// moveto_unit: the MoveTo processing element and the path state it owns.
//
// It holds the current point and the first point of the current subpath.
// A moveto (move_en) sets both to the operand point; it draws nothing.
// When a line, curve piece or closing line finishes, the control logic
// moves the current point on with cur_en. closepath later draws back to
// first_pt. Both registers reset to (0, 0), this design's choice.
//
// Timing: updates take effect at the clock edge where the enable is high;
// move_en wins if both enables are high. move_done pulses one cycle after
// move_en, the element's whole execution.
module moveto_unit
  import font_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   move_en,   // execute moveto
  input  point_t move_pt,
  input  logic   cur_en,    // advance the current point
  input  point_t cur_pt_in,
  output point_t cur_pt,
  output point_t first_pt,
  output logic   move_done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_pt    <= '0;
      first_pt  <= '0;
      move_done <= 1'b0;
    end else begin
      move_done <= move_en;
      if (move_en) begin
        cur_pt   <= move_pt;
        first_pt <= move_pt;
      end else if (cur_en) begin
        cur_pt   <= cur_pt_in;
      end
    end
  end

endmodule
