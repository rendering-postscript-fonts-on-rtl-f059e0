// line_render: Bresenham straight-line rasteriser writing into external memory.
//
// A single instance serves lineto, the pieces of a flattened curveto and
// the closing line of closepath; the control logic selects its end points.
// On start (accepted while idle) it latches p0 and p1 and then writes one
// pixel per clock, both end points included, as bytes of value 1 (black)
// at address {y, x} of the 256 x 256 image. It uses the all-octant integer
// form of Bresenham's algorithm: one signed error term, updated with dx
// and/or dy each step, so no division or multiplication is needed.
//
// Timing: a line of max(|dx|,|dy|)+1 pixels keeps mem_we high for exactly
// that many cycles, starting the cycle after start; done pulses in the
// cycle after the last write. busy is high from the cycle after start
// until done. The external memory is assumed to accept one write per
// cycle without a handshake.
module line_render
  import font_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  point_t            p0,
  input  point_t            p1,
  output logic              busy,
  output logic              done,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata
);

  typedef logic signed [COORD_W+2:0] err_t;   // holds 2*err without overflow

  logic   drawing;
  coord_t x, y, xe, ye;
  logic   sx, sy;          // 1: step +1, 0: step -1
  err_t   dx, dy, err;     // dx >= 0, dy <= 0

  err_t   e2;
  logic   at_end, step_x, step_y;

  assign e2     = err <<< 1;
  assign at_end = (x == xe) && (y == ye);
  assign step_x = (e2 >= dy);
  assign step_y = (e2 <= dx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drawing <= 1'b0;
      done    <= 1'b0;
      x <= '0; y <= '0; xe <= '0; ye <= '0;
      sx <= 1'b0; sy <= 1'b0;
      dx <= '0; dy <= '0; err <= '0;
    end else begin
      done <= 1'b0;
      if (!drawing) begin
        if (start) begin
          err_t adx, ady;
          adx = (p1.x >= p0.x) ? err_t'(p1.x) - err_t'(p0.x) : err_t'(p0.x) - err_t'(p1.x);
          ady = (p1.y >= p0.y) ? err_t'(p1.y) - err_t'(p0.y) : err_t'(p0.y) - err_t'(p1.y);
          drawing <= 1'b1;
          x   <= p0.x;  y  <= p0.y;
          xe  <= p1.x;  ye <= p1.y;
          sx  <= (p1.x >= p0.x);
          sy  <= (p1.y >= p0.y);
          dx  <= adx;
          dy  <= -ady;
          err <= adx - ady;
        end
      end else begin
        if (at_end) begin
          drawing <= 1'b0;
          done    <= 1'b1;
        end else begin
          err_t nerr;
          nerr = err;
          if (step_x) begin
            nerr = nerr + dy;
            x    <= sx ? x + 1'b1 : x - 1'b1;
          end
          if (step_y) begin
            nerr = nerr + dx;
            y    <= sy ? y + 1'b1 : y - 1'b1;
          end
          err <= nerr;
        end
      end
    end
  end

  assign busy      = drawing;
  assign mem_we    = drawing;
  assign mem_addr  = pix_addr(x, y);
  assign mem_wdata = DATA_W'(1);

endmodule
