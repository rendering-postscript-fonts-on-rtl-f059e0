// closepath_unit: the Closepath processing element.
//
// closepath ends a subpath by joining the current point to the subpath's
// first point, but only when they differ (a subpath that already ends on
// its start needs no extra line). When started, the unit compares the two
// points; if they differ it asks the shared line renderer for the line
// cur_pt -> first_pt (line_req high until line_ack) and waits for
// line_done. It then pulses done together with set_cur, which tells the
// path state to move the current point to first_pt. drew reports whether
// a line was needed.
//
// Timing: with equal points done follows start by one cycle; otherwise
// done follows the line renderer's done by one cycle.
module closepath_unit
  import font_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  point_t cur_pt,
  input  point_t first_pt,
  // request to the line renderer
  output logic   line_req,
  output point_t line_p0,
  output point_t line_p1,
  input  logic   line_ack,    // renderer accepted the request
  input  logic   line_done,   // renderer finished the line
  // completion
  output logic   done,
  output logic   set_cur,
  output logic   drew
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      drew  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (cur_pt != first_pt) begin
            state <= S_REQ;
            drew  <= 1'b1;
          end else begin
            done  <= 1'b1;
            drew  <= 1'b0;
          end
        end
        S_REQ:  if (line_ack)  state <= S_WAIT;
        S_WAIT: if (line_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign line_req = (state == S_REQ);
  assign line_p0  = cur_pt;
  assign line_p1  = first_pt;
  assign set_cur  = done;

endmodule
