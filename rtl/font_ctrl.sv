// font_ctrl: control logic of the font processor.
//
// A fetch/decode/execute state machine. It reads a one-byte op-code from
// the input memory, then as many one-byte operands as that op-code needs
// (moveto 2, lineto 2, curveto 6, closepath 0, fill 0: each operand is an
// 8-bit coordinate), and hands the operation to its processing element,
// waiting for it to finish before fetching the next op-code (fetch and
// execute are not overlapped). It also steers the single line renderer:
//   lineto    : current point -> operand point;
//   curveto   : starts the Bezier flattener, then repeatedly pops a point
//               from the FIFO and draws current point -> that point, until
//               the flattener is done and the FIFO is empty;
//   closepath : current point -> first point of the subpath, on request
//               of the Closepath element.
// After each line the current point moves to the line's end. fill hands
// the external memory to the image cache and the fill element; when the
// last scanline is written back the character is finished (done pulse).
// An op-code outside the five ends the run with error set.
//
// Timing: each program byte costs two cycles (address, then data). The
// opcode values come from the package; the operand counts follow from the
// operators' definitions; the reset state and the error handling are this
// design's choices.
module font_ctrl
  import font_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 512
) (
  input  logic   clk,
  input  logic   rst_n,
  // host
  input  logic   start,
  output logic   busy,
  output logic   done,
  output logic   error,
  // input memory read port
  output logic [$clog2(IMEM_BYTES)-1:0] rd_addr,
  input  logic [7:0]                    rd_data,
  // MoveTo element / path state
  output logic   move_en,
  output point_t move_pt,
  output logic   cur_en,
  output point_t cur_pt_in,
  input  point_t cur_pt,
  input  point_t first_pt,
  input  logic   move_done,
  // line renderer
  output logic   line_start,
  output point_t line_p0,
  output point_t line_p1,
  input  logic   line_busy,
  input  logic   line_done,
  // Bezier flattener and its FIFO
  output logic   bez_start,
  output point_t bez_p1, bez_p2, bez_p3, bez_p4,
  input  logic   bez_done,
  input  logic   fifo_valid,
  output logic   fifo_ready,
  input  point_t fifo_pt,
  // Closepath element
  output logic   cp_start,
  input  logic   cp_line_req,
  input  point_t cp_line_p0,
  input  point_t cp_line_p1,
  output logic   cp_line_ack,
  input  logic   cp_done,
  input  logic   cp_set_cur,
  // Fill (image cache + scan fill)
  output logic   fill_start,
  input  logic   fill_done,
  output logic   mem_sel        // 0: line renderer owns external memory
);

  localparam int unsigned AW = $clog2(IMEM_BYTES);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_OPC, S_ARG_RD, S_ARG,
    S_EXEC, S_MOVE, S_LINE, S_CURVE, S_CLOSE, S_FILL, S_DONE
  } state_e;
  state_e state;

  logic [AW-1:0] pc;
  opcode_e       op;
  logic [2:0]    nargs, argi;
  coord_t        args [6];
  logic          bez_fin;      // flattener has finished this curve
  logic          seg_active;   // a curve segment line is being drawn
  point_t        seg_end;

  function automatic logic [2:0] operand_count(logic [7:0] code);
    unique case (code)
      OP_MOVETO, OP_LINETO: return 3'd2;
      OP_CURVETO:           return 3'd6;
      default:              return 3'd0;
    endcase
  endfunction

  function automatic logic legal(logic [7:0] code);
    return code inside {OP_MOVETO, OP_LINETO, OP_CURVETO, OP_CLOSEPATH, OP_FILL};
  endfunction

  point_t arg_pt0, arg_pt1, arg_pt2;
  assign arg_pt0 = '{x: args[0], y: args[1]};
  assign arg_pt1 = '{x: args[2], y: args[3]};
  assign arg_pt2 = '{x: args[4], y: args[5]};

  // -------------------------------------------------- element hand-offs
  logic curve_seg_go;
  assign curve_seg_go = (state == S_CURVE) && fifo_valid && !seg_active && !line_busy;

  always_comb begin
    rd_addr     = pc;
    move_en     = (state == S_EXEC) && (op == OP_MOVETO);
    move_pt     = arg_pt0;
    bez_start   = (state == S_EXEC) && (op == OP_CURVETO);
    bez_p1      = cur_pt;
    bez_p2      = arg_pt0;
    bez_p3      = arg_pt1;
    bez_p4      = arg_pt2;
    cp_start    = (state == S_EXEC) && (op == OP_CLOSEPATH);
    fill_start  = (state == S_EXEC) && (op == OP_FILL);
    fifo_ready  = curve_seg_go;
    cp_line_ack = (state == S_CLOSE) && cp_line_req && !line_busy;
    mem_sel     = (state == S_FILL);

    // line renderer input selection
    line_start = 1'b0;
    line_p0    = cur_pt;
    line_p1    = arg_pt0;
    if ((state == S_EXEC) && (op == OP_LINETO)) begin
      line_start = 1'b1;
    end else if (curve_seg_go) begin
      line_start = 1'b1;
      line_p1    = fifo_pt;
    end else if (state == S_CLOSE) begin
      line_start = cp_line_ack;
      line_p0    = cp_line_p0;
      line_p1    = cp_line_p1;
    end

    // current point update when a line completes
    cur_en    = 1'b0;
    cur_pt_in = arg_pt0;
    if ((state == S_LINE) && line_done) begin
      cur_en = 1'b1;
    end else if ((state == S_CURVE) && seg_active && line_done) begin
      cur_en    = 1'b1;
      cur_pt_in = seg_end;
    end else if ((state == S_CLOSE) && cp_set_cur) begin
      cur_en    = 1'b1;
      cur_pt_in = first_pt;
    end
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pc         <= '0;
      op         <= OP_FILL;
      nargs      <= '0;
      argi       <= '0;
      for (int i = 0; i < 6; i++) args[i] <= '0;
      bez_fin    <= 1'b0;
      seg_active <= 1'b0;
      seg_end    <= '0;
      done       <= 1'b0;
      error      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pc    <= '0;
          error <= 1'b0;
          state <= S_FETCH;
        end
        S_FETCH: begin
          pc    <= pc + 1'b1;
          state <= S_OPC;
        end
        S_OPC: begin
          if (!legal(rd_data)) begin
            error <= 1'b1;
            state <= S_DONE;
          end else begin
            op    <= opcode_e'(rd_data);
            nargs <= operand_count(rd_data);
            argi  <= '0;
            state <= (operand_count(rd_data) == 3'd0) ? S_EXEC : S_ARG_RD;
          end
        end
        S_ARG_RD: begin
          pc    <= pc + 1'b1;
          state <= S_ARG;
        end
        S_ARG: begin
          args[argi] <= rd_data;
          argi       <= argi + 1'b1;
          state      <= (argi == nargs - 1'b1) ? S_EXEC : S_ARG_RD;
        end
        S_EXEC: begin
          unique case (op)
            OP_MOVETO:    state <= S_MOVE;
            OP_LINETO:    state <= S_LINE;
            OP_CURVETO:   begin state <= S_CURVE; bez_fin <= 1'b0; end
            OP_CLOSEPATH: state <= S_CLOSE;
            default:      state <= S_FILL;
          endcase
        end
        S_MOVE:  if (move_done) state <= S_FETCH;
        S_LINE:  if (line_done) state <= S_FETCH;
        S_CURVE: begin
          if (bez_done) bez_fin <= 1'b1;
          if (curve_seg_go) begin
            seg_active <= 1'b1;
            seg_end    <= fifo_pt;
          end else if (seg_active && line_done) begin
            seg_active <= 1'b0;
          end else if (bez_fin && !fifo_valid && !seg_active && !line_busy) begin
            state <= S_FETCH;
          end
        end
        S_CLOSE: if (cp_done) state <= S_FETCH;
        S_FILL:  if (fill_done) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
