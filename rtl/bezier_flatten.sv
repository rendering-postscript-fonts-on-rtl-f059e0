// bezier_flatten: the Bezier Flatten processing element.
//
// Turns a cubic Bezier curve (P1 = current point, control points P2, P3,
// end point P4) into a sequence of points joined by straight lines, by
// recursive subdivision. Each iteration looks at one curve:
//   * flatness test: delta1 = (P2-P1) x (P4-P1), delta2 = (P3-P1) x (P4-P1)
//     (2-D cross products). Both are zero for a straight curve; the curve
//     counts as flat when |delta1| and |delta2| are both below FLAT_TOL.
//   * if flat (or MAX_DEPTH halvings deep) its end point is written to the
//     point FIFO and the next pending curve is popped from the stack;
//   * otherwise it is halved with the de Casteljau midpoint network
//     (only additions and halvings): L2=(P1+P2)/2, H=(P2+P3)/2,
//     R3=(P3+P4)/2, L3=(L2+H)/2, R2=(H+R3)/2, L4=R1=(L3+R2)/2. The right
//     half (R1,R2,R3,P4) is pushed and the left half (P1,L2,L3,L4) becomes
//     the current curve, so points leave in order from P1 to P4.
// The subdivision, flatness test, point output and stack follow the
// algorithm as published. The fixed-point format (FRAC fraction bits
// below the pixel, so that repeated halving does not lose the curve),
// the tolerance value, the depth cap and the rounding of output points
// to the nearest pixel are this design's choices. The last point emitted
// is always P4 itself.
//
// Timing: a split takes one cycle, a flat piece takes one cycle to emit
// (more while the FIFO is full) and one more to pop. done pulses the
// cycle after the last point is accepted. start is accepted while idle.
module bezier_flatten
  import font_pkg::*;
#(
  parameter int unsigned FRAC        = 4,     // fraction bits below a pixel
  parameter int unsigned MAX_DEPTH   = 10,    // most halvings of one curve
  parameter int unsigned STACK_DEPTH = 16,    // entries of the stack
  parameter longint      FLAT_TOL    = 1024   // in (1/2^FRAC pixel)^2 units
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  point_t p1, p2, p3, p4,
  output logic   busy,
  output logic   done,
  // flattened points to the FIFO
  output logic   out_valid,
  input  logic   out_ready,
  output point_t out_pt
);

  localparam int unsigned CW  = COORD_W + FRAC;   // internal coordinate width
  localparam int unsigned DPW = $clog2(MAX_DEPTH+1);
  localparam int unsigned DW  = 2*CW + 4;         // width of delta1/delta2

  typedef logic [CW-1:0] ic_t;
  typedef struct packed { ic_t x; ic_t y; } ipt_t;
  typedef struct packed {
    ipt_t p1, p2, p3, p4;
  } curve_t;
  typedef struct packed {
    logic [DPW-1:0] depth;
    curve_t         c;
  } entry_t;
  typedef logic signed [DW-1:0] delta_t;

  // ---------------------------------------------------------------- helpers
  function automatic ic_t mid(ic_t a, ic_t b);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CW:1];
  endfunction

  function automatic ipt_t pmid(ipt_t a, ipt_t b);
    return '{x: mid(a.x, b.x), y: mid(a.y, b.y)};
  endfunction

  function automatic ipt_t widen(point_t p);
    return '{x: {p.x, FRAC'(0)}, y: {p.y, FRAC'(0)}};
  endfunction

  function automatic coord_t round_px(ic_t v);
    logic [CW:0] s;
    s = {1'b0, v} + (CW+1)'(1 << (FRAC-1));
    return s[CW-1:FRAC];
  endfunction

  // cross product (a - o) x (b - o)
  function automatic delta_t cross_prod(ipt_t o, ipt_t a, ipt_t b);
    delta_t ax, ay, bx, by;
    ax = delta_t'(a.x) - delta_t'(o.x);
    ay = delta_t'(a.y) - delta_t'(o.y);
    bx = delta_t'(b.x) - delta_t'(o.x);
    by = delta_t'(b.y) - delta_t'(o.y);
    return ax * by - ay * bx;
  endfunction

  function automatic delta_t absd(delta_t d);
    return (d < 0) ? -d : d;
  endfunction

  // ------------------------------------------------------------- datapath
  curve_t         cur;
  logic [DPW-1:0] depth;

  // Fig. 6 midpoint network
  ipt_t   l2, h, r3, l3, r2, l4;
  curve_t left_c, right_c;
  assign l2 = pmid(cur.p1, cur.p2);
  assign h  = pmid(cur.p2, cur.p3);
  assign r3 = pmid(cur.p3, cur.p4);
  assign l3 = pmid(l2, h);
  assign r2 = pmid(h, r3);
  assign l4 = pmid(l3, r2);
  assign left_c  = '{p1: cur.p1, p2: l2, p3: l3, p4: l4};
  assign right_c = '{p1: l4, p2: r2, p3: r3, p4: cur.p4};

  // Eq. (1) flatness test
  delta_t delta1, delta2;
  logic   flat;
  assign delta1 = cross_prod(cur.p1, cur.p2, cur.p4);
  assign delta2 = cross_prod(cur.p1, cur.p3, cur.p4);
  assign flat   = (absd(delta1) < delta_t'(FLAT_TOL)) && (absd(delta2) < delta_t'(FLAT_TOL));

  // ---------------------------------------------------------------- stack
  logic   st_push, st_pop, st_empty, st_full;
  entry_t st_out;
  logic [$clog2(STACK_DEPTH+1)-1:0] st_count;

  bez_stack #(.WIDTH($bits(entry_t)), .DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n,
    .push(st_push), .push_data({depth + 1'b1, right_c}),
    .pop(st_pop),   .pop_data(st_out),
    .empty(st_empty), .full(st_full), .count(st_count)
  );

  // ------------------------------------------------------------------ FSM
  typedef enum logic [1:0] {S_IDLE, S_EVAL, S_EMIT, S_POP} state_e;
  state_e state;

  logic split;
  assign split   = (state == S_EVAL) && !flat && (depth != DPW'(MAX_DEPTH));
  assign st_push = split;
  assign st_pop  = (state == S_EMIT) && out_ready && !st_empty;

  assign out_valid = (state == S_EMIT);
  assign out_pt    = '{x: round_px(cur.p4.x), y: round_px(cur.p4.y)};
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur   <= '0;
      depth <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur   <= '{p1: widen(p1), p2: widen(p2), p3: widen(p3), p4: widen(p4)};
          depth <= '0;
          state <= S_EVAL;
        end
        S_EVAL: begin
          if (split) begin
            cur   <= left_c;
            depth <= depth + 1'b1;
          end else begin
            state <= S_EMIT;
          end
        end
        S_EMIT: if (out_ready) begin
          if (st_empty) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_POP;
          end
        end
        S_POP: begin
          cur   <= st_out.c;
          depth <= st_out.depth;
          state <= S_EVAL;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (STACK_DEPTH >= MAX_DEPTH)
      else $fatal(1, "bezier_flatten: STACK_DEPTH must be at least MAX_DEPTH");
    assert (FRAC >= 1)
      else $fatal(1, "bezier_flatten: FRAC must be at least 1");
  end

endmodule
