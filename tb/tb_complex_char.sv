// tb_complex_char: runs a character of the size of the most complex example
// quoted for this processor: 54 straight segments (9 moveto and 45
// lineto), 15 curveto and 9 subpaths, each ended by closepath, for 276
// program bytes plus the fill op-code. The coordinates of that character
// are not available, so the test builds its own: nine rounded, roughly
// convex outlines in a 3 x 3 grid, each made of a moveto, five lineto, one
// or two curveto and a closepath (the curves bulge outwards). The same
// checks as the end-to-end bench are applied at the default sizes: the
// outline against the path, the packed result against an even-odd fill
// of the drawn outline, the centre of every outline black, the gaps
// between them white, and the op-code counts.
module tb_complex_char;
  import font_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n = 1, host_wr_en = 0, start = 0;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge
  logic [7:0]  host_wr_addr = '0;
  logic [15:0] host_wr_data = '0;
  logic        busy, done, error, edge_overflow;
  logic        mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  font_processor dut (.*);
  ext_sram_model u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                        .wdata(mem_wdata), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  int n_moveto = 0, n_lineto = 0, n_curveto = 0, n_close = 0;
  always @(posedge clk) begin
    if (dut.move_en) n_moveto++;
    if (dut.bez_start) n_curveto++;
    if (dut.line_start && dut.u_ctrl.state == dut.u_ctrl.S_EXEC) n_lineto++;
    if (dut.cp_start) n_close++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ the program
  byte unsigned prog [$];
  typedef struct { real x0, y0, x1, y1; } seg_t;
  typedef struct { real x [4]; real y [4]; } bez_t;
  seg_t segs [$];
  bez_t curves [$];
  real  cx, cy, fx, fy;

  task automatic op_move(int x, int y);
    prog.push_back(8'h01); prog.push_back(x); prog.push_back(y);
    cx = x; cy = y; fx = x; fy = y;
  endtask
  task automatic op_line(int x, int y);
    prog.push_back(8'h02); prog.push_back(x); prog.push_back(y);
    segs.push_back('{cx, cy, real'(x), real'(y)});
    cx = x; cy = y;
  endtask
  task automatic op_curve(int x1, int y1, int x2, int y2, int x3, int y3);
    bez_t b;
    prog.push_back(8'h04);
    prog.push_back(x1); prog.push_back(y1); prog.push_back(x2);
    prog.push_back(y2); prog.push_back(x3); prog.push_back(y3);
    b.x[0] = cx; b.y[0] = cy; b.x[1] = x1; b.y[1] = y1;
    b.x[2] = x2; b.y[2] = y2; b.x[3] = x3; b.y[3] = y3;
    curves.push_back(b);
    cx = x3; cy = y3;
  endtask
  task automatic op_close();
    prog.push_back(8'h08);
    if (cx != fx || cy != fy) segs.push_back('{cx, cy, fx, fy});
    cx = fx; cy = fy;
  endtask

  task automatic load_program();
    for (int i = 0; i < prog.size(); i += 2) begin
      host_wr_en   <= 1;
      host_wr_addr <= 8'(i / 2);
      host_wr_data <= {(i + 1 < prog.size()) ? 8'(prog[i+1]) : 8'h00, 8'(prog[i])};
      @(posedge clk);
    end
    host_wr_en <= 0;
    @(posedge clk);
  endtask

  // ------------------------------------------------------------ geometry
  function automatic real bez(real a, real b, real c, real d, real t);
    return (1-t)*(1-t)*(1-t)*a + 3*t*(1-t)*(1-t)*b + 3*t*t*(1-t)*c + t*t*t*d;
  endfunction

  function automatic real seg_dist(seg_t s, real x, real y);
    real vx, vy, l2, t, px, py;
    vx = s.x1 - s.x0; vy = s.y1 - s.y0;
    l2 = vx * vx + vy * vy;
    t = (l2 == 0.0) ? 0.0 : ((x - s.x0) * vx + (y - s.y0) * vy) / l2;
    if (t < 0.0) t = 0.0;
    if (t > 1.0) t = 1.0;
    px = s.x0 + t * vx; py = s.y0 + t * vy;
    return $sqrt((px - x) * (px - x) + (py - y) * (py - y));
  endfunction

  logic [7:0] snap [2**ADDR_W];
  function automatic logic pix(int x, int y);
    if (x < 0 || y < 0 || x > 255 || y > 255) return 0;
    return snap[{8'(y), 8'(x)}] != 0;
  endfunction

  task automatic check_outline();
    int miss_line, miss_curve, stray, drawn;
    miss_line = 0; miss_curve = 0; stray = 0; drawn = 0;
    // straight sides: every major-axis step has its pixel
    foreach (segs[i]) begin
      real dx, dy;
      int n;
      logic xmaj;
      dx = segs[i].x1 - segs[i].x0; dy = segs[i].y1 - segs[i].y0;
      xmaj = ((dx < 0 ? -dx : dx) >= (dy < 0 ? -dy : dy));
      n = int'(xmaj ? (dx < 0 ? -dx : dx) : (dy < 0 ? -dy : dy));
      for (int k = 0; k <= n; k++) begin
        real mj, ideal;
        logic hit;
        hit = 0;
        if (xmaj) begin
          mj = segs[i].x0 + (dx < 0 ? -k : k);
          ideal = (n == 0) ? segs[i].y0 : segs[i].y0 + dy * real'(k) / real'(n);
          for (int m = int'($floor(ideal - 0.5)); m <= int'($ceil(ideal + 0.5)); m++)
            if ((real'(m) - ideal) <= 0.5001 && (ideal - real'(m)) <= 0.5001 && pix(int'(mj), m)) hit = 1;
        end else begin
          mj = segs[i].y0 + (dy < 0 ? -k : k);
          ideal = segs[i].x0 + dx * real'(k) / real'(n);
          for (int m = int'($floor(ideal - 0.5)); m <= int'($ceil(ideal + 0.5)); m++)
            if ((real'(m) - ideal) <= 0.5001 && (ideal - real'(m)) <= 0.5001 && pix(m, int'(mj))) hit = 1;
        end
        if (!hit) miss_line++;
      end
    end
    // curves: every sample has a drawn pixel close by
    foreach (curves[i]) begin
      for (int s = 0; s <= 400; s++) begin
        real t, qx, qy;
        logic hit;
        t = real'(s) / 400.0;
        qx = bez(curves[i].x[0], curves[i].x[1], curves[i].x[2], curves[i].x[3], t);
        qy = bez(curves[i].y[0], curves[i].y[1], curves[i].y[2], curves[i].y[3], t);
        hit = 0;
        for (int ddy = -2; ddy <= 2; ddy++)
          for (int ddx = -2; ddx <= 2; ddx++) begin
            int px, py;
            px = int'($floor(qx + 0.5)) + ddx; py = int'($floor(qy + 0.5)) + ddy;
            if (pix(px, py) && ((real'(px) - qx) ** 2 + (real'(py) - qy) ** 2) <= 2.25) hit = 1;
          end
        if (!hit) miss_curve++;
      end
    end
    // no stray pixels
    for (int y = 0; y < 256; y++)
      for (int x = 0; x < 256; x++)
        if (pix(x, y)) begin
          real best;
          drawn++;
          best = 1.0e9;
          foreach (segs[i]) begin
            real d;
            d = seg_dist(segs[i], real'(x), real'(y));
            if (d < best) best = d;
          end
          if (best > 0.71) begin
            foreach (curves[i])
              for (int s = 0; s <= 2000; s++) begin
                real t, qx, qy, d;
                t = real'(s) / 2000.0;
                qx = bez(curves[i].x[0], curves[i].x[1], curves[i].x[2], curves[i].x[3], t);
                qy = bez(curves[i].y[0], curves[i].y[1], curves[i].y[2], curves[i].y[3], t);
                d = $sqrt((qx - x) ** 2 + (qy - y) ** 2);
                if (d < best) best = d;
              end
          end
          if (best > 1.5) begin
            stray++;
            if (stray < 5) $display("stray pixel (%0d,%0d) %f from the path", x, y, best);
          end
        end
    $display("outline: %0d pixels drawn", drawn);
    check(miss_line == 0, $sformatf("%0d straight-line steps not drawn", miss_line));
    check(miss_curve == 0, $sformatf("%0d curve samples not covered", miss_curve));
    check(stray == 0, $sformatf("%0d stray pixels", stray));
  endtask

  // even-odd reference on the snapshot; returns the fill's own work
  logic filled [256][256];
  task automatic reference_fill(output int work);
    work = 0;
    for (int y = 0; y < 256; y++) begin
      int starts [$];
      logic prev;
      prev = 0;
      for (int x = 0; x < 256; x++) begin
        filled[y][x] = pix(x, y);
        if (pix(x, y) && !prev) starts.push_back(x);
        prev = pix(x, y);
      end
      check(starts.size() <= 16, "edge stack large enough for the test character");
      work += 256 + 5 + starts.size() / 2;
      for (int k = 0; k + 1 < starts.size(); k += 2)
        for (int x = starts[k]; x <= starts[k+1]; x++) begin
          filled[y][x] = 1;
          work++;
        end
    end
  endtask

  initial begin
    int draw_cycles, fill_cycles, work, bad;
    // nine subpaths; vertices on a circle of radius 30 around each centre
    for (int s = 0; s < 9; s++) begin
      int ox, oy, ncurve, nv;
      real r, a0;
      ox = 42 + 85 * (s % 3);
      oy = 42 + 85 * (s / 3);
      ncurve = (s < 6) ? 2 : 1;
      nv = 5 + ncurve + 1;          // vertices around the outline
      r = 30.0;
      a0 = 0.3 * s;
      op_move(ox + int'(r * $cos(a0)), oy + int'(r * $sin(a0)));
      for (int k = 1; k < nv; k++) begin
        real a, am, c1, c2;
        int x, y;
        a = a0 + 6.2831853 * k / nv;
        x = ox + int'(r * $cos(a));
        y = oy + int'(r * $sin(a));
        if (k <= ncurve) begin
          am = a - 6.2831853 / nv;
          c1 = am + 6.2831853 / nv / 3.0;
          c2 = am + 2.0 * 6.2831853 / nv / 3.0;
          op_curve(ox + int'(1.15 * r * $cos(c1)), oy + int'(1.15 * r * $sin(c1)),
                   ox + int'(1.15 * r * $cos(c2)), oy + int'(1.15 * r * $sin(c2)), x, y);
        end else begin
          op_line(x, y);
        end
      end
      op_close();
    end
    check(prog.size() == 276, $sformatf("path takes %0d bytes, 276 expected", prog.size()));
    prog.push_back(8'h10);

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    load_program();
    start <= 1;
    @(posedge clk);
    start <= 0;
    draw_cycles = 1;
    while (!dut.fill_start) begin @(posedge clk); draw_cycles++; #1; end
    for (int a = 0; a < 2**ADDR_W; a++) snap[a] = u_mem.mem[a];
    fill_cycles = 0;
    while (!done) begin @(posedge clk); fill_cycles++; #1; end
    $display("outline drawn in %0d cycles, fill and write-back in %0d cycles", draw_cycles, fill_cycles);
    check(!error, "no error");
    check(n_moveto == 9 && n_lineto == 45 && n_curveto == 15 && n_close == 9,
          $sformatf("op counts %0d %0d %0d %0d", n_moveto, n_lineto, n_curveto, n_close));

    check_outline();
    reference_fill(work);
    bad = 0;
    for (int y = 0; y < 256; y++)
      for (int b = 0; b < 32; b++)
        for (int i = 0; i < 8; i++)
          if (u_mem.mem[{8'(y), 8'(b)}][i] !== filled[y][8*b+i]) bad++;
    check(bad == 0, $sformatf("%0d packed image bits differ from the even-odd fill", bad));
    for (int s = 0; s < 9; s++) begin
      int ox, oy;
      ox = 42 + 85 * (s % 3);
      oy = 42 + 85 * (s / 3);
      check(u_mem.mem[{8'(oy), 8'(ox / 8)}][ox % 8], $sformatf("centre of outline %0d is black", s));
      check(!u_mem.mem[{8'(oy), 8'((ox + 42) / 8)}][(ox + 42) % 8], $sformatf("gap right of outline %0d is white", s));
    end
    check(fill_cycles >= 73728 && fill_cycles <= ((work > 73728) ? work : 73728) + 1500,
          $sformatf("fill phase %0d cycles, fill work %0d", fill_cycles, work));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
