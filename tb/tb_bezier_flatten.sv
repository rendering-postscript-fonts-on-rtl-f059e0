// tb_bezier_flatten: flattens a set of curves (the example arch, an S
// curve, a cusp-like loop, straight and degenerate curves, random ones)
// with random back-pressure on the output, and checks the point list
// against the cubic Q(t) evaluated here in real arithmetic:
//   * the last point is P4 exactly;
//   * every point lies within 1 pixel of the curve, at a parameter t not
//     before that of the previous point (points come out in order);
//   * every chord between consecutive points stays within MAX_DEV pixels
//     of the curve, so the polyline follows it;
//   * a straight curve gives a single point, one split never happens;
//   * cycle count: a curve that is already flat finishes in 3 cycles.
// It also counts stack pushes to show that subdivision is exercised.
module tb_bezier_flatten;
  import font_pkg::*;
  localparam real MAX_DEV = 2.0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic   rst_n = 0, start = 0, out_ready = 0;
  point_t p1 = '0, p2 = '0, p3 = '0, p4 = '0, out_pt;
  logic   busy, done, out_valid;
  int checks = 0, failures = 0, pushes = 0, stalls = 0;

  bezier_flatten dut (.*);

  always @(posedge clk) begin
    if (dut.st_push) pushes++;
    if (out_valid && !out_ready) stalls++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bez(real a, real b, real c, real d, real t);
    return (1-t)*(1-t)*(1-t)*a + 3*t*(1-t)*(1-t)*b + 3*t*t*(1-t)*c + t*t*t*d;
  endfunction

  // nearest curve parameter and distance of (x, y), searched from t0 on
  task automatic nearest(input point_t a, b, c, d, input real x, y, input real t0,
                         output real tbest, output real dbest);
    dbest = 1.0e9; tbest = t0;
    for (int i = 0; i <= 2000; i++) begin
      real t, cx, cy, dd;
      t = real'(i) / 2000.0;
      if (t >= t0 - 0.002) begin
        cx = bez(a.x, b.x, c.x, d.x, t);
        cy = bez(a.y, b.y, c.y, d.y, t);
        dd = (cx - x) * (cx - x) + (cy - y) * (cy - y);
        if (dd < dbest) begin dbest = dd; tbest = t; end
      end
    end
    dbest = $sqrt(dbest);
  endtask

  // first curve parameter from t0 on at which the curve passes within
  // 1 pixel of (x, y); -1 if none
  function automatic real first_hit(point_t a, b, c, d, real x, real y, real t0);
    for (int i = 0; i <= 4000; i++) begin
      real t, cx, cy;
      t = real'(i) / 4000.0;
      if (t >= t0 - 0.001) begin
        cx = bez(a.x, b.x, c.x, d.x, t);
        cy = bez(a.y, b.y, c.y, d.y, t);
        if ((cx - x) * (cx - x) + (cy - y) * (cy - y) <= 1.0) return t;
      end
    end
    return -1.0;
  endfunction

  task automatic run_curve(input point_t a, b, c, d, input int ready_pct,
                           output int npts, output int cycles);
    point_t pts [$];
    real tprev, tb, db;
    logic ok_dist, ok_order, ok_chord;
    p1 <= a; p2 <= b; p3 <= c; p4 <= d; start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 1;
    forever begin
      out_ready <= ($urandom_range(99) < ready_pct);
      #1;
      if (done) break;
      @(posedge clk);
      if (out_valid && out_ready) pts.push_back(out_pt);
      cycles++;
    end
    npts = pts.size();
    check(npts > 0 && pts[npts-1] == d, "last point is P4");
    tprev = 0.0;
    ok_dist = 1; ok_order = 1; ok_chord = 1;
    for (int i = 0; i < npts; i++) begin
      nearest(a, b, c, d, real'(pts[i].x), real'(pts[i].y), 0.0, tb, db);
      if (db > 1.0) ok_dist = 0;
      tb = first_hit(a, b, c, d, real'(pts[i].x), real'(pts[i].y), tprev);
      if (tb < 0.0) ok_order = 0;
      else tprev = tb;
      // chord midpoint from the previous point (P1 for the first)
      begin
        real mx, my, t2, d2;
        point_t q;
        q = (i == 0) ? a : pts[i-1];
        mx = (real'(q.x) + real'(pts[i].x)) / 2.0;
        my = (real'(q.y) + real'(pts[i].y)) / 2.0;
        nearest(a, b, c, d, mx, my, 0.0, t2, d2);
        if (d2 > MAX_DEV) ok_chord = 0;
      end
    end
    check(ok_dist, $sformatf("points on the curve (%0d points)", npts));
    check(ok_order, "points in curve order");
    check(ok_chord, "polyline follows the curve");
    @(posedge clk);
  endtask

  initial begin
    int n, cyc, p0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // straight curve: flat at once, one point, 3 cycles (eval, emit, done)
    p0 = pushes;
    run_curve('{x:10,y:10}, '{x:40,y:40}, '{x:80,y:80}, '{x:120,y:120}, 100, n, cyc);
    check(n == 1 && pushes == p0, "straight curve: one point, no split");
    check(cyc == 3, $sformatf("straight curve takes 3 cycles, took %0d", cyc));
    // degenerate: all points equal
    run_curve('{x:50,y:50}, '{x:50,y:50}, '{x:50,y:50}, '{x:50,y:50}, 100, n, cyc);
    check(n == 1, "point curve: one point");
    // arch like the example figure
    run_curve('{x:20,y:200}, '{x:60,y:60}, '{x:200,y:20}, '{x:240,y:210}, 100, n, cyc);
    check(n > 8, $sformatf("arch split into %0d pieces", n));
    // S curve with back-pressure
    run_curve('{x:0,y:0}, '{x:255,y:0}, '{x:0,y:255}, '{x:255,y:255}, 30, n, cyc);
    // loop
    run_curve('{x:30,y:128}, '{x:250,y:250}, '{x:250,y:5}, '{x:30,y:128}, 60, n, cyc);
    // short curves and random ones
    run_curve('{x:100,y:100}, '{x:103,y:98}, '{x:105,y:104}, '{x:101,y:106}, 100, n, cyc);
    for (int i = 0; i < 40; i++)
      run_curve(point_t'($urandom), point_t'($urandom), point_t'($urandom), point_t'($urandom),
                $urandom_range(20, 100), n, cyc);
    check(pushes > 100, "subdivision exercised the stack");
    check(stalls > 0, "output back-pressure exercised");
    $display("stack pushes %0d, output stalls %0d", pushes, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
