// tb_line_render: draws random lines (all octants, points, and the axes)
// and checks each against the defining properties of a best-fit raster
// line, worked out here in real arithmetic: the first pixel is p0, the
// last is p1, every step advances the major axis by exactly one, and the
// minor coordinate stays within half a pixel of the ideal line. It also
// checks the rate: max(|dx|,|dy|)+1 write cycles, then done one cycle
// later.
module tb_line_render;
  import font_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic   rst_n = 0, start = 0;
  point_t p0 = '0, p1 = '0;
  logic   busy, done, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata;
  int checks = 0, failures = 0;

  line_render dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_line(input point_t a, input point_t b);
    int dx, dy, n, k, cyc;
    int px [$], py [$];
    logic xmajor, ok;
    dx = int'(b.x) - int'(a.x);
    dy = int'(b.y) - int'(a.y);
    n  = ((dx < 0 ? -dx : dx) > (dy < 0 ? -dy : dy)) ? (dx < 0 ? -dx : dx) : (dy < 0 ? -dy : dy);
    xmajor = (dx < 0 ? -dx : dx) >= (dy < 0 ? -dy : dy);
    p0 <= a; p1 <= b; start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 0;
    forever begin
      #1;
      if (mem_we) begin
        px.push_back(int'(mem_addr[7:0]));
        py.push_back(int'(mem_addr[15:8]));
        check(mem_wdata == 8'd1, "pixel value is black");
      end
      if (done) break;
      cyc++;
      @(posedge clk);
    end
    check(px.size() == n + 1, $sformatf("pixel count %0d for n=%0d", px.size(), n));
    check(cyc == n + 1, $sformatf("write cycles %0d expected %0d", cyc, n + 1));
    if (px.size() == n + 1) begin
      check(px[0] == a.x && py[0] == a.y, "first pixel is p0");
      check(px[n] == b.x && py[n] == b.y, "last pixel is p1");
      ok = 1;
      for (k = 0; k <= n; k++) begin
        real ideal, err;
        if (xmajor) begin
          if (px[k] != int'(a.x) + (dx < 0 ? -k : k)) ok = 0;
          ideal = (dx == 0) ? real'(a.y) : real'(a.y) + real'(dy) * real'(px[k] - int'(a.x)) / real'(dx);
          err = real'(py[k]) - ideal;
        end else begin
          if (py[k] != int'(a.y) + (dy < 0 ? -k : k)) ok = 0;
          ideal = real'(a.x) + real'(dx) * real'(py[k] - int'(a.y)) / real'(dy);
          err = real'(px[k]) - ideal;
        end
        if (err > 0.5001 || err < -0.5001) ok = 0;
      end
      check(ok, $sformatf("pixels follow the line (%0d,%0d)-(%0d,%0d)", a.x, a.y, b.x, b.y));
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_line('{x: 10, y: 10}, '{x: 10, y: 10});
    run_line('{x: 0, y: 0}, '{x: 255, y: 0});
    run_line('{x: 0, y: 255}, '{x: 0, y: 0});
    run_line('{x: 3, y: 7}, '{x: 250, y: 240});
    run_line('{x: 200, y: 20}, '{x: 20, y: 60});
    for (int i = 0; i < 600; i++) begin
      point_t a, b;
      a = point_t'($urandom);
      b = (i % 2) ? point_t'($urandom)
                  : '{x: a.x + 8'($urandom_range(40)) - 8'd20, y: a.y + 8'($urandom_range(40)) - 8'd20};
      run_line(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
