// tb_scan_fill: plays the image cache for the fill element. It offers
// scanlines (the example of edges at x=1 and x=14, lines with wide edge
// runs, an odd number of edges, an empty line, more edges than the edge
// stack holds, and random outlines), serves the one-cycle pixel reads and
// takes the writes, then compares the line with an even-odd reference
// computed here: each run of black pixels is an edge, an unpaired last
// edge is ignored, and pixels from the start of edge 2k to the start of
// edge 2k+1 become black. The cycle count per line is checked against
// W + 5 + pixels written + one per pair of edges.
module tb_scan_fill;
  import font_pkg::*;
  localparam int W = 256, EDGE_DEPTH = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic   rst_n = 0, line_ready = 0, px_rdata = 0;
  logic   line_done, px_we, px_wdata, edge_overflow;
  coord_t px_addr;
  logic   line [W];
  int checks = 0, failures = 0, writes = 0, overflows = 0;

  scan_fill #(.W(W), .EDGE_DEPTH(EDGE_DEPTH)) dut (.*);

  // cache model: synchronous read, write at the edge
  always @(posedge clk) begin
    px_rdata <= line[px_addr];
    if (px_we) begin line[px_addr] <= px_wdata; writes++; end
    if (edge_overflow) overflows++;
  end

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

  task automatic run_line(input logic img [W], input string name);
    logic expect_line [W];
    int starts [$];
    int cyc, w0, mism;
    logic prev;
    for (int x = 0; x < W; x++) begin line[x] = img[x]; expect_line[x] = img[x]; end
    prev = 0;
    for (int x = 0; x < W; x++) begin
      if (img[x] && !prev) starts.push_back(x);
      prev = img[x];
    end
    if (starts.size() > EDGE_DEPTH) starts = starts[0:EDGE_DEPTH-1];
    for (int k = 0; k + 1 < starts.size(); k += 2)
      for (int x = starts[k]; x <= starts[k+1]; x++) expect_line[x] = 1;
    w0 = writes;
    line_ready <= 1;
    cyc = 0;
    do begin
      @(posedge clk);
      line_ready <= 0;
      cyc++;
      #1;
    end while (!line_done);
    mism = 0;
    for (int x = 0; x < W; x++) if (line[x] !== expect_line[x]) mism++;
    check(mism == 0, $sformatf("%s: %0d pixels differ", name, mism));
    check(cyc <= W + 5 + (writes - w0) + starts.size() / 2 && cyc >= W + 3,
          $sformatf("%s: %0d cycles for %0d writes", name, cyc, writes - w0));
    @(posedge clk);
  endtask

  initial begin
    logic img [W];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // the scanline example: edges at 1 and E of the first 16 pixels
    for (int x = 0; x < W; x++) img[x] = 0;
    img[1] = 1; img[14] = 1;
    run_line(img, "example");
    check(line[0] == 0 && line[15] == 0 && line[1] && line[8] && line[14], "example filled 1..E");
    // wide runs
    for (int x = 0; x < W; x++) img[x] = (x >= 10 && x < 14) || (x >= 100 && x < 103) ||
                                         (x >= 150 && x < 151) || (x >= 200 && x < 210);
    run_line(img, "wide runs");
    // odd number of edges
    for (int x = 0; x < W; x++) img[x] = (x == 5) || (x == 50) || (x == 120);
    run_line(img, "odd edges");
    // empty line and edge at the ends
    for (int x = 0; x < W; x++) img[x] = 0;
    run_line(img, "empty");
    for (int x = 0; x < W; x++) img[x] = (x == 0) || (x == W-1);
    run_line(img, "full width");
    // more edges than the stack holds
    for (int x = 0; x < W; x++) img[x] = (x % 6 == 0);
    run_line(img, "many edges");
    check(overflows > 0, "edge stack overflow reported");
    for (int i = 0; i < 200; i++) begin
      int n;
      n = $urandom_range(0, 12);
      for (int x = 0; x < W; x++) img[x] = 0;
      for (int k = 0; k < n; k++) begin
        int s, l;
        s = $urandom_range(W-1);
        l = $urandom_range(0, 3);
        for (int x = s; x <= s + l && x < W; x++) img[x] = 1;
      end
      run_line(img, $sformatf("random %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
