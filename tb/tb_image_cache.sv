// tb_image_cache: runs the cache over a whole 256 x 256 image held in an
// external SRAM model, with a fill stand-in that, for each offered
// scanline, reads every pixel (checking it against the byte image: black
// when the byte is non-zero, and that scanlines come in order 0..255),
// and writes a new pixel value f(x, y). After done, the packed bytes in
// the first 32 bytes of every row must hold f for that row (pixel 8b+i in
// bit i of byte b). Pass 1 has a fast fill: the external traffic alone
// (256 x (256 + 32) = 73728 cycles) must then set the time, within a
// small overhead. Pass 2 has a slow fill, so the loader must stop when
// all cache slots are taken.
module tb_image_cache;
  import font_pkg::*;
  localparam int W = 256, NLINES = 32, NUM_LINES = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 1, start = 0, line_done = 0, px_we = 0, px_wdata = 0;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge
  logic busy, done, mem_en, mem_we, line_ready, px_rdata;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  coord_t line_y, px_addr = '0;
  int checks = 0, failures = 0, ring_full = 0, bad_px = 0, bad_order = 0;
  int slow_delay = 0;
  logic [7:0] orig [2**ADDR_W];

  image_cache #(.W(W), .NLINES(NLINES), .NUM_LINES(NUM_LINES)) dut (.*);
  ext_sram_model u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                        .wdata(mem_wdata), .rdata(mem_rdata));

  always @(posedge clk) if (busy && (dut.n_load - dut.n_wb) == NLINES) ring_full++;

  function automatic logic f(int x, int y, int pass);
    return ((x * 7 + y * 3 + pass) % 5) < 2;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fill stand-in: one pass of read-old / write-new per scanline
  task automatic fill_lines(input int pass);
    for (int y = 0; y < NUM_LINES; y++) begin
      while (!line_ready) begin @(posedge clk); #1; end
      if (line_y != coord_t'(y)) bad_order++;
      for (int x = 0; x <= W; x++) begin
        if (x < W) begin
          px_addr <= coord_t'(x); px_we <= 1; px_wdata <= f(x, y, pass);
        end else begin
          px_we <= 0;
        end
        @(posedge clk);
        #1;
        if (x < W) begin
          // read data of pixel x (its value before this write)
          if (px_rdata !== (orig[{y[7:0], 8'(x)}] != 0)) bad_px++;
        end
      end
      repeat (slow_delay) @(posedge clk);
      line_done <= 1;
      @(posedge clk);
      line_done <= 0;
      #1;
    end
  endtask

  task automatic run_pass(input int pass, output int cycles);
    int bad;
    for (int a = 0; a < 2**ADDR_W; a++) begin
      orig[a] = ($urandom_range(3) == 0) ? 8'($urandom_range(1, 255)) : 8'h00;
      u_mem.mem[a] = orig[a];
    end
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 1;
    fork
      fill_lines(pass);
      begin
        do begin @(posedge clk); cycles++; #1; end while (!done);
      end
    join
    bad = 0;
    for (int y = 0; y < NUM_LINES; y++)
      for (int b = 0; b < W/8; b++)
        for (int i = 0; i < 8; i++)
          if (u_mem.mem[{8'(y), 8'(b)}][i] !== f(8*b + i, y, pass)) bad++;
    check(bad == 0, $sformatf("pass %0d: %0d packed bits wrong", pass, bad));
    check(bad_px == 0, $sformatf("pass %0d: %0d cached pixels wrong", pass, bad_px));
    check(bad_order == 0, "scanlines offered in order");
  endtask

  initial begin
    int cyc1, cyc2;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    slow_delay = 0;
    run_pass(1, cyc1);
    $display("fast fill: %0d cycles (external traffic 73728)", cyc1);
    check(cyc1 >= 73728 && cyc1 <= 73728 + 1200, $sformatf("fast pass took %0d cycles", cyc1));
    slow_delay = 600;
    run_pass(2, cyc2);
    $display("slow fill: %0d cycles, ring full for %0d cycles", cyc2, ring_full);
    check(ring_full > 0, "loader stopped on a full cache");
    check(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
