// tb_closepath_unit: checks both closepath cases. When the current point
// already equals the subpath start, done must follow start after one cycle
// with no line request. Otherwise the unit must request exactly the line
// current -> first, hold the request until acknowledged, and finish one
// cycle after the (modelled) renderer reports the line done.
module tb_closepath_unit;
  import font_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic   rst_n = 0, start = 0, line_ack = 0, line_done = 0;
  point_t cur_pt = '0, first_pt = '0, line_p0, line_p1;
  logic   line_req, done, set_cur, drew;
  int checks = 0, failures = 0;

  closepath_unit dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      point_t c, f;
      int ack_delay, line_len, t;
      logic saw_req;
      c = point_t'($urandom);
      f = (i % 3 == 0) ? c : point_t'($urandom);
      ack_delay = $urandom_range(3);
      line_len  = $urandom_range(1, 20);
      cur_pt <= c; first_pt <= f; start <= 1;
      @(posedge clk);
      start <= 0;
      #1;
      if (c == f) begin
        check(done && set_cur && !line_req && !drew, "equal points: immediate done, no line");
      end else begin
        check(!done && line_req && drew, "request raised");
        check(line_p0 == c && line_p1 == f, "line end points current -> first");
        repeat (ack_delay) begin
          @(posedge clk); #1;
          check(line_req && !done, "request held until ack");
        end
        line_ack <= 1;
        @(posedge clk);
        line_ack <= 0;
        #1;
        check(!line_req, "request dropped after ack");
        t = 0;
        repeat (line_len) begin @(posedge clk); #1; if (done) t++; end
        check(t == 0, "no done before line done");
        line_done <= 1;
        @(posedge clk);
        line_done <= 0;
        #1;
        check(done && set_cur, "done one cycle after line done");
      end
      @(posedge clk); #1;
      check(!done, "done is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
