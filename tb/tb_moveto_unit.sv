// tb_moveto_unit: drives random moveto and current-point updates and
// compares cur_pt, first_pt and move_done with a reference model.
module tb_moveto_unit;
  import font_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic   rst_n = 0;
  logic   move_en = 0, cur_en = 0, move_done;
  point_t move_pt = '0, cur_pt_in = '0, cur_pt, first_pt;
  point_t ref_cur, ref_first;
  logic   ref_done;
  int checks = 0, failures = 0;

  moveto_unit dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_cur = '0; ref_first = '0; ref_done = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 1000; i++) begin
      logic m, c;
      point_t a, b;
      m = ($urandom_range(3) == 0);
      c = ($urandom_range(1) == 0);
      a = point_t'($urandom);
      b = point_t'($urandom);
      move_en <= m; move_pt <= a; cur_en <= c; cur_pt_in <= b;
      @(posedge clk);
      ref_done = m;
      if (m) begin ref_cur = a; ref_first = a; end
      else if (c) ref_cur = b;
      #1;
      checks++;
      if (cur_pt !== ref_cur || first_pt !== ref_first || move_done !== ref_done) begin
        failures++;
        if (failures < 10) $display("step %0d: cur %h/%h first %h/%h", i, cur_pt, ref_cur, first_pt, ref_first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
