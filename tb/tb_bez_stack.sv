// tb_bez_stack: random pushes and pops against a queue used as a stack,
// including filling it to DEPTH and emptying it; pop data is checked the
// cycle after the pop (synchronous read).
module tb_bez_stack;
  localparam int WIDTH = 100, DEPTH = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, push = 0, pop = 0;
  logic [WIDTH-1:0] push_data = '0, pop_data;
  logic empty, full;
  logic [4:0] count;
  logic [WIDTH-1:0] model [$];
  logic [WIDTH-1:0] expect_data;
  int checks = 0, failures = 0, fulls = 0;

  bez_stack #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 10000; i++) begin
      logic do_push, do_pop;
      logic [WIDTH-1:0] d;
      int bias;
      bias = ((i / 200) % 2) ? 7 : 3;
      do_push = ($urandom_range(9) < bias) && model.size() < DEPTH;
      do_pop  = !do_push && model.size() > 0 && ($urandom_range(1) == 0);
      d = {$urandom, $urandom, $urandom, $urandom};
      push <= do_push; pop <= do_pop; push_data <= d;
      @(posedge clk);
      #1;
      if (do_push) model.push_back(d);
      if (do_pop) begin
        expect_data = model.pop_back();
        checks++;
        if (pop_data !== expect_data) begin
          failures++;
          if (failures < 10) $display("pop %0d: got %h expected %h", i, pop_data, expect_data);
        end
      end
      checks++;
      if (count != 5'(model.size()) || empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
        failures++;
        if (failures < 10) $display("count %0d expected %0d", count, model.size());
      end
      if (full) fulls++;
    end
    checks++;
    if (fulls == 0) begin failures++; $display("stack never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
