// tb_point_fifo: random traffic on both sides of the FIFO against a queue
// model: order, full/empty flags, back-pressure at DEPTH entries, and
// simultaneous push and pop.
module tb_point_fifo;
  import font_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic   rst_n = 0, in_valid = 0, out_ready = 0;
  point_t in_pt = '0, out_pt;
  logic   in_ready, out_valid, full;
  point_t q [$];
  int checks = 0, failures = 0, full_seen = 0;

  point_fifo #(.DEPTH(DEPTH)) dut (.*);

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
    for (int i = 0; i < 20000; i++) begin
      int phase;
      phase = (i / 1000) % 3;   // fill-heavy, drain-heavy, balanced
      in_valid  <= ($urandom_range(9) < (phase == 0 ? 8 : phase == 1 ? 2 : 5));
      out_ready <= ($urandom_range(9) < (phase == 0 ? 2 : phase == 1 ? 8 : 5));
      in_pt     <= point_t'($urandom);
      #1;
      @(posedge clk);
      // compare the state seen at this edge with the model
      checks++;
      if (out_valid != (q.size() != 0) || full != (q.size() == DEPTH) || in_ready != (q.size() != DEPTH)) begin
        failures++;
        if (failures < 10) $display("flags wrong at %0d: size %0d valid %b full %b", i, q.size(), out_valid, full);
      end
      if (out_valid && q.size() != 0) begin
        checks++;
        if (out_pt !== q[0]) begin
          failures++;
          if (failures < 10) $display("data %h expected %h", out_pt, q[0]);
        end
      end
      if (full) full_seen++;
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_pt);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FIFO never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
