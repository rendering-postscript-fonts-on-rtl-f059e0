// tb_input_mem: fills the whole input memory through the 16-bit host port
// with random words, then reads every byte back through the 8-bit port in
// random order and compares with a reference copy (low byte at the even
// address). Also checks the one-cycle read latency.
module tb_input_mem;
  localparam int BYTES = 512;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        wr_en = 0;
  logic [7:0]  wr_addr = 0;
  logic [15:0] wr_data = 0;
  logic [8:0]  rd_addr = 0;
  logic [7:0]  rd_data;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [BYTES];

  input_mem #(.BYTES(BYTES)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int w = 0; w < BYTES/2; w++) begin
      logic [15:0] d;
      d = 16'($urandom);
      wr_en <= 1; wr_addr <= 8'(w); wr_data <= d;
      ref_mem[2*w] = d[7:0];
      ref_mem[2*w+1] = d[15:8];
      @(posedge clk);
    end
    wr_en <= 0;
    for (int i = 0; i < 2*BYTES; i++) begin
      int a;
      a = (i < BYTES) ? i : int'($urandom_range(BYTES-1));
      rd_addr <= 9'(a);
      @(posedge clk);   // address sampled here
      #1;
      checks++;
      if (rd_data !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("byte %0d: got %02h expected %02h", a, rd_data, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
